// tb_quad_mixer: drives random and extreme samples into quad_mixer and checks
// both products, floor(x*carrier/32), against the carrier formula.
module tb_quad_mixer;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [11:0] sig_i, i_o, q_o;
  int checks = 0, failures = 0;

  quad_mixer dut (.clk(clk), .rst(rst), .sig_i(sig_i), .i_o(i_o), .q_o(q_o));

  always #500 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x;
    sig_i = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 1000; k++) begin
      @(posedge clk);
      #1;
      case (k % 7)
        0: x = -2048;
        1: x = 2047;
        default: x = int'($urandom_range(4095)) - 2048;
      endcase
      sig_i = 12'(x);
      #1;
      check(int'(i_o) == int'(fdiv(longint'(x) * sin_ref(k), 5)),
            $sformatf("I k=%0d x=%0d got %0d", k, x, i_o));
      check(int'(q_o) == int'(fdiv(longint'(x) * cos_ref(k), 5)),
            $sformatf("Q k=%0d x=%0d got %0d", k, x, q_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
