// tb_dsk_bus: random bus states; the envelope must appear on data bits 15:4
// only for a CSADC read, the drivers must follow rd_n, and DSP write data
// bits 15:4 must reach from_dsp_o.
module tb_dsk_bus;
  logic rd_n_i, csad_n_i, xd_oe;
  logic [11:0] env_u_i, from_dsp_o;
  logic [15:0] xd_i, xd_o;
  dsk_bus dut (.*);
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      rd_n_i   = 1'($urandom_range(1));
      csad_n_i = 1'($urandom_range(1));
      env_u_i  = 12'($urandom_range(4095));
      xd_i     = 16'($urandom_range(65535));
      #1;
      check(xd_oe == !rd_n_i, "drive enable follows rd_n");
      check(xd_o == (csad_n_i ? 16'h0 : {env_u_i, 4'h0}), $sformatf("read data %h env %h", xd_o, env_u_i));
      check(int'(from_dsp_o) == int'(xd_i) / 16, $sformatf("write data %h from %h", from_dsp_o, xd_i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
