// tb_dsk_decode: every XA(15:2) pattern with every CE/RE combination; the
// selects must match the EMIF map CSADC = 0x0, WRDAC1 = 0x4, WRDAC2 = 0xC and
// rd_n must be low only for a read inside the 0x0000-0x1FFF window.
module tb_dsk_decode;
  logic [15:2] xa_i;
  logic xce_n_i, xre_n_i, rd_n_o, csad_n_o, csdac1_n_o, csdac2_n_o;
  dsk_decode dut (.*);
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
    for (int a = 0; a < 16384; a++) begin
      for (int c = 0; c < 4; c++) begin
        automatic int addr = a * 4;
        automatic bit ce = c[0], re = c[1];
        xa_i = 14'(a); xce_n_i = ce; xre_n_i = re; #1;
        check(csad_n_o   == !(addr == 0 && !ce),  $sformatf("csad %h ce%0d", addr, ce));
        check(csdac1_n_o == !(addr == 4 && !ce),  $sformatf("csdac1 %h ce%0d", addr, ce));
        check(csdac2_n_o == !(addr == 12 && !ce), $sformatf("csdac2 %h ce%0d", addr, ce));
        check(rd_n_o == !(addr < 16'h2000 && !ce && !re), $sformatf("rd_n %h", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
