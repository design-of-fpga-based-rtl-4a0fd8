// id_latch_select_tb: for every DC/IC combination checks that the latches
// pass or clear the I and D terms as the P/PI/PD/PID table requires, and
// that they hold while the enable is low.
module id_latch_select_tb;
  import pid_pkg::*;
  logic mclk = 1'b0;
  logic rst, en, dc, ic;
  term_t iout, dout, iout_sel, dout_sel;
  mode_e mode;
  int checks = 0, failures = 0;
  term_t ei, ed;

  id_latch_select dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s dc=%0b ic=%0b i=%0d d=%0d", what, dc, ic, iout_sel, dout_sel); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; dc = 1'b1; ic = 1'b1; iout = '0; dout = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    check(iout_sel == 0 && dout_sel == 0 && mode == MODE_P, "reset value");
    for (int r = 0; r < 100; r++) begin
      {dc, ic} = 2'(r);
      iout = term_t'($urandom); dout = term_t'($urandom);
      if (iout == 0) iout = 1;
      if (dout == 0) dout = -1;
      en = 1'b1; @(posedge mclk); #1 en = 1'b0;
      ei = ic ? iout : '0; ed = dc ? dout : '0;
      check(iout_sel == ei, "I latch follows IC");
      check(dout_sel == ed, "D latch follows DC");
      check(mode == mode_e'({dc, ic}), "mode = {DC,IC}");
      iout = term_t'($urandom); dout = term_t'($urandom); dc = ~dc; ic = ~ic;
      @(posedge mclk); #1;
      check(iout_sel == ei && dout_sel == ed, "latches hold while enable low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
