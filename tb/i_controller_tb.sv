// i_controller_tb: runs the integrator over sequences of errors and compares
// IOUT(k) with the reference recurrence IOUT(k-1) + KI*ERR*TS, including
// saturation at the Q12.8 limits.
module i_controller_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, en;
  gain_t ki;
  ts_t ts;
  err_t err;
  term_t iout;
  int checks = 0, failures = 0, n_sat = 0;
  longint exp;

  i_controller dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ki=%0d ts=%0d err=%0d iout=%0d exp=%0d", what, ki, ts, err, iout, exp); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int e);
    err = err_t'(e); en = 1'b1;
    @(posedge mclk); #1 en = 1'b0;
    exp = i_ref(exp, longint'(ki), longint'(ts), longint'(err));
    if (exp == TERM_LIM || exp == -TERM_LIM) n_sat++;
    check(longint'(iout) == exp, "IOUT recurrence");
    @(posedge mclk); #1;
    check(longint'(iout) == exp, "IOUT holds while enable low");
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; ki = '0; ts = '0; err = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    exp = 0;
    check(iout == 0, "reset value");
    // evaluation tuning: KI = 0.5 (128), TS = 0.5 s (128): +0.25*ERR per sample
    ki = 12'd128; ts = 8'd128;
    step(5*256); check(iout == 20'sd320, "0.25*5 = 1.25 after one sample");
    step(5*256); step(-3*256); step(0);
    // random sequences
    for (int s = 0; s < 20; s++) begin
      ki = gain_t'($urandom_range(0, 4095)); ts = ts_t'($urandom_range(1, 255));
      for (int i = 0; i < 15; i++) step(int'($urandom_range(0, 65535)) - 32768);
    end
    // drive to both saturation limits
    ki = 12'd4095; ts = 8'd255;
    for (int i = 0; i < 40; i++) step(32767);
    for (int i = 0; i < 80; i++) step(-32768);
    check(n_sat > 0, "saturation reached");
    rst = 1'b1; @(posedge mclk); #1 rst = 1'b0; exp = 0;
    check(iout == 0, "reset clears the integral");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
