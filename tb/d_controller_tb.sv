// d_controller_tb: paces the D controller like the sample sequencer (division
// at phase 0, term latched at phase 29) and compares DOUT(k) with
// KD/TS * (ERR(k) - ERR(k-1)) from the integer reference.
module d_controller_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, div_start, en;
  gain_t kd;
  ts_t ts;
  err_t err;
  quot_t kd_over_ts;
  err_t delta_err;
  term_t dout;
  int checks = 0, failures = 0, n_dsat = 0;
  longint exp, eprev;

  d_controller dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s kd=%0d ts=%0d err=%0d prev=%0d dout=%0d exp=%0d", what, kd, ts, err, eprev, dout, exp); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // One 32-cycle sample period.
  task automatic sample(input int e);
    div_start = 1'b1; @(posedge mclk); #1 div_start = 1'b0;
    repeat (28) @(posedge mclk);
    #1 err = err_t'(e); en = 1'b1;
    @(posedge mclk); #1 en = 1'b0;
    exp = d_ref(longint'(kd), longint'(ts), longint'(err), eprev);
    if (longint'(err) - eprev > 32767 || longint'(err) - eprev < -32768) n_dsat++;
    check(longint'(kd_over_ts) == quot_ref(longint'(kd), longint'(ts)), "KD/TS quotient");
    check(longint'(dout) == exp, "DOUT = KD/TS*(ERR(k)-ERR(k-1))");
    eprev = longint'(err);
    @(posedge mclk); #1;
  endtask

  initial begin
    rst = 1'b1; div_start = 1'b0; en = 1'b0; kd = '0; ts = '0; err = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    eprev = 0;
    check(dout == 0, "reset value");
    kd = 12'd32; ts = 8'd128;          // KD = 0.125, TS = 0.5 s
    sample(5*256);  check(dout == 20'sd320, "0.25*5 = 1.25 derivative kick");
    sample(5*256);  check(dout == 0, "constant error gives zero");
    sample(3*256);  check(dout == -20'sd128, "0.25*(-2) = -0.5");
    for (int s = 0; s < 10; s++) begin
      kd = gain_t'($urandom_range(0, 4095)); ts = ts_t'($urandom_range(1, 255));
      for (int i = 0; i < 10; i++) sample(int'($urandom_range(0, 65535)) - 32768);
    end
    kd = 12'd256; ts = 8'd255;
    sample(32767); sample(-32768); sample(32767);
    check(n_dsat > 0, "DELTA_ERR overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
