// kd_ts_divider_tb: starts divisions of KD (Q4.8) by TS (Q0.8), checks the
// Q12.8 quotient against integer division, that done comes exactly 20 cycles
// after start, and that the quotient holds between divisions.
module kd_ts_divider_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, start, busy, done;
  gain_t kd;
  ts_t ts;
  quot_t quot;
  int checks = 0, failures = 0;
  longint exp;
  int cycles;

  kd_ts_divider dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s kd=%0d ts=%0d quot=%0d exp=%0d cycles=%0d", what, kd, ts, quot, exp, cycles); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic divide(input int k, input int t);
    longint prev;
    prev = longint'(quot);
    kd = gain_t'(k); ts = ts_t'(t); start = 1'b1;
    @(posedge mclk); #1 start = 1'b0;
    // inputs may change once sampled
    kd = gain_t'($urandom); ts = ts_t'($urandom);
    cycles = 0;
    while (!done && cycles < 40) begin
      check(longint'(quot) == prev, "quotient holds while dividing");
      @(posedge mclk); #1; cycles++;
    end
    exp = quot_ref(longint'(k), longint'(t));
    check(cycles == 20, "division takes 20 cycles");
    check(longint'(quot) == exp, "quotient = KD*256/TS");
    check(!busy, "idle after done");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; kd = '0; ts = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    check(quot == 0, "reset value");
    divide(32, 128);       // 0.125 / 0.5 = 0.25 -> 64
    check(quot == 20'd64, "KD/TS for the source design's tuning");
    divide(4095, 1);       // largest quotient
    divide(1, 255);
    divide(100, 0);        // divide by zero -> all ones
    for (int i = 0; i < 200; i++) divide(int'($urandom_range(0, 4095)), int'($urandom_range(1, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
