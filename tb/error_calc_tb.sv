// error_calc_tb: drives random and corner SP/Y pairs and compares the latched
// Q8.8 error with SP - Y (saturated), and checks that the latch holds while
// its enable is low.
module error_calc_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, en;
  sample_t sp, y;
  err_t err;
  int checks = 0, failures = 0;
  longint exp;

  error_calc dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sp=%0d y=%0d err=%0d", what, sp, y, err); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply(input int a, input int b);
    sp = sample_t'(a); y = sample_t'(b); en = 1'b1;
    @(posedge mclk); #1 en = 1'b0;
    exp = err_ref(longint'(sp), longint'(y));
    check(longint'(err) == exp, "ERR = SP - Y");
    // change inputs with en low: latch must hold
    sp = sample_t'($urandom); y = sample_t'($urandom);
    @(posedge mclk); #1;
    check(longint'(err) == exp, "ERR holds while enable low");
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; sp = '0; y = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    check(err == 0, "reset value");
    apply(5, 0); apply(5, 1); apply(0, 5); apply(5, 5);
    apply(127, -128); apply(-128, 127); apply(-128, -128); apply(100, -100);
    for (int i = 0; i < 300; i++) apply(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
