// p_controller_tb: compares POUT with KP * ERR computed by the integer
// reference (sign-magnitude truncation to Q12.8, 19-bit magnitude limit).
module p_controller_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, en;
  gain_t kp;
  err_t err;
  term_t pout;
  int checks = 0, failures = 0;
  longint exp;

  p_controller dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s kp=%0d err=%0d pout=%0d exp=%0d", what, kp, err, pout, exp); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply(input int k, input int e);
    kp = gain_t'(k); err = err_t'(e); en = 1'b1;
    @(posedge mclk); #1 en = 1'b0;
    exp = p_ref(longint'(kp), longint'(err));
    check(longint'(pout) == exp, "POUT = KP*ERR");
    kp = gain_t'($urandom); err = err_t'($urandom);
    @(posedge mclk); #1;
    check(longint'(pout) == exp, "POUT holds while enable low");
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; kp = '0; err = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    check(pout == 0, "reset value");
    apply(32, 5*256);            // KP = 0.125, ERR = 5  -> 0.625
    apply(32, -5*256);           // negative error
    apply(256, 1);               // 1.0 * 1/256
    apply(1, -255);              // truncation toward zero -> 0
    apply(4095, 32767);          // saturation
    apply(4095, -32768);
    for (int i = 0; i < 400; i++) apply(int'($urandom_range(0, 4095)), int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
