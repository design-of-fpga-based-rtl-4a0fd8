// test_model_tb: steps the plant with random and fixed inputs and compares the
// state with round(KS*U + KS*Y(k-1)) and Y with its 8-bit saturation.
module test_model_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, en;
  ks_t ks;
  out_t u;
  sample_t y;
  out_t y_state;
  int checks = 0, failures = 0;
  longint exp;

  test_model dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ks=%0d u=%0d state=%0d exp=%0d y=%0d", what, ks, u, y_state, exp, y); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int uu);
    u = out_t'(uu); en = 1'b1;
    @(posedge mclk); #1 en = 1'b0;
    exp = model_ref(exp, longint'(u), longint'(ks));
    check(longint'(y_state) == exp, "state = KS*Y(k-1) + KS*U(k)");
    check(longint'(y) == clamp(exp, -128, 127), "Y = 8-bit saturated state");
    u = out_t'($urandom);
    @(posedge mclk); #1;
    check(longint'(y_state) == exp, "state holds while enable low");
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; ks = 8'd128; u = '0;
    repeat (2) @(posedge mclk); #1 rst = 1'b0;
    exp = 0;
    check(y_state == 0, "reset value");
    step(1); check(y_state == 1, "0.5*0 + 0.5*1 = 0.5 rounds to 1");
    step(1); check(y_state == 1, "steady state with U = 1");
    step(10); step(10); step(10); step(10); step(10); step(10); step(10); step(10);
    check(y_state == 10, "settles at U = 10");
    step(-2000); step(-2000); step(-2048);
    for (int i = 0; i < 300; i++) begin
      if (i % 30 == 0) ks = ks_t'($urandom);
      step(int'($urandom_range(0, 4095)) - 2048);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
