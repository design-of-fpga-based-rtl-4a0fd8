// final_adder_tb: compares PID_OUT with round-half-up(POUT + I + D) in the
// integer reference, including ties, negative sums and 12-bit saturation.
module final_adder_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  term_t pout, iout_sel, dout_sel;
  logic signed [TERM_W+1:0] sum;
  out_t pid_out;
  int checks = 0, failures = 0;
  longint exp;

  final_adder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s p=%0d i=%0d d=%0d out=%0d exp=%0d", what, pout, iout_sel, dout_sel, pid_out, exp); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply(input int p, input int i, input int d);
    pout = term_t'(p); iout_sel = term_t'(i); dout_sel = term_t'(d);
    #1;
    exp = out_ref(longint'(pout), longint'(iout_sel), longint'(dout_sel));
    check(longint'(sum) == longint'(pout) + longint'(iout_sel) + longint'(dout_sel), "sum");
    check(longint'(pid_out) == exp, "PID_OUT rounding");
  endtask

  initial begin
    apply(160, 0, 0);      check(pid_out == 1,  "0.625 rounds to 1");
    apply(128, 0, 0);      check(pid_out == 1,  "0.5 rounds up");
    apply(-128, 0, 0);     check(pid_out == 0,  "-0.5 rounds up to 0");
    apply(-129, 0, 0);     check(pid_out == -1, "-0.504 rounds to -1");
    apply(160, 320, 320);  check(pid_out == 3,  "0.625+1.25+1.25 = 3.125 -> 3");
    apply(524287, 524287, 524287); check(pid_out == 2047, "positive saturation");
    apply(-524287, -524287, -524287); check(pid_out == -2048, "negative saturation");
    for (int r = 0; r < 2000; r++)
      apply(int'($urandom_range(0, 1048574)) - 524287, int'($urandom_range(0, 1048574)) - 524287,
            int'($urandom_range(0, 1048574)) - 524287);
    for (int r = 0; r < 1000; r++)
      apply(int'($urandom_range(0, 4000)) - 2000, int'($urandom_range(0, 4000)) - 2000,
            int'($urandom_range(0, 4000)) - 2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
