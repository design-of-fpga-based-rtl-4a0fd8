// pid_controller_tb: open-loop test of the whole controller. Every sample
// period the testbench applies new SP, Y, gains, TS and structure bits,
// then compares ERR, the three terms and PID_OUT with the integer reference
// model. It also checks the timing: PID_OUT may change only on the edges
// that end phases 29 and 30 (the proportional term reaches the adder one
// cycle before the selected I and D terms) and is final from phase 31,
// 3 Mclk cycles after ERR is latched, once per 32 Mclk cycles.
module pid_controller_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst;
  sample_t sp, y;
  gain_t kp, ki, kd;
  ts_t ts;
  logic dc, ic;
  out_t pid_out;
  logic clk_out, sample_en;
  logic [4:0] phase;
  err_t err;
  term_t pout, iout, dout;
  mode_e mode;
  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_change = 0, cyc = 0;
  longint e_ref, p_exp, i_exp, d_exp, u_exp, eprev;
  out_t last_out;

  pid_controller dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: sp=%0d y=%0d err=%0d p=%0d/%0d i=%0d/%0d d=%0d/%0d out=%0d/%0d",
               what, sp, y, err, pout, p_exp, iout, i_exp, dout, d_exp, pid_out, u_exp);
    end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // PID_OUT only moves at the end of phases 29 and 30.
  always @(posedge mclk) begin
    #2;
    if (!rst) begin
      cyc++;
      if (pid_out != last_out) begin
        n_change++;
        check(phase == 5'd30 || phase == 5'd31, "PID_OUT changes only after phases 29/30");
      end
      last_out = pid_out;
    end
  end

  initial begin
    rst = 1'b1; sp = '0; y = '0; kp = '0; ki = '0; kd = '0; ts = 8'd128; dc = 1'b0; ic = 1'b0;
    last_out = '0;
    repeat (3) @(posedge mclk); #1 rst = 1'b0;
    i_exp = 0; eprev = 0;
    for (int k = 0; k < 120; k++) begin
      // new inputs at phase 0 of this period
      if (k < 8) begin
        // evaluation tuning, SP = 5, Y stepping up
        sp = 8'sd5; y = sample_t'(k); kp = 12'd32; ki = 12'd128; kd = 12'd32; ts = 8'd128;
        {dc, ic} = 2'b11;
      end else begin
        sp = sample_t'($urandom); y = sample_t'($urandom);
        if (k % 10 == 0) begin
          kp = gain_t'($urandom); ki = gain_t'($urandom_range(0, 255));
          kd = gain_t'($urandom); ts = ts_t'($urandom_range(1, 255));
          {dc, ic} = 2'($urandom);
        end
      end
      // wait for sample_en (phase 31): all results of this sample are settled
      while (!sample_en) begin @(posedge mclk); #1; end
      e_ref = err_ref(longint'(sp), longint'(y));
      p_exp = p_ref(longint'(kp), e_ref);
      i_exp = i_ref(i_exp, longint'(ki), longint'(ts), e_ref);
      d_exp = d_ref(longint'(kd), longint'(ts), e_ref, eprev);
      eprev = e_ref;
      u_exp = out_ref(p_exp, ic ? i_exp : 0, dc ? d_exp : 0);
      check(longint'(err) == e_ref, "ERR");
      check(longint'(pout) == p_exp, "POUT");
      check(longint'(iout) == i_exp, "IOUT");
      check(longint'(dout) == d_exp, "DOUT");
      check(longint'(pid_out) == u_exp, "PID_OUT");
      check(mode == mode_e'({dc, ic}), "mode");
      n_mode[{dc, ic}]++;
      @(posedge mclk); #1;
    end
    check(cyc >= 120 * 32 && cyc < 121 * 32, "one sample per 32 Mclk cycles");
    check(n_change > 60 && n_change <= 240, "PID_OUT updates at most twice per sample");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, "every structure P/PI/PD/PID used");
    $display("modes P=%0d PI=%0d PD=%0d PID=%0d, output changes=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
