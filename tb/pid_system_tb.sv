// pid_system_tb: end-to-end test of the controller closed around the
// first-order test model, at the design's default sizes.
//
// 1. The four structures P, PI, PD and PID are each run from reset for 20
//    samples (10 s at TS = 0.5 s) with the evaluation settings SP = 5,
//    KP = 0.125, KI = 0.5, KD = 0.125, KS = 0.5. PID_OUT and Y are compared
//    every sample with an integer reference of the closed loop, and the
//    settled output is checked (P settles at 1, PI and PID reach SP = 5).
// 2. A structure switch from P to PID without reset.
// 3. The open-loop path: Y taken from an offset-binary converter input.
// 4. Large gains that drive PID_OUT and Y into saturation.
// Each mechanism is counted and a mechanism that never occurred is a failure.
module pid_system_tb;
  import pid_pkg::*;
  import pid_ref_pkg::*;
  logic mclk = 1'b0;
  logic rst, loop_sel;
  sample_t sp;
  logic [7:0] y_adc;
  gain_t kp, ki, kd;
  ts_t ts;
  logic dc, ic;
  ks_t ks;
  out_t pid_out;
  sample_t y, y_fb;
  logic clk_out, sample_en;
  err_t err;
  term_t pout, iout, dout;
  mode_e mode;

  int checks = 0, failures = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_adc = 0, n_usat = 0, n_ysat = 0;
  longint r_i, r_eprev, r_ys, r_u, r_e;
  string traj;

  pid_system dut (.*);
  always #5 mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: mode=%0d y=%0d/%0d u=%0d/%0d err=%0d/%0d", what, {dc, ic}, y, r_ys, pid_out, r_u, err, r_e);
    end
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_reset();
    rst = 1'b1; repeat (2) @(posedge mclk); #1 rst = 1'b0;
    r_i = 0; r_eprev = 0; r_ys = 0;
  endtask

  // Advance one sample period and compare with the reference.
  task automatic sample();
    longint yfb, p, d;
    while (!sample_en) begin @(posedge mclk); #1; end
    yfb = loop_sel ? clamp(r_ys, -128, 127) : longint'(sample_t'({~y_adc[7], y_adc[6:0]}));
    r_e = err_ref(longint'(sp), yfb);
    p = p_ref(longint'(kp), r_e);
    r_i = i_ref(r_i, longint'(ki), longint'(ts), r_e);
    d = d_ref(longint'(kd), longint'(ts), r_e, r_eprev);
    r_eprev = r_e;
    r_u = out_ref(p, ic ? r_i : 0, dc ? d : 0);
    check(longint'(err) == r_e, "ERR");
    check(longint'(pid_out) == r_u, "PID_OUT");
    check(mode == mode_e'({dc, ic}), "structure");
    n_mode[{dc, ic}]++;
    if (r_u == 2047 || r_u == -2048) n_usat++;
    @(posedge mclk); #1;
    r_ys = model_ref(r_ys, r_u, longint'(ks));
    if (r_ys > 127 || r_ys < -128) n_ysat++;
    check(longint'(y) == clamp(r_ys, -128, 127), "Y");
  endtask

  initial begin
    loop_sel = 1'b1; sp = 8'sd5; y_adc = 8'h80;
    kp = 12'd32; ki = 12'd128; kd = 12'd32; ts = 8'd128; ks = 8'd128;
    {dc, ic} = 2'b00;

    // 1. the four structures, evaluation settings
    for (int m = 0; m < 4; m++) begin
      {dc, ic} = 2'(m);
      do_reset();
      traj = "";
      for (int k = 0; k < 20; k++) begin
        sample();
        traj = {traj, $sformatf(" %0d", y)};
      end
      $display("structure %s  Y(k), k=1..20:%s", mode_e'(m) == MODE_P ? "P  " :
               mode_e'(m) == MODE_PI ? "PI " : mode_e'(m) == MODE_PD ? "PD " : "PID", traj);
      if (m == 0 || m == 2) check(y == 8'sd1, "P/PD settle at Y = 1");
      else                  check(y == 8'sd5, "PI/PID reach the set point");
    end

    // 2. switch from P to PID without reset
    {dc, ic} = 2'b00;
    do_reset();
    for (int k = 0; k < 10; k++) sample();
    {dc, ic} = 2'b11; n_switch++;
    for (int k = 0; k < 30; k++) sample();
    check(y == 8'sd5, "PID after the switch reaches the set point");

    // 3. open loop from the converter input (offset binary)
    loop_sel = 1'b0; do_reset();
    for (int k = 0; k < 20; k++) begin
      y_adc = 8'($urandom); sp = sample_t'($urandom_range(0, 60));
      sample(); n_adc++;
      check(y_fb == sample_t'(y_adc - 8'h80), "offset binary converted to two's complement");
    end

    // 4. large gains: PID_OUT and Y saturate
    loop_sel = 1'b1; sp = 8'sd100; kp = 12'd4095; ki = 12'd4095; kd = 12'd0; ts = 8'd255;
    {dc, ic} = 2'b01; do_reset();
    for (int k = 0; k < 12; k++) sample();
    sp = -8'sd100;
    for (int k = 0; k < 12; k++) sample();

    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, "every structure exercised");
    check(n_switch > 0, "structure switch exercised");
    check(n_adc > 0, "converter input path exercised");
    check(n_usat > 0, "PID_OUT saturation exercised");
    check(n_ysat > 0, "model output saturation exercised");
    $display("samples P=%0d PI=%0d PD=%0d PID=%0d switch=%0d adc=%0d out_sat=%0d y_sat=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_adc, n_usat, n_ysat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
