// pid_controller: the sampled P/PI/PD/PID controller.
//
// Wires the parts as the source design's block diagram does: the clock control
// unit divides Mclk by 32 and paces one sample; the error calculator forms
// ERR = SP - Y; the P, I and D controllers each turn ERR into a 20-bit Q12.8
// term using the external constants KP, KI, KD and the sampling time TS; the
// I/D latch select passes or blocks the I and D terms according to IC and DC;
// and the final adder sums the terms and rounds them to the 12-bit PID_OUT.
// All arithmetic is two's complement fixed point (see pid_pkg).
//
// Timing, per 32-cycle sample period (phase = Mclk cycle in the period):
//   0      KD/TS division starts (result ready by phase 21)
//   28     ERR(k) latched from SP and Y
//   29     POUT, IOUT, DOUT latched; D keeps ERR(k) as its next ERR(k-1)
//   30     I/D select latches load (during phase 30 PID_OUT already carries
//          the new POUT but still the previous I and D terms)
//   31     sample_en: PID_OUT(k) is final; a plant samples it here
// So PID_OUT(k) is final 3 Mclk cycles after ERR(k) is latched and holds
// until phase 30 of the next period: one result per 32 Mclk cycles. Reset is synchronous and active high.
module pid_controller
  import pid_pkg::*;
(
  input  logic    mclk,
  input  logic    rst,
  input  sample_t sp,
  input  sample_t y,
  input  gain_t   kp,
  input  gain_t   ki,
  input  gain_t   kd,
  input  ts_t     ts,
  input  logic    dc,
  input  logic    ic,
  output out_t    pid_out,
  output logic    clk_out,
  output logic    sample_en,
  output logic [4:0] phase,
  output err_t    err,
  output term_t   pout,
  output term_t   iout,
  output term_t   dout,
  output mode_e   mode
);

  logic  div_start, err_en, ctrl_en, out_en;
  quot_t kd_over_ts;
  err_t  delta_err;
  term_t iout_sel, dout_sel;
  logic signed [TERM_W+1:0] sum;

  clock_control #(.STAGES(5)) u_clk (
    .mclk      (mclk),
    .rst       (rst),
    .phase     (phase),
    .clk_out   (clk_out),
    .div_start (div_start),
    .err_en    (err_en),
    .ctrl_en   (ctrl_en),
    .out_en    (out_en),
    .plant_en  (sample_en)
  );

  error_calc u_err (
    .mclk (mclk), .rst (rst), .en (err_en),
    .sp   (sp),   .y   (y),   .err (err)
  );

  p_controller u_p (
    .mclk (mclk), .rst (rst), .en (ctrl_en),
    .kp   (kp),   .err (err), .pout (pout)
  );

  i_controller u_i (
    .mclk (mclk), .rst (rst), .en (ctrl_en),
    .ki   (ki),   .ts  (ts),  .err (err), .iout (iout)
  );

  d_controller u_d (
    .mclk       (mclk),
    .rst        (rst),
    .div_start  (div_start),
    .en         (ctrl_en),
    .kd         (kd),
    .ts         (ts),
    .err        (err),
    .kd_over_ts (kd_over_ts),
    .delta_err  (delta_err),
    .dout       (dout)
  );

  id_latch_select u_sel (
    .mclk     (mclk), .rst (rst), .en (out_en),
    .dc       (dc),   .ic  (ic),
    .iout     (iout), .dout (dout),
    .iout_sel (iout_sel), .dout_sel (dout_sel), .mode (mode)
  );

  final_adder u_add (
    .pout     (pout),
    .iout_sel (iout_sel),
    .dout_sel (dout_sel),
    .sum      (sum),
    .pid_out  (pid_out)
  );

endmodule
