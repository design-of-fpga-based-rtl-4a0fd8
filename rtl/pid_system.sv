// pid_system: the controller with its test plant, as set up for evaluation.
//
// The P/PI/PD/PID controller (pid_controller) is joined to the first-order
// test model (test_model): the model's input U is PID_OUT and its output Y
// is fed back to the error calculator, closing the loop. With loop_sel low
// the loop is opened and the feedback Y comes instead from an external
// converter: y_adc is offset binary, and it is turned into two's complement
// by complementing its sign bit, as the source design prescribes for data coming
// from ADCs. The set point sp is taken as two's complement (digital input).
// The selection input, and taking only Y through that conversion, are this
// design's choices.
//
// Interface: all controller constants (KP, KI, KD Q4.8; TS Q0.8 seconds;
// KS Q0.8) and the structure bits DC, IC are static inputs. pid_out and y
// change once per 32 Mclk cycles; sample_en marks the cycle in which
// pid_out is stable and the model samples it. clk_out is Mclk/32.
// Reset is synchronous and active high.
module pid_system
  import pid_pkg::*;
(
  input  logic    mclk,
  input  logic    rst,
  input  logic    loop_sel,
  input  sample_t sp,
  input  logic [7:0] y_adc,
  input  gain_t   kp,
  input  gain_t   ki,
  input  gain_t   kd,
  input  ts_t     ts,
  input  logic    dc,
  input  logic    ic,
  input  ks_t     ks,
  output out_t    pid_out,
  output sample_t y,
  output sample_t y_fb,
  output logic    clk_out,
  output logic    sample_en,
  output err_t    err,
  output term_t   pout,
  output term_t   iout,
  output term_t   dout,
  output mode_e   mode
);

  logic [4:0] phase;
  out_t       y_state;

  // Offset binary to two's complement: complement the sign bit.
  assign y_fb = loop_sel ? y : sample_t'({~y_adc[7], y_adc[6:0]});

  pid_controller u_ctrl (
    .mclk      (mclk),
    .rst       (rst),
    .sp        (sp),
    .y         (y_fb),
    .kp        (kp),
    .ki        (ki),
    .kd        (kd),
    .ts        (ts),
    .dc        (dc),
    .ic        (ic),
    .pid_out   (pid_out),
    .clk_out   (clk_out),
    .sample_en (sample_en),
    .phase     (phase),
    .err       (err),
    .pout      (pout),
    .iout      (iout),
    .dout      (dout),
    .mode      (mode)
  );

  test_model u_model (
    .mclk    (mclk),
    .rst     (rst),
    .en      (sample_en),
    .ks      (ks),
    .u       (pid_out),
    .y       (y),
    .y_state (y_state)
  );

endmodule
