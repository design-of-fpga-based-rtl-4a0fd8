// d_controller: derivative term, DOUT(k) = KD/TS * (ERR(k) - ERR(k-1))
// (backward-shift approximation of the derivative).
//
// As in the source design the block has two stages. The first stage divides KD
// by TS (kd_ts_divider, a sequential divider started at div_start once per
// sample period) and, alongside it, a 16-bit subtractor forms
// DELTA_ERR = ERR(k) - ERR(k-1), the previous error being held in an
// internal latch that is enabled once per sample. The second stage
// multiplies the quotient by DELTA_ERR and the product is held in the 20-bit
// output latch for the final adder.
// The source design's subtractor drawing uses an inverter and a 16-bit adder with
// its carry-in tied to 0; here the difference is exact (carry-in 1), as the
// difference equation requires. A 16-bit overflow of DELTA_ERR saturates.
// The product is formed sign-magnitude: |DELTA_ERR| (Q8.8) * KD/TS (Q12.8),
// truncated to Q12.8 and limited to 19 bits before the sign is applied.
//
// Timing: start the division at div_start; on the Mclk edge with en high the
// output latch takes the new DOUT and the previous-error latch takes ERR(k).
// The division (QW = 20 cycles) must have ended before en; this holds with
// the 32-cycle sample period of clock_control. Synchronous active high reset
// clears both latches (so ERR(0) is taken as 0).
module d_controller
  import pid_pkg::*;
(
  input  logic  mclk,
  input  logic  rst,
  input  logic  div_start,
  input  logic  en,
  input  gain_t kd,
  input  ts_t   ts,
  input  err_t  err,
  output quot_t kd_over_ts,
  output err_t  delta_err,
  output term_t dout
);

  logic  div_busy;
  logic  div_done;
  err_t  err_prev;
  logic signed [ERR_W:0]  diff;
  logic [ERR_W+TERM_W-1:0] prod;  // |DELTA_ERR| * KD/TS, Q.16
  term_t d_next;

  kd_ts_divider u_div (
    .mclk  (mclk),
    .rst   (rst),
    .start (div_start),
    .kd    (kd),
    .ts    (ts),
    .busy  (div_busy),
    .done  (div_done),
    .quot  (kd_over_ts)
  );

  always_comb begin
    diff = {err[ERR_W-1], err} - {err_prev[ERR_W-1], err_prev};
    if (diff > (ERR_W+1)'(err_t'('h7FFF)))       delta_err = err_t'('h7FFF);
    else if (diff < (ERR_W+1)'(err_t'('h8000)))  delta_err = err_t'('h8000);
    else                                         delta_err = err_t'(diff);
    prod   = err_mag(delta_err) * kd_over_ts;
    d_next = signed_term(40'(prod >> ERR_FB), delta_err[ERR_W-1]);
  end

  always_ff @(posedge mclk) begin
    if (rst) begin
      err_prev <= '0;
      dout     <= '0;
    end else if (en) begin
      err_prev <= err;
      dout     <= d_next;
    end
  end

  // The quotient must be settled when the term is latched.
  assert property (@(posedge mclk) disable iff (rst) en |-> !div_busy)
    else $error("d_controller: D term latched while KD/TS division is running");

endmodule
