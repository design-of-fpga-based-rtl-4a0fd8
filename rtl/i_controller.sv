// i_controller: integral term, IOUT(k) = IOUT(k-1) + KI * ERR(k) * TS
// (backward-shift approximation of the integral).
//
// Structure as in the source design: one multiplier for the three values TS, KI
// and ERR, a two's complement stage, an adder (carry-in 0) that adds the
// past integral IOUT(k-1) fed back from the output latch, and the 20-bit
// output latch. The multiplier works on |ERR| (Q8.8) * KI (Q4.8) * TS (Q0.8),
// a Q12.24 magnitude truncated to Q12.8 and limited to 19 bits before the
// sign of ERR is applied. The accumulating adder saturates at the Q12.8
// limits instead of wrapping; that, and the binary points, are this design's
// choices.
//
// Timing: the latch accumulates once per Mclk edge with en high (one sample).
// Synchronous active high reset clears the integral.
module i_controller
  import pid_pkg::*;
(
  input  logic  mclk,
  input  logic  rst,
  input  logic  en,
  input  gain_t ki,
  input  ts_t   ts,
  input  err_t  err,
  output term_t iout
);

  logic [ERR_W+K_W+TS_W-1:0] prod;  // |ERR| * KI * TS, Q12.24
  term_t                     inc;   // signed increment, Q12.8
  term_t                     i_next;

  always_comb begin
    prod   = err_mag(err) * ki * ts;
    inc    = signed_term(40'(prod >> (K_FB + TS_FB)), err[ERR_W-1]);
    i_next = sat_add(iout, inc);
  end

  always_ff @(posedge mclk) begin
    if (rst)     iout <= '0;
    else if (en) iout <= i_next;
  end

endmodule
