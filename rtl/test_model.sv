// test_model: discrete first-order plant used to close the loop around the
// controller, Y(k) = KS * Y(k-1) + KS * U(k)  (KS = 0.5 in the source design).
//
// Structure as in the source design: U (the 12-bit controller output) is bit-
// extended to 20 bits and multiplied by KS, the latched previous output is
// multiplied by KS in a second multiplier, an adder (carry-in 0) sums the
// two products, a bit limiter cuts the 20-bit sum back to 12 bits and a
// latch holds it as the model state. KS is unsigned Q0.8 (0x80 = 0.5), so
// the products and the sum are Q12.8. The bit limiter rounds to the nearest
// integer (half up) and saturates to the 12-bit signed range; the 8-bit Y
// output is the state saturated to -128 .. 127. The binary point of KS and
// the rounding of the limiter are this design's choices.
//
// Timing: the state latch loads on the Mclk edge with en high (once per
// sample, after PID_OUT has settled). Synchronous active high reset clears
// the state to 0.
module test_model
  import pid_pkg::*;
(
  input  logic    mclk,
  input  logic    rst,
  input  logic    en,
  input  ks_t     ks,
  input  out_t    u,
  output sample_t y,
  output out_t    y_state
);

  logic signed [TERM_W-1:0] u_ext;     // bit extender, 12 -> 20 bits
  logic signed [TERM_W-1:0] prod_u;    // KS * U,      Q12.8
  logic signed [TERM_W-1:0] prod_y;    // KS * Y(k-1), Q12.8
  logic signed [TERM_W:0]   s;         // adder, Q12.8
  logic signed [TERM_W:0]   s_r;
  logic signed [TERM_W-TERM_FB:0] s_int;
  out_t                     y_next;    // bit limiter output

  localparam logic signed [TERM_W-TERM_FB:0] SMAX = (1 <<< (OUT_W-1)) - 1;
  localparam logic signed [TERM_W-TERM_FB:0] SMIN = -(1 <<< (OUT_W-1));

  always_comb begin
    u_ext  = TERM_W'(u);
    prod_u = TERM_W'(u_ext * $signed({1'b0, ks}));
    prod_y = TERM_W'(TERM_W'(y_state) * $signed({1'b0, ks}));
    s      = (TERM_W+1)'(prod_u) + (TERM_W+1)'(prod_y);
    s_r    = s + (TERM_W+1)'(1 << (TERM_FB-1));
    s_int  = s_r[TERM_W:TERM_FB];
    if (s_int > SMAX)      y_next = out_t'(SMAX);
    else if (s_int < SMIN) y_next = out_t'(SMIN);
    else                   y_next = out_t'(s_int);
  end

  always_ff @(posedge mclk) begin
    if (rst)     y_state <= '0;
    else if (en) y_state <= y_next;
  end

  always_comb begin
    if (y_state > 12'sd127)       y = 8'sd127;
    else if (y_state < -12'sd128) y = -8'sd128;
    else                          y = sample_t'(y_state);
  end

endmodule
