// pid_pkg: number formats, controller modes and shared arithmetic of the
// sampled P/PI/PD/PID controller.
//
// Every quantity in the controller is a two's complement or unsigned
// fixed-point word:
//   SP, Y     8-bit signed integers
//   ERR       16-bit signed Q8.8 (8 integer bits, 8 fraction bits)
//   KP/KI/KD  12-bit unsigned Q4.8, 0 .. 15.996
//   TS        8-bit unsigned Q0.8 seconds, 1 LSB = 3.9 ms, 3.9 .. 996 ms
//   POUT/IOUT/DOUT  20-bit signed Q12.8
//   PID_OUT   12-bit signed integer (the rounded integer part of Q12.8)
//   KS        8-bit unsigned Q0.8 (plant coefficient of the test model)
// The 16-bit error, 12-bit gains, 8-bit TS/SP/Y, 20-bit term outputs and the
// 12-bit output follow the source design; the positions of the binary points in
// the gains, TS, the terms and KS are this design's choice.
//
// The multipliers work in sign-magnitude form: the magnitude of the signed
// operand is multiplied by the unsigned constants, the product is truncated
// to Q12.8 and limited to the 19-bit magnitude range, and a conditional
// two's complement stage restores the sign. This mirrors the "multiplier
// followed by a conditional 2's complement" structure of each term.
package pid_pkg;

  localparam int unsigned SP_W   = 8;
  localparam int unsigned ERR_W  = 16;
  localparam int unsigned ERR_FB = 8;   // fraction bits of ERR
  localparam int unsigned K_W    = 12;
  localparam int unsigned K_FB   = 8;   // fraction bits of KP/KI/KD
  localparam int unsigned TS_W   = 8;
  localparam int unsigned TS_FB  = 8;   // fraction bits of TS (seconds)
  localparam int unsigned TERM_W = 20;
  localparam int unsigned TERM_FB = 8;  // fraction bits of POUT/IOUT/DOUT
  localparam int unsigned OUT_W  = 12;
  localparam int unsigned KS_W   = 8;

  typedef logic signed [SP_W-1:0]   sample_t;  // SP, Y
  typedef logic signed [ERR_W-1:0]  err_t;     // ERR, Q8.8
  typedef logic        [K_W-1:0]    gain_t;    // KP/KI/KD, Q4.8
  typedef logic        [TS_W-1:0]   ts_t;      // TS, Q0.8 seconds
  typedef logic signed [TERM_W-1:0] term_t;    // POUT/IOUT/DOUT, Q12.8
  typedef logic        [TERM_W-1:0] quot_t;    // KD/TS, unsigned Q12.8
  typedef logic signed [OUT_W-1:0]  out_t;     // PID_OUT
  typedef logic        [KS_W-1:0]   ks_t;      // KS, Q0.8

  // Controller structure selected by {DC, IC} (structure table of the source design).
  typedef enum logic [1:0] {
    MODE_P   = 2'b00,
    MODE_PI  = 2'b01,
    MODE_PD  = 2'b10,
    MODE_PID = 2'b11
  } mode_e;

  localparam term_t TERM_MAX = term_t'((1 << (TERM_W-1)) - 1);
  localparam term_t TERM_MIN = term_t'(-(1 << (TERM_W-1)) + 1);

  // Magnitude of a Q8.8 error (fits 16 unsigned bits, including -32768).
  function automatic logic [ERR_W-1:0] err_mag(input err_t e);
    return e[ERR_W-1] ? ERR_W'(-e) : ERR_W'(e);
  endfunction

  // Limit an unsigned magnitude (already scaled to Q12.8) to TERM_W-1 bits
  // and apply the sign of the operand: the conditional 2's complement stage.
  function automatic term_t signed_term(input logic [39:0] mag, input logic neg);
    logic [TERM_W-2:0] lim;
    lim = (mag > 40'(TERM_MAX)) ? TERM_MAX[TERM_W-2:0] : mag[TERM_W-2:0];
    return neg ? -term_t'({1'b0, lim}) : term_t'({1'b0, lim});
  endfunction

  // Saturating add of two Q12.8 terms.
  function automatic term_t sat_add(input term_t a, input term_t b);
    logic signed [TERM_W:0] s;
    s = {a[TERM_W-1], a} + {b[TERM_W-1], b};
    if (s > (TERM_W+1)'(TERM_MAX))      return TERM_MAX;
    else if (s < (TERM_W+1)'(TERM_MIN)) return TERM_MIN;
    else                                 return term_t'(s);
  endfunction

endpackage
