// error_calc: error calculation, ERR(k) = SP - Y(k).
//
// As in the source design, Y is two's complemented and added to SP by an adder
// whose carry-in is tied to 0; the result is held in a 16-bit latch,
// 8 integer bits and 8 fraction bits (Q8.8). SP and Y are 8-bit signed
// integers, so the fraction byte of ERR is always zero here and the integer
// byte carries the difference. The difference of two 8-bit numbers needs
// 9 bits; it is saturated to the Q8.8 range (-128 .. +127.996), which is
// this design's choice as the source design does not say what happens on overflow.
//
// Timing: err is updated on the Mclk edge where en (the sample phase enable)
// is high and holds for the rest of the sample period. Synchronous active
// high reset clears it.
module error_calc
  import pid_pkg::*;
(
  input  logic    mclk,
  input  logic    rst,
  input  logic    en,
  input  sample_t sp,
  input  sample_t y,
  output err_t    err
);

  sample_t             y_neg;   // 2's complement of Y (low 8 bits)
  logic signed [8:0]   diff;    // SP + (-Y), 9 bits
  logic signed [7:0]   diff_sat;

  always_comb begin
    y_neg = -y;
    // 9-bit adder, carry-in 0; -(-128) is handled by the separate sign bit.
    diff  = {sp[7], sp} + ((y == -8'sd128) ? 9'sd128 : {y_neg[7], y_neg});
    if (diff > 9'sd127)       diff_sat = 8'sd127;
    else if (diff < -9'sd128) diff_sat = -8'sd128;
    else                      diff_sat = diff[7:0];
  end

  always_ff @(posedge mclk) begin
    if (rst)     err <= '0;
    else if (en) err <= {diff_sat, {ERR_FB{1'b0}}};
  end

endmodule
