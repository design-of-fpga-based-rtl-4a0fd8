// final_adder: final adder unit, PID_OUT = round(POUT + IOUT' + DOUT').
//
// As in the source design, two adders in a chain (the first with its carry-in
// tied to 0) add the proportional term to the selected integral term, and
// then the selected derivative term. The Q12.8 sum is rounded to the nearest
// integer (half rounds up, toward +infinity) and the 12-bit PID_OUT is its
// integer part. The sum is kept two bits wider than a term so it cannot
// wrap; a rounded value outside the 12-bit range saturates, which is this
// design's choice.
//
// Timing: purely combinational; PID_OUT follows the term latches in the same
// Mclk cycle.
module final_adder
  import pid_pkg::*;
(
  input  term_t pout,
  input  term_t iout_sel,
  input  term_t dout_sel,
  output logic signed [TERM_W+1:0] sum,
  output out_t  pid_out
);

  localparam int unsigned SW = TERM_W + 2;
  localparam logic signed [SW-TERM_FB-1:0] OMAX = (1 <<< (OUT_W-1)) - 1;
  localparam logic signed [SW-TERM_FB-1:0] OMIN = -(1 <<< (OUT_W-1));

  logic signed [SW-1:0]         sum_pi;
  logic signed [SW-1:0]         sum_r;
  logic signed [SW-TERM_FB-1:0] rounded;

  always_comb begin
    sum_pi  = SW'(pout) + SW'(iout_sel);
    sum     = sum_pi + SW'(dout_sel);
    sum_r   = sum + SW'(1 << (TERM_FB-1));
    rounded = sum_r[SW-1:TERM_FB];
    if (rounded > OMAX)      pid_out = out_t'(OMAX);
    else if (rounded < OMIN) pid_out = out_t'(OMIN);
    else                     pid_out = out_t'(rounded);
  end

endmodule
