// id_latch_select: I/D latch select, which sets the controller structure.
//
// The source design selects the structure with two input bits, DC (D controller
// latch enable) and IC (I controller latch enable):
//   DC IC = 00 P, 01 PI, 10 PD, 11 PID.
// Each enable gates a 20-bit latch between its term and the final adder.
// Here a disabled latch is cleared to zero rather than left holding an old
// value, so that a term that is switched off contributes nothing to the sum
// (this design's reading of "latch enable"). The I and D controllers keep
// running while their latch is disabled, as in the source design, where DC and IC
// reach only this block.
//
// Timing: both latches load on the Mclk edge with en high (out_en, one
// sample after the terms were latched). mode reports the structure that the
// latched values belong to. Synchronous active high reset clears both.
module id_latch_select
  import pid_pkg::*;
(
  input  logic  mclk,
  input  logic  rst,
  input  logic  en,
  input  logic  dc,
  input  logic  ic,
  input  term_t iout,
  input  term_t dout,
  output term_t iout_sel,
  output term_t dout_sel,
  output mode_e mode
);

  always_ff @(posedge mclk) begin
    if (rst) begin
      iout_sel <= '0;
      dout_sel <= '0;
      mode     <= MODE_P;
    end else if (en) begin
      iout_sel <= ic ? iout : '0;
      dout_sel <= dc ? dout : '0;
      mode     <= mode_e'({dc, ic});
    end
  end

endmodule
