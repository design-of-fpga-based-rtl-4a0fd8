// p_controller: proportional term, POUT(k) = KP * ERR(k).
//
// Structure as in the source design: a multiplier, a conditional two's complement
// stage that negates only when the product must be negative, and a 20-bit
// latch that holds POUT for the final adder. The multiplier here takes the
// magnitude of ERR (Q8.8) times KP (unsigned Q4.8), giving a Q12.16
// magnitude that is truncated to Q12.8 and limited to 19 bits before the
// sign is applied (sign-magnitude truncation, i.e. toward zero). The binary
// points and the limiting are this design's choices.
//
// Timing: combinational multiply, result latched on the Mclk edge where en is
// high (the controller's ctrl_en phase). Synchronous active high reset.
module p_controller
  import pid_pkg::*;
(
  input  logic  mclk,
  input  logic  rst,
  input  logic  en,
  input  gain_t kp,
  input  err_t  err,
  output term_t pout
);

  logic [ERR_W+K_W-1:0] prod;   // |ERR| * KP, Q12.16
  term_t                p_next;

  always_comb begin
    prod   = err_mag(err) * kp;
    p_next = signed_term(40'(prod >> K_FB), err[ERR_W-1]);
  end

  always_ff @(posedge mclk) begin
    if (rst)     pout <= '0;
    else if (en) pout <= p_next;
  end

endmodule
