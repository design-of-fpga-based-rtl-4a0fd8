// kd_ts_divider: sequential divider for the first stage of the D term,
// Q = KD / TS.
//
// The source design's D controller divides KD by TS in its first stage with a
// sequential divider, and that divider is the reason one sampling period
// lasts 32 Mclk cycles. This is a radix-2 restoring divider (the simplest
// one; the source design does not show its insides). The dividend is KD (Q4.8)
// shifted left by 8 bits, the divisor is TS (Q0.8 seconds), so the 20-bit
// quotient is KD/TS in unsigned Q12.8. One quotient bit is produced per Mclk
// cycle. A divisor of zero yields an all-ones quotient (the largest value).
//
// Interface and timing: a one-cycle start pulse samples kd and ts; busy is
// high for the next QW (20) cycles; in the last of them done pulses and quot
// is loaded, holding its value until the next division completes. start is
// ignored while busy. Synchronous active high reset clears quot to 0.
module kd_ts_divider
  import pid_pkg::*;
(
  input  logic  mclk,
  input  logic  rst,
  input  logic  start,
  input  gain_t kd,
  input  ts_t   ts,
  output logic  busy,
  output logic  done,
  output quot_t quot
);

  localparam int unsigned QW = TERM_W;   // quotient bits = cycles per division

  logic [TS_W:0]         rem;       // partial remainder, one bit wider than TS
  logic [QW-1:0]         q;         // dividend shifting out, quotient shifting in
  ts_t                   dvs;
  logic [$clog2(QW+1)-1:0] left;    // iterations still to go

  logic [TS_W:0] rem_sh;
  logic [TS_W:0] trial;
  logic          fits;

  always_comb begin
    rem_sh = {rem[TS_W-1:0], q[QW-1]};
    trial  = rem_sh - {1'b0, dvs};
    fits   = (rem_sh >= {1'b0, dvs});
  end

  always_ff @(posedge mclk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      left <= '0;
      rem  <= '0;
      q    <= '0;
      dvs  <= '0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          left <= QW[$clog2(QW+1)-1:0];
          rem  <= '0;
          q    <= {kd, {K_FB{1'b0}}};
          dvs  <= ts;
        end
      end else begin
        rem  <= fits ? trial : rem_sh;
        q    <= {q[QW-2:0], fits};
        left <= left - 1'b1;
        if (left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= {q[QW-2:0], fits};
        end
      end
    end
  end

  // A division is never requested while one is in progress.
  assert property (@(posedge mclk) disable iff (rst) start |-> !busy)
    else $error("kd_ts_divider: start while busy");

endmodule
