// clock_control: main clock control unit of the controller.
//
// A chain of STAGES flip-flops counts Mclk cycles and divides Mclk by
// 2**STAGES (32 with the default of five stages, as the source design gives), so
// that one sampling period of the controller is 32 Mclk cycles long. The
// source design builds the divider from serially connected D flip-flops; here the
// same five bits form a synchronous counter so that every register of the
// design runs on Mclk and the divided clock is used only as a set of
// one-cycle enables, never as a clock. clk_out is the divided clock itself
// (the counter's top bit, Mclk/32, 50 % duty) for observation.
//
// The phase enables sequence one sample period (this design's choice):
//   phase 0          div_start  start of the KD/TS division (needs <= 21 cycles)
//   phase PERIOD-4   err_en     error latch captures ERR(k) = SP - Y
//   phase PERIOD-3   ctrl_en    P, I and D latches capture their terms
//   phase PERIOD-2   out_en     I/D select latches capture; PID_OUT valid after
//   phase PERIOD-1   plant_en   test model captures Y(k) from PID_OUT
// Each enable is high for exactly one Mclk cycle per period. Reset is
// synchronous and active high, and returns the count to 0.
module clock_control #(
  parameter int unsigned STAGES = 5
) (
  input  logic              mclk,
  input  logic              rst,
  output logic [STAGES-1:0] phase,
  output logic              clk_out,
  output logic              div_start,
  output logic              err_en,
  output logic              ctrl_en,
  output logic              out_en,
  output logic              plant_en
);

  localparam logic [STAGES-1:0] LAST = '1;

  logic [STAGES-1:0] cnt;

  // Bit i toggles when all lower bits are 1: the divide-by-two chain.
  always_ff @(posedge mclk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign phase     = cnt;
  assign clk_out   = cnt[STAGES-1];
  assign div_start = (cnt == '0);
  assign err_en    = (cnt == LAST - 3);
  assign ctrl_en   = (cnt == LAST - 2);
  assign out_en    = (cnt == LAST - 1);
  assign plant_en  = (cnt == LAST);

  // The KD/TS division started at phase 0 must be finished before ctrl_en.
  initial assert (STAGES >= 5)
    else $error("clock_control: STAGES must be >= 5 to fit the divider");

endmodule
