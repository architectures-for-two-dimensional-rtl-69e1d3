// lgm1_clock_fsm -- clock state machine of the LGM-1 control path.
//
// When the host sets START, the machine puts the LGCA chip array through
// one major cycle and then hands the result to the data_out register:
//   IDLE -> PHI1 -> GAP1 -> PHI2 -> GAP2 -> LATCH -> IDLE
// phi1 and phi2 are high only in their own states, with a gap state
// between them, so the two phases never overlap. step is a one-clk pulse
// on entering PHI1; the chips take their input word on it. In LATCH the
// array output is loaded into data_out (latch_out) and START is cleared
// (clr_start) so the machine does not run again until the host writes
// START once more. running is the "processor running" status.
//
// The machine advances only on tick (the board clock enable), so each
// state lasts one board clock period; PHI1 and PHI2 last PHASE_TICKS board
// clocks. What the machine must do (non-overlapping phases, latch, clear
// START) follows the board description; the state encoding and the gap
// states are this design's own.
//
// Timing with PHASE_TICKS=1: START seen at a tick -> 5 more ticks until
// latch_out/clr_start, i.e. 6 board clocks per major cycle.
module lgm1_clock_fsm #(
  parameter int unsigned PHASE_TICKS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  logic start,
  output logic phi1,
  output logic phi2,
  output logic step,
  output logic latch_out,
  output logic clr_start,
  output logic running
);

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_PHI1  = 3'd1,
    S_GAP1  = 3'd2,
    S_PHI2  = 3'd3,
    S_GAP2  = 3'd4,
    S_LATCH = 3'd5
  } state_e;

  localparam int unsigned CW = (PHASE_TICKS > 1) ? $clog2(PHASE_TICKS) : 1;

  state_e          state;
  logic [CW-1:0]   cnt;
  logic            phase_done;

  assign phase_done = (cnt == CW'(PHASE_TICKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      step  <= 1'b0;
    end else begin
      step <= 1'b0;
      if (tick) begin
        unique case (state)
          S_IDLE:  if (start) begin
                     state <= S_PHI1;
                     cnt   <= '0;
                     step  <= 1'b1;
                   end
          S_PHI1:  if (phase_done) state <= S_GAP1;
                   else            cnt   <= cnt + 1'b1;
          S_GAP1:  begin state <= S_PHI2; cnt <= '0; end
          S_PHI2:  if (phase_done) state <= S_GAP2;
                   else            cnt   <= cnt + 1'b1;
          S_GAP2:  state <= S_LATCH;
          S_LATCH: state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign phi1      = (state == S_PHI1);
  assign phi2      = (state == S_PHI2);
  assign latch_out = (state == S_LATCH) && tick;
  assign clr_start = latch_out;
  assign running   = (state != S_IDLE);

  // the two chip phases must never be high together
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) !(phi1 && phi2));

endmodule
