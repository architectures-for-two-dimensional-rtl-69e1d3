// proto_clock_gen -- multi-phase clock generator of the prototyping board.
//
// On start it runs one major cycle: NPHASES clock phases, one after the
// other, each lasting per master-clock periods. A phase is high for all
// but the last master clock of its slot, so consecutive phases are
// separated by one master clock and never overlap. At the end of each slot
// slot_end[i] pulses for one master clock (used to latch output registers
// on the falling edge of the chosen phase); done pulses with the last one.
// busy is high from start to done.
//
// How it works: a down-counter divides the free-running master clock by
// per (the programmable divide-by-n time base); a slot counter steps
// through the phases. per is sampled when the cycle starts. With the
// default 40 MHz master clock (25 ns) and per = 2..20 the phase length is
// 50..500 ns in 25 ns steps.
//
// The programmable divider on a crystal clock, the 50-500 ns range in 25 ns
// steps, equal phase periods and 2/4/8/16 non-overlapping phases follow the
// board proposal. The one-master-clock gap, the per-phase slot order, the
// sampling of per and the slot_end/done outputs are this design's own.
//
// Interface: clk master clock, start (level or pulse; sampled when idle),
// per (master clocks per phase; below 2 acts as 2, above 20 as 20), phase[15:0]
// (bits NPHASES-1..0 used, the rest stay 0).
module proto_clock_gen #(
  parameter int unsigned NPHASES = 4      // 2, 4, 8 or 16 (jumper block)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [4:0]         per,
  output logic [15:0]        phase,
  output logic [NPHASES-1:0] slot_end,
  output logic               done,
  output logic               busy
);

  localparam int SW = (NPHASES > 1) ? $clog2(NPHASES) : 1;

  logic [4:0]    cnt;      // master clocks left in the slot, minus one
  logic [4:0]    per_q;
  logic [4:0]    per_c;    // per limited to 2..20

  assign per_c = (per < 5'd2) ? 5'd2 : (per > 5'd20) ? 5'd20 : per;
  logic [SW-1:0] slot;
  logic          last;

  assign last = busy && (cnt == 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      per_q <= 5'd2;
      slot  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        per_q <= per_c;
        cnt   <= per_c - 5'd1;
        slot  <= '0;
      end
    end else if (last) begin
      if (slot == SW'(NPHASES - 1)) begin
        busy <= 1'b0;
      end else begin
        slot <= slot + 1'b1;
        cnt  <= per_q - 5'd1;
      end
    end else begin
      cnt <= cnt - 5'd1;
    end
  end

  always_comb begin
    phase    = '0;
    slot_end = '0;
    if (busy) begin
      phase[int'(slot)]    = !last;
      slot_end[int'(slot)] = last;
    end
    done = last && (slot == SW'(NPHASES - 1));
  end

  // at most one phase high at a time
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(phase));

endmodule
