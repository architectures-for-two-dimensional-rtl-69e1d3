// lgca_boundary_proc -- edge-site refresher for the LGCA pipeline.
//
// A pipeline stage that can sit between LGCA chips. It passes the word
// stream through unchanged, except that words on the left and right sides
// of the lattice are replaced by freshly drawn fluid. Each of the six links
// of both sites in such a word is set independently with a probability
// given by that link's threshold. This lets the side links see particles as
// if the lattice were surrounded by fluid flowing with a chosen velocity,
// even deep inside a long pipeline that the host cannot reach.
//
// How it works: a column counter follows the raster scan (it is cleared by
// sync on the first word of the lattice and counts 0..ROW_WORDS-1 on each
// step), so a word is an edge word when its column is 0 or ROW_WORDS-1.
// Twelve 16-bit linear feedback shift registers (one per link per site,
// x^16+x^15+x^13+x^4+1, different seeds) advance once per step. A link bit
// is 1 when the low byte of its register does not exceed the link's
// threshold, i.e. with probability (thr+1)/256. Replaced sites get B=0 and
// C=0.
//
// Counting sites to find the edges, and weighted bits made by comparing
// a pseudo-random word with a threshold, follow the proposal for this
// processor. The LFSR polynomial and seeds, 8-bit thresholds, the per-link
// threshold inputs, replacing both sites of the first and last word of
// each row pair, and the empty rest bit are this design's own choices.
//
// Interface and timing: on a clk edge with step high the stage takes
// data_in and shows the (possibly replaced) word on data_out from that edge
// until the next step, one step of latency, so it can be chained with
// chips like another chip. sync marks data_in as word 0 of the lattice.
// en = 0 turns replacement off (pure delay).
module lgca_boundary_proc
  import lgca_pkg::*;
#(
  parameter int unsigned ROW_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  input  logic        sync,
  input  logic        en,
  input  logic [7:0]  thr [1:6],   // per-link occupation threshold
  input  word_t       data_in,
  output word_t       data_out,
  output logic        edge_out     // data_out is a replaced edge word
);

  localparam int CW = $clog2(ROW_WORDS);

  logic [CW-1:0] col;
  logic [15:0]   lfsr [12];
  logic          is_edge;
  site_t         fresh [2];

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction

  assign is_edge = en && (col == '0 || col == CW'(ROW_WORDS - 1));

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      fresh[h].b = 1'b0;
      fresh[h].c = 1'b0;
      for (int k = 1; k <= 6; k++)
        fresh[h].link[k] = (lfsr[h * 6 + k - 1][7:0] <= thr[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col      <= '0;
      data_out <= '0;
      edge_out <= 1'b0;
      for (int i = 0; i < 12; i++) lfsr[i] <= 16'hACE1 ^ 16'(i * 16'h1F35);
    end else if (step) begin
      // column of the word being taken now
      col      <= (sync || col == CW'(ROW_WORDS - 1)) ? CW'(sync ? 1 : 0) : col + 1'b1;
      edge_out <= en && (sync || is_edge);
      if (en && (sync || is_edge)) data_out <= '{even: fresh[1], odd: fresh[0]};
      else                         data_out <= data_in;
      for (int i = 0; i < 12; i++) lfsr[i] <= lfsr_next(lfsr[i]);
    end
  end

endmodule
