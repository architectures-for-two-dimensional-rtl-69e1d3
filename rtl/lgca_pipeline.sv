// lgca_pipeline -- a chain of NCHIPS LGCA chips.
//
// Each chip's output feeds the next chip's input, so a word leaving the
// last chip has been advanced NCHIPS generations. All chips share the step
// pulse and the rule-set lines, as the board distributes them. A chip
// takes, on each step, the word its predecessor produced on the previous
// step, so each hop between chips adds one step to the chips' own
// ROW_WORDS+1: the word leaving the last chip after step n is the word
// that entered at step n-L, L = NCHIPS*(ROW_WORDS+2)-1, advanced NCHIPS
// generations. Throughput is two site updates per chip per step, so it
// grows linearly with NCHIPS.
//
// Interface: step advances every chip by one major cycle; data_in enters
// the first chip; data_out is the last chip's output; parity_out brings out
// every chip's parity pin (bit i is chip i).
module lgca_pipeline #(
  parameter int unsigned NCHIPS    = 10,
  parameter int unsigned ROW_WORDS = 256
) (
  input  logic              clk,
  input  logic              step,
  input  logic              c1,
  input  logic              c0,
  input  logic [15:0]       data_in,
  output logic [15:0]       data_out,
  output logic [NCHIPS-1:0] parity_out
);

  logic [15:0] link_w [NCHIPS+1];

  assign link_w[0] = data_in;

  for (genvar i = 0; i < NCHIPS; i++) begin : g_chip
    lgca_chip #(.ROW_WORDS(ROW_WORDS)) u_chip (
      .clk        (clk),
      .step       (step),
      .c1         (c1),
      .c0         (c0),
      .data_in    (link_w[i]),
      .data_out   (link_w[i+1]),
      .parity_out (parity_out[i])
    );
  end

  assign data_out = link_w[NCHIPS];

endmodule
