// lgca_chip -- one Lattice Gas Cellular Automaton chip (FHP model).
//
// A wide-serial pipeline stage: each major cycle it takes two lattice sites
// (one 16-bit word of the raster-scanned lattice) and emits two sites
// advanced by one generation. The output word is the one taken ROW_WORDS+1
// major cycles earlier, i.e. one row above and one column behind the input,
// so chips can be chained: every chip sees the same word order and no
// chip needs to know its position.
//
// Inside: two ROW_WORDS-deep line delays in series (the first fed by the
// input word, the second by the first), the neighbourhood generator that
// collects the three word rows around the sites being updated and turns
// outgoing into incoming particle bits, an L update processor for the odd
// site (low byte) and an R processor for the even site (high byte), and a
// parity tree on the output of the second line delay for testing the
// storage. The rule set (C1,C0) goes to both processors.
//
// The organisation, sizes, byte order, L/R split and parity test follow the
// chip description. The chip used two non-overlapping clock phases and
// dynamic storage; this version uses one clock with a step enable, latches
// the input word on step and produces data_out combinationally from the
// registers, valid from the clock edge after step until the next step.
//
// Interface:
//   step       one major cycle (the board's phi1 pulse), one clk wide
//   data_in    odd site in bits 7:0, even site in bits 15:8
//   data_out   updated sites of the word taken ROW_WORDS+1 steps earlier
//   parity_out XOR of the word leaving the second line delay; a word taken
//              in appears there 2*ROW_WORDS-1 steps later
module lgca_chip
  import lgca_pkg::*;
#(
  parameter int unsigned ROW_WORDS = 256
) (
  input  logic        clk,
  input  logic        step,
  input  logic        c1,
  input  logic        c0,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  output logic        parity_out
);

  word_t din_w, sr1_out, sr2_out;
  nbhd_t odd_nb, even_nb;
  site_t odd_q, even_q;

  assign din_w = word_t'(data_in);

  lgca_shift_register #(.DEPTH(ROW_WORDS), .WIDTH(16)) u_sr1 (
    .clk (clk), .en (step), .din (din_w), .dout (sr1_out)
  );

  lgca_shift_register #(.DEPTH(ROW_WORDS), .WIDTH(16)) u_sr2 (
    .clk (clk), .en (step), .din (sr1_out), .dout (sr2_out)
  );

  lgca_neighborhood_gen u_ng (
    .clk (clk), .en (step), .din (din_w), .mid_in (sr1_out), .top_in (sr2_out),
    .odd_nb (odd_nb), .even_nb (even_nb)
  );

  lgca_update_proc #(.RIGHT(1'b0)) u_lproc (
    .nb (odd_nb), .rule_sel ({c1, c0}), .q (odd_q)
  );

  lgca_update_proc #(.RIGHT(1'b1)) u_rproc (
    .nb (even_nb), .rule_sel ({c1, c0}), .q (even_q)
  );

  lgca_parity_gen #(.WIDTH(16)) u_parity (
    .d (sr2_out), .parity (parity_out)
  );

  assign data_out = {even_q, odd_q};

endmodule
