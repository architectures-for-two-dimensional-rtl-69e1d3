// lgca_parity_gen -- test parity tree of the LGCA chip.
//
// XOR of all WIDTH bits of the word leaving the chip's second shift
// register, built as a balanced tree of two-input XORs as on the chip. A
// tester sends words through both shift registers and compares this bit
// with the parity of what it sent; a stuck-at cell in the storage shows up
// as a mismatch. The output is 1 when the word holds an odd number of ones
// (the polarity is this design's choice).
//
// Interface: combinational, d in, parity out.
module lgca_parity_gen #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] d,
  output logic             parity
);

  // smallest power of two >= WIDTH, padded with zeros
  localparam int unsigned N = 1 << $clog2(WIDTH);

  logic [N-1:0] lvl;

  always_comb begin
    lvl = '0;
    lvl[WIDTH-1:0] = d;
    // each pass folds the upper half onto the lower half: one tree level
    for (int unsigned w = N / 2; w >= 1; w = w / 2) begin
      for (int unsigned i = 0; i < w; i++) lvl[i] = lvl[2*i] ^ lvl[2*i+1];
    end
    parity = lvl[0];
  end

endmodule
