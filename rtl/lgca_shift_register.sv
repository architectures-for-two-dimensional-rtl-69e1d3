// lgca_shift_register -- line delay of the LGCA chip.
//
// A DEPTH-stage, WIDTH-bit shift register: every enabled clock it takes one
// stream word and emits the word taken DEPTH enables earlier, i.e. the word
// in the same column of the previous row when DEPTH equals the row length.
// As on the chip, it is built as two halves of DEPTH/2 stages in series (the
// chip folded its 256 stages into two 128-stage columns so that the end of
// the first column sits next to the start of the second).
//
// The chip's storage was dynamic master-slave cells clocked by two phases;
// here each stage is an edge-triggered register with a shift enable. The
// storage has no reset: like the dynamic cells it holds garbage until the
// stream has flushed through it.
//
// Timing: after the enabled edge that takes word x, dout shows the word
// taken DEPTH-1 edges before x (dout is the last stage's content).
module lgca_shift_register #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned HALF = DEPTH / 2;

  logic [WIDTH-1:0] col_a [HALF];           // first column, fed from din
  logic [WIDTH-1:0] col_b [DEPTH - HALF];   // second column, fed from col_a

  always_ff @(posedge clk) begin
    if (en) begin
      col_a[0] <= din;
      for (int unsigned i = 1; i < HALF; i++) col_a[i] <= col_a[i-1];
      col_b[0] <= col_a[HALF-1];
      for (int unsigned i = 1; i < DEPTH - HALF; i++) col_b[i] <= col_b[i-1];
    end
  end

  assign dout = col_b[DEPTH-HALF-1];

endmodule
