// lgm1_regs -- host-visible registers of the LGM-1 interface board.
//
//   data_in   (base+0) read/write; always drives the first chip's input.
//   data_out  (base+2) read only from the bus; loaded from the last chip's
//             output when the clock state machine pulses latch_out.
//   control   (base+4) bit 0 START, bit 1 C0, bit 2 C1 (read/write),
//             bit 3 RUNNING (read only), other bits read as 0.
// The host writes a word to data_in, sets START, then reads data_out. The
// clock state machine clears START (clr_start) after latching the result,
// so START reads 1 until the result is in data_out. C1,C0 go to every chip
// as the rule-set select.
//
// The register map and control bits follow the board description. That
// data_out ignores bus writes follows the schematic note that it has no
// feedback input; the RUNNING bit, the reset values (all zero) and that a
// clear of START wins over a simultaneous bus write are this design's own.
//
// Timing: writes take effect on the clk edge of wr_stb; rdata is
// combinational from the selects.
module lgm1_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel_din,
  input  logic        sel_dout,
  input  logic        sel_ctrl,
  input  logic        wr_stb,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  input  logic [15:0] array_out,
  input  logic        latch_out,
  input  logic        clr_start,
  input  logic        running,
  output logic [15:0] array_in,
  output logic        start,
  output logic        c0,
  output logic        c1
);

  logic [15:0] data_in_q, data_out_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_in_q  <= '0;
      data_out_q <= '0;
      start      <= 1'b0;
      c0         <= 1'b0;
      c1         <= 1'b0;
    end else begin
      if (wr_stb && sel_din) data_in_q <= wdata;
      if (wr_stb && sel_ctrl) begin
        start <= wdata[0];
        c0    <= wdata[1];
        c1    <= wdata[2];
      end
      if (clr_start) start <= 1'b0;
      if (latch_out) data_out_q <= array_out;
    end
  end

  always_comb begin
    rdata = '0;
    if (sel_din)  rdata = data_in_q;
    if (sel_dout) rdata = data_out_q;
    if (sel_ctrl) rdata = {12'h000, running, c1, c0, start};
  end

  assign array_in = data_in_q;

endmodule
