// lgm1_top -- LGM-1 lattice-gas machine: VME interface board plus a
// pipeline of LGCA chips.
//
// A host on the VMEbus streams the raster-scanned lattice through the chip
// pipeline one word (two sites) at a time: write the word to data_in, write
// START (with the rule set in C1,C0) to the control register, read the
// updated word from data_out. Each START runs one major cycle: the clock
// state machine gives the chips non-overlapping phi1/phi2 phases (the chips
// take data_in on phi1) and then latches the last chip's output into
// data_out. The word read back after a START is the one written
// NCHIPS*(ROW_WORDS+2)-1 STARTs earlier, advanced NCHIPS generations; the
// host fills the pipeline first and flushes it at the end with filler words.
//
// Blocks: lgm1_vme_slave (address match, register decode, DTACK),
// lgm1_regs (data_in, data_out, control/status), lgm1_clock_div (SYSCLK/4
// board clock enable), lgm1_clock_fsm (major-cycle sequencer),
// lgca_pipeline (NCHIPS chained lgca_chip). The VME data lines are split
// into an input bus, an output bus and an output enable; the board's
// buffers and transceivers are wires here. Each chip's parity test pin is
// brought out, as are the phases for observation.
//
// Beside the machine sits lgca_boundary_proc, the edge-site refresher
// proposed as an extra pipeline stage for pipelines longer than ten chips.
// It is not inserted into the ten-chip pipeline (which behaves as built);
// it has its own bp_* ports and shares only clk and rst_n, so it can be
// tested or chained with chips outside.
//
// Also beside it, on pe_* ports with its own master clock pe_clk, is
// proto_env: the master board of the proposed general prototyping
// environment (32-bit registers, programmable multi-phase clock), a
// separate design that shares only rst_n.
module lgm1_top #(
  parameter int unsigned NCHIPS       = 10,
  parameter int unsigned ROW_WORDS    = 256,
  parameter logic [15:0] BASE_ADDR_HI = 16'hDFC0,
  parameter int unsigned DTACK_TAP    = 3
) (
  input  logic              clk,          // SYSCLK
  input  logic              rst_n,
  input  logic              vme_as_n,
  input  logic [1:0]        vme_ds_n,
  input  logic              vme_write_n,
  input  logic [5:0]        vme_am,
  input  logic [23:1]       vme_addr,
  input  logic [15:0]       vme_data_w,
  output logic [15:0]       vme_data_r,
  output logic              vme_data_oe,
  output logic              vme_dtack_n,
  output logic              phi1,
  output logic              phi2,
  output logic [NCHIPS-1:0] parity_out,
  // edge-site refresher
  input  logic              bp_step,
  input  logic              bp_sync,
  input  logic              bp_en,
  input  logic [7:0]        bp_thr [1:6],
  input  logic [15:0]       bp_data_in,
  output logic [15:0]       bp_data_out,
  output logic              bp_edge,
  // prototyping environment master board
  input  logic              pe_clk,
  input  logic              pe_as_n,
  input  logic [1:0]        pe_ds_n,
  input  logic              pe_lword_n,
  input  logic              pe_write_n,
  input  logic [5:0]        pe_am,
  input  logic [31:1]       pe_addr,
  input  logic [31:0]       pe_data_w,
  output logic [31:0]       pe_data_r,
  output logic              pe_data_oe,
  output logic              pe_dtack_n,
  input  logic [31:13]      pe_base_sw,
  input  logic              pe_a32_sw,
  output logic [31:0]       pe_dev_in [4],
  input  logic [31:0]       pe_dev_out [4],
  output logic [31:0]       pe_dev_ctl,
  output logic [15:0]       pe_phase
);

  logic        sel_din, sel_dout, sel_ctrl, wr_stb, rd_en;
  logic        bdclk, bdclk_en;
  logic        start, c0, c1;
  logic        step, latch_out, clr_start, running;
  logic [15:0] array_in, array_out, rdata;

  lgm1_vme_slave #(.BASE_ADDR_HI(BASE_ADDR_HI), .DTACK_TAP(DTACK_TAP)) u_vme (
    .clk (clk), .rst_n (rst_n),
    .vme_as_n (vme_as_n), .vme_ds_n (vme_ds_n), .vme_write_n (vme_write_n),
    .vme_am (vme_am), .vme_addr (vme_addr), .vme_dtack_n (vme_dtack_n),
    .sel_din (sel_din), .sel_dout (sel_dout), .sel_ctrl (sel_ctrl),
    .wr_stb (wr_stb), .rd_en (rd_en)
  );

  lgm1_regs u_regs (
    .clk (clk), .rst_n (rst_n),
    .sel_din (sel_din), .sel_dout (sel_dout), .sel_ctrl (sel_ctrl),
    .wr_stb (wr_stb), .wdata (vme_data_w), .rdata (rdata),
    .array_out (array_out), .latch_out (latch_out), .clr_start (clr_start),
    .running (running), .array_in (array_in),
    .start (start), .c0 (c0), .c1 (c1)
  );

  lgm1_clock_div u_div (
    .clk (clk), .bdclk (bdclk), .bdclk_en (bdclk_en)
  );

  lgm1_clock_fsm #(.PHASE_TICKS(1)) u_fsm (
    .clk (clk), .rst_n (rst_n), .tick (bdclk_en), .start (start),
    .phi1 (phi1), .phi2 (phi2), .step (step),
    .latch_out (latch_out), .clr_start (clr_start), .running (running)
  );

  lgca_pipeline #(.NCHIPS(NCHIPS), .ROW_WORDS(ROW_WORDS)) u_pipe (
    .clk (clk), .step (step), .c1 (c1), .c0 (c0),
    .data_in (array_in), .data_out (array_out), .parity_out (parity_out)
  );

  lgca_boundary_proc #(.ROW_WORDS(ROW_WORDS)) u_bp (
    .clk (clk), .rst_n (rst_n), .step (bp_step), .sync (bp_sync), .en (bp_en),
    .thr (bp_thr), .data_in (bp_data_in), .data_out (bp_data_out), .edge_out (bp_edge)
  );

  proto_env u_pe (
    .clk (pe_clk), .rst_n (rst_n), .vme_as_n (pe_as_n), .vme_ds_n (pe_ds_n),
    .vme_lword_n (pe_lword_n), .vme_write_n (pe_write_n), .vme_am (pe_am),
    .vme_addr (pe_addr), .vme_data_w (pe_data_w), .vme_data_r (pe_data_r),
    .vme_data_oe (pe_data_oe), .vme_dtack_n (pe_dtack_n), .base_sw (pe_base_sw),
    .a32_sw (pe_a32_sw), .dev_in (pe_dev_in), .dev_out (pe_dev_out),
    .dev_ctl (pe_dev_ctl), .phase (pe_phase)
  );

  assign vme_data_r  = rd_en ? rdata : 16'h0000;
  assign vme_data_oe = rd_en;

  // bdclk itself is only a board test point in this version
  logic unused_bdclk;
  assign unused_bdclk = bdclk;

endmodule
