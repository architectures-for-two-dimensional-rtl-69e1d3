// lgm1_vme_slave -- VMEbus slave logic of the LGM-1 interface board.
//
// Decodes a 16-bit-data, 24-bit-address VME slave with three registers:
//   base+0  data_in     base+2  data_out     base+4  control/status
// The board is selected (BDS) while the address strobe and a data strobe
// are asserted, A23..A8 equal the base-address switch setting and the
// address modifier bits AM5..AM3 are all ones (a standard 24-bit access).
// A2,A1 then pick one of the three register selects (A2A1 = 00, 01, 10),
// like a 3-to-8 decoder enabled by BDS; A3..A7 are not decoded, so the
// registers repeat every 8 bytes of the 256-byte window.
//
// DTACK comes from a shift register that is held clear while BDS is low and
// shifts in ones on every SYSCLK while it is high; DTACK* is asserted once
// the ones reach stage DTACK_TAP, i.e. DTACK_TAP+1 SYSCLKs after BDS, and
// released as soon as the master drops its strobes. A write is performed
// by a one-SYSCLK wr_stb on the edge where DTACK asserts.
//
// The address match, AM check, decoder and DTACK delay line follow the
// board schematics; which delay stage drives DTACK is not given and is a
// parameter here. The strobes are synchronised with two flip-flops; the
// address, AM, WRITE* and data lines are used directly because the VME
// protocol holds them stable while the strobes are asserted.
module lgm1_vme_slave #(
  parameter logic [15:0] BASE_ADDR_HI = 16'hDFC0,  // A23..A8 of the base
  parameter int unsigned DTACK_TAP    = 3          // 0..7
) (
  input  logic        clk,          // SYSCLK
  input  logic        rst_n,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,     // DS1*, DS0*
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  output logic        vme_dtack_n,
  output logic        sel_din,
  output logic        sel_dout,
  output logic        sel_ctrl,
  output logic        wr_stb,       // perform the write this cycle
  output logic        rd_en         // board drives the data lines
);

  logic [1:0] as_sync;
  logic [3:0] ds_sync;              // {ds1 stage2, ds0 stage2, ds1 stage1, ds0 stage1}
  logic       bds;
  logic [7:0] dly;                  // '164-style DTACK delay line
  logic       ack_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= 2'b00;
      ds_sync <= 4'b0000;
    end else begin
      as_sync <= {as_sync[0], ~vme_as_n};
      ds_sync <= {ds_sync[1:0], ~vme_ds_n};
    end
  end

  assign bds = as_sync[1] && (ds_sync[3] || ds_sync[2]) &&
               (vme_addr[23:8] == BASE_ADDR_HI) && (vme_am[5:3] == 3'b111);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dly <= '0;
    else if (!bds) dly <= '0;
    else           dly <= {dly[6:0], 1'b1};
  end

  assign ack_next    = bds && !dly[DTACK_TAP] &&
                       ((DTACK_TAP == 0) ? 1'b1 : dly[(DTACK_TAP == 0) ? 0 : DTACK_TAP - 1]);
  assign vme_dtack_n = !(bds && dly[DTACK_TAP]);

  // register decoder, enabled by BDS
  always_comb begin
    sel_din  = bds && (vme_addr[2:1] == 2'b00);
    sel_dout = bds && (vme_addr[2:1] == 2'b01);
    sel_ctrl = bds && (vme_addr[2:1] == 2'b10);
  end

  assign wr_stb = ack_next && !vme_write_n;
  assign rd_en  = bds && vme_write_n;

endmodule
