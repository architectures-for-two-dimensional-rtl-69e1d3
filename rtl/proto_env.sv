// proto_env -- master board of the proposed prototyping environment for
// linear systolic arrays and pipelines.
//
// A memory-mapped VMEbus slave that gives any pipelined special-purpose
// chip the host loop "write data, start, read result". It holds:
//   offset  0, 4, 8, 12  ir_0..ir_3    input registers, drive dev_in[0..3]
//   offset 16, 20, 24, 28 or_0..or_3   output registers, loaded from
//                                      dev_out[0..3] at the end of a phase
//   offset 32  ck_per     clock period: master clocks (25 ns) per phase
//   offset 36  ctl_state  bit 0 START (write 1 to run one major cycle,
//                         cleared when it ends), bit 1 RUNNING, bit 2 IDLE
//   offset 40  ctl_user   32 bits driven to the chips' control pins
// All registers are 32 bits, read/write (RUNNING and IDLE read only), and
// are accessed as aligned 32-bit words. The board answers in an 8 KB page
// whose base is set by switches (base_sw = A31..A13) in either the 24-bit
// space (a32_sw = 0, A23..A13 compared) or the 32-bit space (a32_sw = 1).
//
// How it works: the bus strobes are synchronised with two flip-flops; the
// page match, address modifier and LWORD* (a 32-bit transfer needs both
// data strobes and LWORD* low) qualify the cycle; DTACK* follows two
// master clocks later and is released when the strobes go away. A write to
// ctl_state with bit 0 set starts proto_clock_gen, which runs NPHASES
// non-overlapping phases of ck_per master clocks each. Output register j
// is loaded at the end of phase LATCH_PHASE[j]. At the end of the major
// cycle START is cleared.
//
// The register set, the 8 KB page, the choice of address spaces, the clock
// range and the 2/4/8/16 phases follow the board proposal, with the
// register offsets of its software header. The jumper choices (phase count,
// latch phase per output register) are parameters. The AM codes accepted,
// the DTACK timing, the status bit positions, the reset values and that a
// cycle's end wins over a simultaneous bus write to START are this
// design's own. The line drivers and receivers to the slave boards are
// wires here (dev_in, dev_ctl, phase out; dev_out in).
module proto_env #(
  parameter int unsigned NPHASES = 4,
  parameter int unsigned LATCH_PHASE [4] = '{NPHASES - 1, NPHASES - 1, NPHASES - 1, NPHASES - 1}
) (
  input  logic        clk,            // 40 MHz master clock (crystal)
  input  logic        rst_n,
  // VMEbus slave
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_lword_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_addr,
  input  logic [31:0] vme_data_w,
  output logic [31:0] vme_data_r,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // base address switches
  input  logic [31:13] base_sw,
  input  logic        a32_sw,
  // to and from the special-purpose chips
  output logic [31:0] dev_in [4],
  input  logic [31:0] dev_out [4],
  output logic [31:0] dev_ctl,
  output logic [15:0] phase
);

  // ---- bus cycle detection ----
  logic [1:0] as_s, ds_s;
  logic       strobes, page_hit, am_ok, sel, ack_q, wr_stb, rd_en;
  logic [1:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= 2'b00;
      ds_s <= 2'b00;
    end else begin
      as_s <= {as_s[0], !vme_as_n};
      ds_s <= {ds_s[0], !vme_ds_n[1] && !vme_ds_n[0]};
    end
  end
  assign strobes = as_s[1] && ds_s[1];

  // AM 0x09/0x0A/0x0D/0x0E (A32) or 0x39/0x3A/0x3D/0x3E (A24): data or
  // program, user or supervisor (AM2 selects between the last two, so it
  // is not decoded)
  assign am_ok    = (vme_am[5:3] == (a32_sw ? 3'b001 : 3'b111)) && (vme_am[1:0] inside {2'b01, 2'b10});
  assign page_hit = a32_sw ? (vme_addr[31:13] == base_sw)
                           : (vme_addr[23:13] == base_sw[23:13]);
  assign sel      = strobes && am_ok && page_hit && !vme_lword_n && !vme_addr[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly   <= '0;
      ack_q <= 1'b0;
    end else begin
      dly   <= sel ? {dly[0], 1'b1} : 2'b00;
      ack_q <= sel && dly[1];
    end
  end
  assign vme_dtack_n = !ack_q;
  assign wr_stb      = sel && dly[1] && !ack_q && !vme_write_n;
  assign rd_en       = sel && vme_write_n;

  // ---- registers ----
  logic [31:0] ir [4];
  logic [31:0] orr [4];
  logic [4:0]  ck_per;
  logic        start;
  logic [31:0] ctl_user;
  logic [3:0]  idx;
  logic [NPHASES-1:0] slot_end;
  logic        done, busy;

  assign idx = vme_addr[5:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        ir[i]  <= '0;
        orr[i] <= '0;
      end
      ck_per   <= 5'd20;
      start    <= 1'b0;
      ctl_user <= '0;
    end else begin
      if (wr_stb && vme_addr[12:6] == '0) begin
        case (idx)
          4'd0, 4'd1, 4'd2, 4'd3: ir[idx[1:0]]  <= vme_data_w;
          4'd4, 4'd5, 4'd6, 4'd7: orr[idx[1:0]] <= vme_data_w;
          4'd8:  ck_per   <= vme_data_w[4:0];
          4'd9:  start    <= vme_data_w[0];
          4'd10: ctl_user <= vme_data_w;
          default: ;
        endcase
      end
      for (int j = 0; j < 4; j++)
        if (slot_end[LATCH_PHASE[j]]) orr[j] <= dev_out[j];
      if (done) start <= 1'b0;
    end
  end

  always_comb begin
    vme_data_r = '0;
    if (rd_en && vme_addr[12:6] == '0) begin
      case (idx)
        4'd0, 4'd1, 4'd2, 4'd3: vme_data_r = ir[idx[1:0]];
        4'd4, 4'd5, 4'd6, 4'd7: vme_data_r = orr[idx[1:0]];
        4'd8:  vme_data_r = {27'd0, ck_per};
        4'd9:  vme_data_r = {29'd0, !busy, busy, start};
        4'd10: vme_data_r = ctl_user;
        default: ;
      endcase
    end
  end
  assign vme_data_oe = rd_en;

  assign dev_in  = ir;
  assign dev_ctl = ctl_user;

  // the latch phases chosen must exist
  for (genvar j = 0; j < 4; j++) begin : g_latch_chk
    if (LATCH_PHASE[j] >= NPHASES) begin : g_bad
      $error("LATCH_PHASE out of range");
    end
  end

  // ---- clock generator and state machine ----
  proto_clock_gen #(.NPHASES(NPHASES)) u_clk (
    .clk (clk), .rst_n (rst_n), .start (start && !done), .per (ck_per),
    .phase (phase), .slot_end (slot_end), .done (done), .busy (busy)
  );

endmodule
