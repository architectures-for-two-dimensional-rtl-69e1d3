// tb_proto_env -- bus-level test of the prototyping master board.
//
// A VME master model writes and reads every register with 32-bit
// transfers and checks: read-back, that the input registers and user
// control word reach the chip-side outputs, that the board ignores another
// page, the wrong address space, and non-32-bit transfers, and the DTACK*
// delay. It then runs major cycles with ck_per = 1 (limited to 2), 2, 5,
// 31 (limited to 20) and 3. For each cycle a monitor checks that the NPHASES
// phases come in order, never overlap, are high ck_per-1 master clocks
// with a one-clock gap, and that START reads 1 with RUNNING set until the
// cycle ends. dev_out[j] follows a free-running counter, so the value
// latched into output register j shows exactly when it was latched: at the
// end of phase LATCH_PHASE[j] (set to 0, 1, 2, 3 here). Finally the board
// is moved to the 32-bit address space.
`timescale 1ns/1ps
module tb_proto_env;
  localparam int NPH = 4;
  localparam logic [31:0] BASE24 = 32'h00_A4_6000;
  localparam logic [31:0] BASE32 = 32'h7C01_E000;

  logic        clk = 0, rst_n = 0;
  logic        as_n = 1, lword_n = 1, write_n = 1, a32 = 0;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = 6'h39;
  logic [31:1] addr = '0;
  logic [31:0] wdat = '0, rdat;
  logic        doe, dtack_n;
  logic [31:13] base;
  logic [31:0] dev_in [4];
  logic [31:0] dev_out [4];
  logic [31:0] dev_ctl;
  logic [15:0] phase;
  logic [31:0] ticks = 0;
  int checks = 0, failures = 0, n_cycles = 0, n_ignored = 0, n_busy = 0;

  proto_env #(.NPHASES(NPH), .LATCH_PHASE('{0, 1, 2, 3})) dut (
    .clk(clk), .rst_n(rst_n), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_lword_n(lword_n),
    .vme_write_n(write_n), .vme_am(am), .vme_addr(addr), .vme_data_w(wdat),
    .vme_data_r(rdat), .vme_data_oe(doe), .vme_dtack_n(dtack_n),
    .base_sw(base), .a32_sw(a32), .dev_in(dev_in), .dev_out(dev_out),
    .dev_ctl(dev_ctl), .phase(phase));

  always #12.5 clk = ~clk;    // 40 MHz
  always @(posedge clk) ticks <= ticks + 1;
  always_comb for (int j = 0; j < 4; j++) dev_out[j] = ticks ^ (32'(j) << 28);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one bus cycle; ok = 0 if no DTACK within 30 clocks; lat = clocks to DTACK
  task automatic vme(input logic [31:0] a, input logic wr, input logic [31:0] wd,
                     input logic lw, output logic [31:0] rd, output logic ok, output int lat);
    @(negedge clk);
    addr = a[31:1]; write_n = !wr; wdat = wd; lword_n = !lw;
    @(negedge clk);
    as_n = 0; ds_n = 2'b00;
    ok = 0; lat = 0;
    for (int i = 0; i < 30; i++) begin
      @(posedge clk); #1;
      lat++;
      if (!dtack_n) begin ok = 1; break; end
    end
    rd = rdat;
    if (ok && !wr) chk(doe, "data output enable on read");
    @(negedge clk);
    as_n = 1; ds_n = 2'b11;
    repeat (3) @(negedge clk);
    chk(dtack_n, "DTACK released");
  endtask

  task automatic wr32(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; logic ok; int lat;
    vme(a, 1, d, 1, r, ok, lat);
    chk(ok, $sformatf("write ack %h", a));
  endtask
  task automatic rd32(input logic [31:0] a, output logic [31:0] d);
    logic ok; int lat;
    vme(a, 0, 0, 1, d, ok, lat);
    chk(ok, $sformatf("read ack %h", a));
  endtask

  // phase monitor for one major cycle
  int ph_len [NPH];
  int ph_order_err, overlap_err, gap_err;
  logic [31:0] exp_latch [NPH];
  bit mon_on = 0;
  always @(negedge clk) begin
    if (mon_on) begin
      if (!$onehot0(phase)) overlap_err++;
    end
  end

  task automatic run_cycle(input logic [31:0] b, input int per);
    logic [31:0] r;
    int eff, cur, seen;
    logic [15:0] prev;
    eff = per < 2 ? 2 : (per > 20 ? 20 : per);
    wr32(b + 32, per);
    for (int p = 0; p < NPH; p++) ph_len[p] = 0;
    ph_order_err = 0; overlap_err = 0; gap_err = 0;
    mon_on = 1;
    fork
      wr32(b + 36, 1);
      begin
        // follow the phases until the last one has ended
        cur = -1; seen = 0; prev = '0;
        while (seen < NPH) begin
          @(negedge clk);
          if (phase != 0) begin
            int p;
            p = $clog2(phase);
            if (p != cur) begin
              if (p != cur + 1) ph_order_err++;
              if (cur >= 0 && prev != 0) gap_err++;
              cur = p;
            end
            ph_len[p]++;
          end else if (prev != 0) begin
            // phase cur just ended; its register is loaded at the next edge
            exp_latch[cur] = ticks;
            seen++;
          end
          prev = phase;
        end
      end
    join
    mon_on = 0;
    chk(ph_order_err == 0, "phase order");
    chk(overlap_err == 0, "phases never overlap");
    chk(gap_err == 0, "gap between phases");
    for (int p = 0; p < NPH; p++) chk(ph_len[p] == eff - 1, $sformatf("phase %0d length %0d per %0d", p, ph_len[p], per));
    repeat (3) @(negedge clk);
    rd32(b + 36, r);
    chk(r[2:0] == 3'b100, "idle, START cleared after the cycle");
    for (int j = 0; j < 4; j++) begin
      rd32(b + 16 + 4 * j, r);
      chk(r == (exp_latch[j] ^ (32'(j) << 28)), $sformatf("or_%0d latched at end of phase %0d", j, j));
    end
    n_cycles++;
  endtask

  initial begin
    logic [31:0] r, d;
    logic ok;
    int lat;
    base = BASE24[31:13];
    base[31:24] = 8'h5A;               // ignored in the 24-bit space
    repeat (4) @(negedge clk);
    rst_n = 1;

    // reset values
    rd32(BASE24 + 32, r); chk(r == 20, "ck_per reset 20");
    rd32(BASE24 + 36, r); chk(r[2:0] == 3'b100, "idle after reset");

    // every register: write, read back, chip-side outputs
    for (int i = 0; i < 11; i++) begin
      if (i == 9) continue;            // ctl_state starts a cycle
      d = $urandom;
      if (i == 8) d = 32'd7;
      wr32(BASE24 + 4 * i, d);
      rd32(BASE24 + 4 * i, r);
      chk(r == d, $sformatf("read back register %0d", i));
      if (i < 4) chk(dev_in[i] == d, "input register drives chip");
      if (i == 10) chk(dev_ctl == d, "user control word drives chip");
    end

    // DTACK delay: 2 synchroniser + 2 delay + 1 register clocks
    vme(BASE24 + 4, 0, 0, 1, r, ok, lat);
    chk(ok && lat >= 4 && lat <= 6, $sformatf("DTACK latency %0d", lat));

    // cycles the board must ignore
    vme(BASE24 + 32'h2000, 1, 32'h1, 1, r, ok, lat); chk(!ok, "other page"); n_ignored += !ok;
    am = 6'h09;
    vme(BASE24, 1, 32'h1, 1, r, ok, lat);            chk(!ok, "32-bit space while set to 24"); n_ignored += !ok;
    am = 6'h39;
    vme(BASE24, 1, 32'h1, 0, r, ok, lat);            chk(!ok, "16-bit transfer"); n_ignored += !ok;
    vme(BASE24 + 2, 1, 32'h1, 1, r, ok, lat);        chk(!ok, "unaligned word"); n_ignored += !ok;

    // major cycles at several clock periods
    run_cycle(BASE24, 1);
    run_cycle(BASE24, 2);
    run_cycle(BASE24, 5);
    run_cycle(BASE24, 31);

    // status while running: long phases, poll during the cycle
    wr32(BASE24 + 32, 20);
    wr32(BASE24 + 36, 1);
    rd32(BASE24 + 36, r);
    chk(r[2:0] == 3'b011, "START and RUNNING while running");
    if (r[1]) n_busy++;
    repeat (100) @(negedge clk);
    rd32(BASE24 + 36, r);
    chk(r[2:0] == 3'b100, "idle at the end");

    // move to the 32-bit space
    a32 = 1; am = 6'h09; base = BASE32[31:13];
    vme(BASE24, 1, 32'h1, 1, r, ok, lat); chk(!ok, "24-bit page no longer answers"); n_ignored += !ok;
    wr32(BASE32 + 40, 32'hC0FFEE11);
    chk(dev_ctl == 32'hC0FFEE11, "write in the 32-bit space");
    run_cycle(BASE32, 3);

    chk(n_cycles == 5 && n_ignored == 5 && n_busy == 1, "coverage");
    $display("cycles=%0d ignored=%0d busy_polls=%0d", n_cycles, n_ignored, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
