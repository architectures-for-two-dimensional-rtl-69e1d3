// tb_lgm1_top -- end-to-end test of the LGM-1 machine over the VMEbus.
//
// A host model runs the machine's inner loop for every stream word: write
// the word to data_in, write START (with the rule set) to the control
// register, poll the control register until START reads 0, read data_out.
// Each run streams filler words to fill the pipeline, random lattice words
// (particles, rest particles, boundary sites), then filler words to flush.
// Every word read back is compared with the reference model: the word fed
// L = NCHIPS*(ROW_WORDS+2)-1 STARTs earlier, advanced NCHIPS generations.
// Runs use different rule sets one after another (mode switch), and the
// test counts that each mechanism occurred: DTACK handshakes, polls that
// saw the machine running, every collision class, boundary reflections,
// parity pins of both values, ignored accesses (other address, data_out
// write) and the rule-set switch. A short stream through the edge-site
// refresher beside the machine checks that edge words are replaced and
// the others pass unchanged, and one major cycle of the prototyping master
// board beside it checks its registers, phases and output latching.
`timescale 1ns/1ps
module tb_lgm1_top;
  import lgca_ref_pkg::*;
  localparam int G = 2;          // chips
  localparam int R = 6;          // words per row pair
  localparam int NRUNS = 4;
  localparam int LAT = G * (R + 2) - 1;
  localparam int NLAT = 16 * R;  // lattice words per run
  localparam logic [23:0] BASE = 24'hDFC000;

  logic        clk = 0, rst_n = 0;
  logic        as_n = 1, write_n = 1;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = 6'h39;
  logic [23:1] addr = '0;
  logic [15:0] wdat = '0, rdat;
  logic        doe, dtack_n, phi1, phi2;
  logic [G-1:0] par;

  int checks = 0, failures = 0;
  int n_dtack = 0, n_busy_polls = 0, n_bnd = 0, n_ignored = 0, n_switch = 0;
  int n_par0 = 0, n_par1 = 0, n_words = 0;
  int cls [7];

  lgm1_top #(.NCHIPS(G), .ROW_WORDS(R)) dut (
    .clk(clk), .rst_n(rst_n), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_am(am), .vme_addr(addr), .vme_data_w(wdat), .vme_data_r(rdat), .vme_data_oe(doe),
    .vme_dtack_n(dtack_n), .phi1(phi1), .phi2(phi2), .parity_out(par),
    .bp_step(bp_step), .bp_sync(bp_sync), .bp_en(1'b1), .bp_thr(bp_thr),
    .bp_data_in(bp_din), .bp_data_out(bp_dout), .bp_edge(bp_edge),
    .pe_clk(pe_clk), .pe_as_n(pe_as_n), .pe_ds_n(pe_ds_n), .pe_lword_n(1'b0), .pe_write_n(pe_write_n),
    .pe_am(6'h39), .pe_addr(pe_addr), .pe_data_w(pe_wdat), .pe_data_r(pe_rdat), .pe_data_oe(),
    .pe_dtack_n(pe_dtack_n), .pe_base_sw(19'h00510), .pe_a32_sw(1'b0), .pe_dev_in(pe_dev_in),
    .pe_dev_out(pe_dev_out), .pe_dev_ctl(pe_dev_ctl), .pe_phase(pe_phase));

  // prototyping master board beside the machine (A24 page 0xA20000): load
  // an input register and the user control word, run one major cycle,
  // count the phases and read back the latched output registers
  logic        pe_clk = 0, pe_as_n = 1, pe_write_n = 1, pe_dtack_n;
  logic [1:0]  pe_ds_n = 2'b11;
  logic [31:1] pe_addr = '0;
  logic [31:0] pe_wdat = '0, pe_rdat, pe_dev_ctl;
  logic [31:0] pe_dev_in [4];
  logic [31:0] pe_dev_out [4] = '{32'h1111_0000, 32'h2222_0001, 32'h3333_0002, 32'h4444_0003};
  logic [15:0] pe_phase, pe_phase_seen = '0;
  int n_pe_cycles = 0, n_pe_bad = 0;
  always #12.5 pe_clk = ~pe_clk;
  always @(posedge pe_clk) pe_phase_seen <= pe_phase_seen | pe_phase;
  task automatic pe_bus(input logic [31:0] a, input logic wr, input logic [31:0] d, output logic [31:0] r);
    @(negedge pe_clk);
    pe_addr = a[31:1]; pe_write_n = !wr; pe_wdat = d;
    @(negedge pe_clk);
    pe_as_n = 0; pe_ds_n = 2'b00;
    for (int i = 0; i < 30 && pe_dtack_n; i++) @(negedge pe_clk);
    if (pe_dtack_n) n_pe_bad++;
    r = pe_rdat;
    pe_as_n = 1; pe_ds_n = 2'b11;
    repeat (3) @(negedge pe_clk);
  endtask
  initial begin
    logic [31:0] r;
    @(posedge rst_n);
    pe_bus(32'hA20000, 1, 32'hFACE_0001, r);       // ir_0
    pe_bus(32'hA20028, 1, 32'h0000_00C3, r);       // ctl_user
    if (pe_dev_in[0] != 32'hFACE_0001 || pe_dev_ctl != 32'h0000_00C3) n_pe_bad++;
    pe_bus(32'hA20020, 1, 32'd2, r);               // ck_per: 50 ns phases
    pe_bus(32'hA20024, 1, 32'd1, r);               // START
    repeat (20) @(negedge pe_clk);
    pe_bus(32'hA20024, 0, 0, r);
    if (r[2:0] != 3'b100) n_pe_bad++;
    for (int j = 0; j < 4; j++) begin
      pe_bus(32'hA20010 + 4 * j, 0, 0, r);
      if (r != pe_dev_out[j]) n_pe_bad++;
    end
    if (pe_phase_seen != 16'h000F) n_pe_bad++;
    n_pe_cycles++;
  end

  // edge-site refresher beside the machine: a short stream with sync on
  // word 0; edge columns must come out as fresh fluid (B = C = 0, flagged),
  // all other words unchanged one step later
  logic        bp_step = 0, bp_sync = 0, bp_edge;
  logic [7:0]  bp_thr [1:6] = '{8'd40, 8'd80, 8'd120, 8'd160, 8'd200, 8'd240};
  logic [15:0] bp_din = '0, bp_dout;
  int n_bp_edge = 0, n_bp_pass = 0, n_bp_bad = 0;
  initial begin
    logic [15:0] w;
    @(posedge rst_n);
    for (int n = 0; n < 3 * R; n++) begin
      @(negedge clk);
      w = 16'($urandom) | 16'h0101;          // B set on both sites
      bp_din = w; bp_sync = (n == 0); bp_step = 1'b1;
      @(negedge clk);
      bp_step = 1'b0;
      if (n % R == 0 || n % R == R - 1) begin
        n_bp_edge++;
        if (!bp_edge || bp_dout[0] || bp_dout[7] || bp_dout[8] || bp_dout[15]) n_bp_bad++;
      end else begin
        n_bp_pass++;
        if (bp_edge || bp_dout != w) n_bp_bad++;
      end
    end
  end

  always #50 clk = ~clk;   // 10 MHz SYSCLK

  always @(posedge clk) begin
    if (par[G-1]) n_par1++; else n_par0++;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one VME cycle; ok = 0 if no DTACK came within 40 clocks
  task automatic vme(input logic [23:0] a, input logic wr, input logic [15:0] wd,
                     output logic [15:0] rd, output logic ok);
    ok = 1'b0;
    rd = '0;
    @(negedge clk);
    addr = a[23:1]; write_n = !wr; wdat = wd; am = 6'h39;
    as_n = 1'b0; ds_n = 2'b00;
    for (int c = 0; c < 40; c++) begin
      @(posedge clk);
      #1;
      if (!dtack_n) begin
        ok = 1'b1;
        if (!wr) begin rd = rdat; chk("data lines driven on read", doe); end
        break;
      end
    end
    @(negedge clk);
    as_n = 1'b1; ds_n = 2'b11;
    if (ok) begin
      n_dtack++;
      while (!dtack_n) @(negedge clk);
    end
  endtask

  task automatic wr16(input logic [23:0] a, input logic [15:0] d);
    logic [15:0] x; logic ok;
    vme(a, 1'b1, d, x, ok);
    chk("write acknowledged", ok);
  endtask

  task automatic rd16(input logic [23:0] a, output logic [15:0] d);
    logic ok;
    vme(a, 1'b0, 16'h0, d, ok);
    chk("read acknowledged", ok);
  endtask

  // one iteration of the host loop
  task automatic host_step(input logic [15:0] w, input logic [1:0] rs, output logic [15:0] r);
    logic [15:0] st;
    int polls;
    wr16(BASE + 0, w);
    wr16(BASE + 4, {13'h0, rs, 1'b1});
    polls = 0;
    do begin
      rd16(BASE + 4, st);
      polls++;
      if (st[0]) n_busy_polls++;
      chk("rule set reads back", st[2:1] == rs);
    end while (st[0] && polls < 20);
    chk("START cleared", !st[0] && !st[3]);
    rd16(BASE + 2, r);
  endtask

  initial begin
    #800ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s [$];
    logic [15:0] gen [G+1][$];
    logic [15:0] prev [$];
    logic [15:0] r;
    logic ok;
    logic [1:0] rs_list [NRUNS] = '{2'd3, 2'd2, 2'd0, 2'd1};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // accesses the board must ignore
    vme(24'hDFC100, 1'b1, 16'h1111, r, ok);
    chk("other board address ignored", !ok);
    if (!ok) n_ignored++;
    wr16(BASE + 2, 16'hAAAA);
    rd16(BASE + 2, r);
    chk("data_out not writable", r != 16'hAAAA);
    if (r != 16'hAAAA) n_ignored++;

    for (int run = 0; run < NRUNS; run++) begin
      int nw;
      logic [1:0] rs;
      rs = rs_list[run];
      if (run > 0) n_switch++;
      // host stream: fill, lattice, flush
      s.delete();
      for (int i = 0; i < LAT; i++) s.push_back({rand_site(60, 0), rand_site(60, 0)});
      for (int i = 0; i < NLAT; i++) s.push_back({rand_site(128, 30), rand_site(128, 30)});
      for (int i = 0; i < LAT; i++) s.push_back({rand_site(60, 0), rand_site(60, 0)});
      nw = s.size();
      // reference generations
      for (int g = 0; g <= G; g++) gen[g].delete();
      gen[0] = s;
      for (int g = 1; g <= G; g++) begin
        prev = gen[g-1];
        for (int m = 0; m < nw; m++)
          gen[g].push_back((m >= g * (R + 1) && m + R + 1 < nw) ? ref_word(prev, m, R, rs) : 16'h0);
      end
      // coverage of the mechanisms on the first chip's sites
      for (int m = R + 1; m + R + 1 < nw; m++)
        for (int h = 0; h < 2; h++) begin
          logic [7:0] b; logic [5:0] arr;
          b = h ? s[m][15:8] : s[m][7:0];
          for (int k = 1; k <= 6; k++) begin
            int wn; bit hn; logic [7:0] nb;
            ref_neighbour(m, bit'(h), k, R, wn, hn);
            nb = hn ? s[wn][15:8] : s[wn][7:0];
            arr[k-1] = nb[((k - 1 + 3) % 6) + 1];
          end
          if (b[0]) begin if (arr != 0) n_bnd++; end
          else cls[ref_class(arr, b[7], rs)]++;
        end
      // run the host program
      for (int n = 0; n < nw; n++) begin
        host_step(s[n], rs, r);
        if (n - LAT >= G * (R + 1)) begin
          checks++;
          n_words++;
          if (r !== gen[G][n - LAT]) begin
            failures++;
            if (failures < 15) $display("FAIL run %0d word %0d got %h exp %h", run, n - LAT, r, gen[G][n - LAT]);
          end
        end
      end
    end

    chk("prototyping board cycle", n_pe_cycles == 1 && n_pe_bad == 0);
    chk("edge sites refreshed", n_bp_edge > 0 && n_bp_pass > 0 && n_bp_bad == 0);
    chk("DTACK handshakes", n_dtack > 0);
    chk("machine seen running", n_busy_polls > 0);
    chk("boundary reflections", n_bnd > 0);
    chk("ignored accesses", n_ignored == 2);
    chk("rule set switched", n_switch > 0);
    chk("parity pin toggles", n_par0 > 0 && n_par1 > 0);
    for (int i = 1; i < 7; i++) chk($sformatf("collision class %0d", i), cls[i] > 0);
    $display("prototyping board: cycles=%0d bad=%0d", n_pe_cycles, n_pe_bad);
    $display("boundary stage: edge=%0d pass=%0d bad=%0d", n_bp_edge, n_bp_pass, n_bp_bad);
    $display("words=%0d dtack=%0d busy_polls=%0d bnd=%0d 2B=%0d C2=%0d 3S=%0d 3A=%0d C1=%0d 4B=%0d",
             n_words, n_dtack, n_busy_polls, n_bnd, cls[1], cls[2], cls[3], cls[4], cls[5], cls[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
