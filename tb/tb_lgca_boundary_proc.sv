// tb_lgca_boundary_proc -- checks the edge-site refresher.
//
// Streams random words with R = 8 words per row pair. Non-edge words must
// come out unchanged one step later. Edge words (column 0 and R-1, counted
// from the sync word) must be fresh fluid: B = 0, C = 0 and link bits equal
// to those of a model of the twelve LFSRs and threshold compares. The
// measured occupation of each link over all edge words must also be close
// to (thr+1)/256. A mid-stream sync re-aligns the columns, en = 0 turns
// replacement off, and steps are held off at random.
`timescale 1ns/1ps
module tb_lgca_boundary_proc;
  import lgca_pkg::*;
  localparam int R = 8;
  localparam int N = 6000;

  logic        clk = 0, rst_n = 0, step = 0, sync = 0, en = 1;
  logic [7:0]  thr [1:6];
  word_t       din, dout;
  logic        edge_o;
  logic [15:0] m_lfsr [12];
  int checks = 0, failures = 0, n_edge = 0, n_pass = 0, n_resync = 0, n_off = 0;
  int ones [1:6];

  lgca_boundary_proc #(.ROW_WORDS(R)) dut (
    .clk(clk), .rst_n(rst_n), .step(step), .sync(sync), .en(en), .thr(thr),
    .data_in(din), .data_out(dout), .edge_out(edge_o));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int col;
    word_t w, exp_w;
    bit edge_w;
    for (int k = 1; k <= 6; k++) begin
      thr[k] = 8'(k * 40 - 20);  // 20, 60, ..., 220
      ones[k] = 0;
    end
    for (int i = 0; i < 12; i++) begin
      m_lfsr[i] = 16'hACE1 ^ 16'(i * 16'h1F35);
      check(m_lfsr[i] != 0, "nonzero seed");
    end
    din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    col = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      while ($urandom % 4 == 0) @(negedge clk);   // hold-off
      w    = 16'($urandom);
      din  = w;
      sync = (n == 0) || (n == 2003);
      en   = !(n >= 4000 && n < 4100);
      if (sync) begin col = 0; if (n != 0) n_resync++; end
      edge_w = en && (col == 0 || col == R - 1);
      if (edge_w) begin
        exp_w = '0;
        for (int h = 0; h < 2; h++)
          for (int k = 1; k <= 6; k++) begin
            logic bitv;
            bitv = (m_lfsr[h * 6 + k - 1][7:0] <= thr[k]);
            if (h == 0) exp_w.odd.link[k] = bitv; else exp_w.even.link[k] = bitv;
            ones[k] += bitv;
          end
      end else begin
        exp_w = w;
      end
      if (!en && (col == 0 || col == R - 1)) n_off++;
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      for (int i = 0; i < 12; i++)
        m_lfsr[i] = {m_lfsr[i][14:0], m_lfsr[i][15] ^ m_lfsr[i][14] ^ m_lfsr[i][12] ^ m_lfsr[i][3]};
      check(dout == exp_w, $sformatf("word %0d col %0d", n, col));
      check(edge_o == edge_w, "edge_out");
      if (edge_w) n_edge++; else n_pass++;
      // hold: nothing changes without a step
      @(negedge clk);
      check(dout == exp_w, "hold");
      col = (col + 1) % R;
    end
    // occupation of each link close to (thr+1)/256 over 2*n_edge samples
    for (int k = 1; k <= 6; k++) begin
      real p, e;
      p = real'(ones[k]) / real'(2 * n_edge);
      e = real'(thr[k] + 1) / 256.0;
      check(p > e - 0.06 && p < e + 0.06, $sformatf("link %0d occupation %f vs %f", k, p, e));
    end
    check(n_edge > 1000 && n_pass > 1000 && n_resync == 1 && n_off > 10, "coverage");
    $display("edge=%0d pass=%0d resync=%0d disabled_edges=%0d", n_edge, n_pass, n_resync, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
