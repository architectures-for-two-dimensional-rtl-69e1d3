// tb_lgm1_workload -- the full-size pipeline running a flow problem.
//
// Streams one 512 by 1024 site lattice (262144 words, 256 words per row
// pair) through the ten-chip pipeline at its default size, so every site
// is advanced ten generations in one pass. The fluid has particle density
// 0.2 on each link, rule set 3 (all collision classes) and a flat plate of
// boundary sites across the middle of the lattice. Each output word is
// compared with the reference model run for ten generations. The first
// and last words of the stream, whose neighbourhoods reach past the ends of
// the stream, are not compared; the host side-link handling that would
// normally feed them is outside the pipeline.
//
// Timing: one word enters and one leaves per step; the output after step n
// is word n - L with L = 10*(256+2)-1, so a whole pass takes N + L steps
// and the ten chips together make 20 site updates per step.
`timescale 1ns/1ps
module tb_lgm1_workload;
  import lgca_ref_pkg::*;
  localparam int G    = 10;             // chips
  localparam int R    = 256;            // words per row pair
  localparam int ROWS = 1024;           // rows of 512 sites
  localparam int N    = ROWS * R;       // words in the lattice
  localparam int L    = G * (R + 2) - 1;
  localparam int DENS = 51;             // 0.2 * 256

  logic          clk = 0, step = 0, c1 = 1, c0 = 1;
  logic [15:0]   din, dout;
  logic [G-1:0]  par;
  logic [15:0]   cur [$];
  logic [15:0]   nxt [$];
  logic [15:0]   first [$];
  int checks = 0, failures = 0, steps = 0, nbnd = 0;

  lgca_pipeline dut (
    .clk(clk), .step(step), .c1(c1), .c0(c0), .data_in(din), .data_out(dout), .parity_out(par));

  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plate: row pairs 500 and 501, words 96..159 (128 sites wide)
  function automatic bit on_plate(input int m);
    return (m / R == 500 || m / R == 501) && (m % R >= 96) && (m % R < 160);
  endfunction

  initial begin
    for (int m = 0; m < N; m++) begin
      logic [7:0] lo, hi;
      lo = rand_site(DENS, 0);
      hi = rand_site(DENS, 0);
      if (on_plate(m)) begin
        lo = {1'b0, lo[6:1], 1'b1};
        hi = {1'b0, hi[6:1], 1'b1};
        nbnd += 2;
      end
      first.push_back({hi, lo});
    end
    // ten reference generations; words that cannot be computed are left 0
    cur = first;
    for (int g = 1; g <= G; g++) begin
      nxt.delete();
      for (int m = 0; m < N; m++)
        nxt.push_back((m >= g * (R + 1) && m + R + 1 < N) ? ref_word(cur, m, R, {c1, c0}) : 16'h0);
      cur = nxt;
    end
    $display("lattice 512x%0d, %0d boundary sites, reference ready", ROWS, nbnd);

    for (int n = 0; n < N + L; n++) begin
      @(negedge clk);
      din  = (n < N) ? first[n] : 16'h0;
      step = 1'b1;
      steps++;
      @(negedge clk);
      step = 1'b0;
      if (n - L >= G * (R + 1) && n - L + G * (R + 1) < N) begin
        int m;
        m = n - L;
        checks++;
        if (dout !== cur[m]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d got %h exp %h", m, dout, cur[m]);
        end
      end
    end
    $display("pass of %0d words took %0d steps: %0d site updates per step",
             N, steps, 2 * G);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
