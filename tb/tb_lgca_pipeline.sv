// tb_lgca_pipeline -- a chain of three chips with 6 words per row pair.
//
// Streams random words in and checks that each output word is the input
// stream advanced three generations by the reference model. Each chip
// delays the stream by R+1 steps and each hop between chips by one more
// (a chip takes the word its predecessor produced in the previous step),
// so the output after step n is word n-L of generation 3 with
// L = 3*(R+2)-1. Also checks each chip's parity pin once its input is valid.
`timescale 1ns/1ps
module tb_lgca_pipeline;
  import lgca_ref_pkg::*;
  localparam int G = 3;
  localparam int R = 6;
  localparam int N = 40 * R;

  logic          clk = 0, step = 0, c1 = 1, c0 = 1;
  logic [15:0]   din, dout;
  logic [G-1:0]  par;
  logic [15:0]   gen [G+1][$];
  int checks = 0, failures = 0;

  lgca_pipeline #(.NCHIPS(G), .ROW_WORDS(R)) dut (
    .clk(clk), .step(step), .c1(c1), .c0(c0), .data_in(din), .data_out(dout), .parity_out(par));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] prev [$];
    for (int n = 0; n < N; n++) gen[0].push_back({rand_site(90, 25), rand_site(90, 25)});
    // reference generations; words that cannot be computed are left 0
    for (int g = 1; g <= G; g++) begin
      prev = gen[g-1];
      for (int m = 0; m < N; m++)
        gen[g].push_back((m >= g * (R + 1) && m + R + 1 < N) ? ref_word(prev, m, R, {c1, c0}) : 16'h0);
    end
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      din  = gen[0][n];
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      if (n - (G * (R + 2) - 1) >= G * (R + 1)) begin
        int m;
        m = n - (G * (R + 2) - 1);
        checks++;
        if (dout !== gen[G][m]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d got %h exp %h", m, dout, gen[G][m]);
        end
      end
      for (int i = 0; i < G; i++) begin
        int w;
        w = n - i * (R + 2) - (2 * R - 1);   // word of chip i's input stream at its parity pin
        if (w >= i * (R + 1) && (i == 0 || w + R + 1 < N)) begin
          checks++;
          if (par[i] !== ^gen[i][w]) begin
            failures++;
            if (failures < 10) $display("FAIL parity chip %0d step %0d", i, n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
