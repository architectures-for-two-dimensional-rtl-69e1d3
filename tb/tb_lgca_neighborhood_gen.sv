// tb_lgca_neighborhood_gen -- feeds the window with a random word stream
// as the chip does (din = word n, mid_in = word n-R, top_in = word n-2R)
// and checks every incoming-link bit and the B,C bits of both sites of
// word m = n-R-1 against neighbours found from hexagonal row/column
// geometry. Uses R = 7 words per row pair; the window itself has no size.
`timescale 1ns/1ps
module tb_lgca_neighborhood_gen;
  import lgca_pkg::*;
  import lgca_ref_pkg::*;
  localparam int R = 7;

  logic  clk = 0, en = 0;
  word_t din, mid_in, top_in;
  nbhd_t odd_nb, even_nb;
  logic [15:0] s [$];
  int checks = 0, failures = 0;

  lgca_neighborhood_gen dut (.clk(clk), .en(en), .din(din), .mid_in(mid_in), .top_in(top_in),
                             .odd_nb(odd_nb), .even_nb(even_nb));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20 * R; n++) begin
      @(negedge clk);
      s.push_back(16'($urandom));
      din    = word_t'(s[n]);
      mid_in = word_t'((n >= R) ? s[n-R] : 16'h0);
      top_in = word_t'((n >= 2*R) ? s[n-2*R] : 16'h0);
      en = 1'b1;
      @(posedge clk);
      #1;
      en = 1'b0;
      if (n >= 2 * R + 4) begin
        int m;
        m = n - R - 1;
        for (int h = 0; h < 2; h++) begin
          nbhd_t got;
          logic [7:0] own;
          got = h ? even_nb : odd_nb;
          own = h ? s[m][15:8] : s[m][7:0];
          checks++;
          if (got.b !== own[0] || got.c !== own[7]) failures++;
          for (int k = 1; k <= 6; k++) begin
            int wn; bit hn; logic [7:0] nbv;
            ref_neighbour(m, bit'(h), k, R, wn, hn);
            nbv = hn ? s[wn][15:8] : s[wn][7:0];
            checks++;
            if (got.arr[k] !== nbv[((k - 1 + 3) % 6) + 1]) begin
              failures++;
              if (failures < 10) $display("FAIL m=%0d site %0d link %0d: got %b", m, h, k, got.arr[k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
