// tb_lgca_chip -- one LGCA chip at its full size (256 words per row pair).
//
// Streams random words (particles, rest particles and boundary sites)
// through the chip and, once the window is full, compares every output
// word with one generation of the reference model applied to the input
// stream: output after taking word n is word n-257 advanced. The rule set
// changes every few hundred words and the step is held off at random, so
// the checks also cover all four rule sets and stalls. The parity pin is
// compared with the parity of the word taken 511 steps earlier.
`timescale 1ns/1ps
module tb_lgca_chip;
  import lgca_ref_pkg::*;
  localparam int R = 256;

  logic        clk = 0, step = 0, c1 = 0, c0 = 0;
  logic [15:0] din, dout;
  logic        par;
  logic [15:0] s [$];
  int checks = 0, failures = 0, stalls = 0;
  int cls_seen [7];

  lgca_chip dut (.clk(clk), .step(step), .c1(c1), .c0(c0), .data_in(din),
                 .data_out(dout), .parity_out(par));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nwords;
    nwords = 12 * R;
    for (int n = 0; n < nwords; n++) begin
      @(negedge clk);
      if (n % 300 == 0) {c1, c0} = 2'((n / 300) % 4);
      s.push_back({rand_site(80, 20), rand_site(80, 20)});
      din  = s[n];
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      // random stall: extra clocks with step low must change nothing
      if ($urandom % 8 == 0) begin
        stalls++;
        repeat (2) @(negedge clk);
      end
      if (n >= 2 * R + 3) begin
        int m;
        logic [15:0] exp;
        m   = n - R - 1;
        exp = ref_word(s, m, R, {c1, c0});
        checks++;
        if (dout !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d got %h exp %h rs=%0d", m, dout, exp, {c1, c0});
        end
        for (int h = 0; h < 2; h++) begin
          logic [7:0] b;
          b = h ? s[m][15:8] : s[m][7:0];
          if (!b[0]) begin
            // collision class seen at this site (arrivals from the reference)
            logic [5:0] arr;
            for (int k = 1; k <= 6; k++) begin
              int wn; bit hn; logic [7:0] nb;
              ref_neighbour(m, bit'(h), k, R, wn, hn);
              nb = hn ? s[wn][15:8] : s[wn][7:0];
              arr[k-1] = nb[((k - 1 + 3) % 6) + 1];
            end
            cls_seen[ref_class(arr, b[7], {c1, c0})]++;
          end
        end
      end
      if (n >= 2 * R - 1) begin
        checks++;
        if (par !== ^s[n - 2 * R + 1]) begin
          failures++;
          if (failures < 10) $display("FAIL parity at %0d", n);
        end
      end
    end
    for (int i = 1; i < 7; i++) begin
      checks++;
      if (cls_seen[i] == 0) begin
        failures++;
        $display("collision class %0d never occurred", i);
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("classes seen: 2B=%0d C2=%0d 3S=%0d 3A=%0d C1=%0d 4B=%0d stalls=%0d",
             cls_seen[1], cls_seen[2], cls_seen[3], cls_seen[4], cls_seen[5], cls_seen[6], stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
