// tb_lgca_shift_register -- checks the line delay: a word taken on one
// enabled edge is at dout after DEPTH-1 further enabled edges, nothing
// moves while en is low, and the two halves join without a lost stage.
// Run with the full 256 x 16 size.
`timescale 1ns/1ps
module tb_lgca_shift_register;
  localparam int DEPTH = 256;
  logic        clk = 0, en = 0;
  logic [15:0] din, dout;
  logic [15:0] hist [$];
  int checks = 0, failures = 0, nsteps = 0, nholds = 0;

  lgca_shift_register #(.DEPTH(DEPTH), .WIDTH(16)) dut (.clk(clk), .en(en), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    for (int i = 0; i < 4 * DEPTH; i++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      din = 16'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(din);
        nsteps++;
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) begin
            failures++;
            if (failures < 10) $display("FAIL step %0d dout=%h exp=%h", nsteps, dout, hist[hist.size() - DEPTH]);
          end
        end
      end else begin
        nholds++;
        if (hist.size() >= DEPTH) begin
          checks++;
          if (dout !== hist[hist.size() - DEPTH]) failures++;
        end
      end
    end
    checks++;
    if (nholds == 0) failures++;
    $display("steps=%0d holds=%0d", nsteps, nholds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
