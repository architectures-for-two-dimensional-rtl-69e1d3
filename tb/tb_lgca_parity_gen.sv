// tb_lgca_parity_gen -- compares the XOR tree with a bit-by-bit count of
// ones on all single-bit words and on random words.
`timescale 1ns/1ps
module tb_lgca_parity_gen;
  logic [15:0] d;
  logic        p;
  int checks = 0, failures = 0;

  lgca_parity_gen #(.WIDTH(16)) dut (.d(d), .parity(p));

  task automatic check_word(input logic [15:0] w);
    int ones;
    d = w;
    #1;
    ones = 0;
    for (int i = 0; i < 16; i++) if (w[i]) ones++;
    checks++;
    if (p !== ones[0]) begin
      failures++;
      $display("FAIL d=%h parity=%b ones=%0d", w, p, ones);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_word(16'h0000);
    check_word(16'hFFFF);
    for (int i = 0; i < 16; i++) check_word(16'(1) << i);
    for (int i = 0; i < 16; i++) check_word(~(16'(1) << i));
    for (int i = 0; i < 2000; i++) check_word(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
