// tb_lgm1_regs -- register-level test of data_in, data_out and control.
//
// Checks reset values, write and read-back of data_in and of the START,
// C0, C1 bits, that bus writes to data_out are ignored, that latch_out
// copies the array output, that clr_start clears START (also against a
// simultaneous write), the RUNNING status bit, and that data_in and C1,C0
// drive the array.
`timescale 1ns/1ps
module tb_lgm1_regs;
  logic        clk = 0, rst_n = 0;
  logic        sel_din = 0, sel_dout = 0, sel_ctrl = 0, wr_stb = 0;
  logic [15:0] wdata = 0, rdata, array_out = 0, array_in;
  logic        latch_out = 0, clr_start = 0, running = 0, start, c0, c1;
  int checks = 0, failures = 0;

  lgm1_regs dut (.clk(clk), .rst_n(rst_n), .sel_din(sel_din), .sel_dout(sel_dout), .sel_ctrl(sel_ctrl),
    .wr_stb(wr_stb), .wdata(wdata), .rdata(rdata), .array_out(array_out), .latch_out(latch_out),
    .clr_start(clr_start), .running(running), .array_in(array_in), .start(start), .c0(c0), .c1(c1));

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int r, input logic [15:0] d);
    @(negedge clk);
    {sel_ctrl, sel_dout, sel_din} = 3'(1 << r);
    wdata = d; wr_stb = 1'b1;
    @(negedge clk);
    wr_stb = 1'b0; {sel_ctrl, sel_dout, sel_din} = 3'b000;
  endtask

  task automatic rd(input int r, output logic [15:0] d);
    @(negedge clk);
    {sel_ctrl, sel_dout, sel_din} = 3'(1 << r);
    #1 d = rdata;
    @(negedge clk);
    {sel_ctrl, sel_dout, sel_din} = 3'b000;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    rd(0, d); chk("din reset", d == 16'h0);
    rd(2, d); chk("ctrl reset", d == 16'h0);
    chk("no select reads 0", rdata == 16'h0);
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      wr(0, v);
      rd(0, d);
      chk("din readback", d == v && array_in == v);
    end
    wr(1, 16'hBEEF);
    rd(1, d); chk("dout ignores bus write", d == 16'h0);
    @(negedge clk);
    array_out = 16'h1234; latch_out = 1'b1;
    @(negedge clk);
    latch_out = 1'b0; array_out = 16'h5555;
    rd(1, d); chk("dout latched", d == 16'h1234);
    wr(2, 16'h0007);
    rd(2, d); chk("ctrl readback", d == 16'h0007 && start && c0 && c1);
    running = 1'b1;
    rd(2, d); chk("running bit", d == 16'h000F);
    @(negedge clk);
    clr_start = 1'b1;
    @(negedge clk);
    clr_start = 1'b0; running = 1'b0;
    rd(2, d); chk("start cleared, c kept", d == 16'h0006 && !start);
    // clear and write in the same cycle: clear wins
    @(negedge clk);
    {sel_ctrl, sel_dout, sel_din} = 3'b100; wdata = 16'h0003; wr_stb = 1'b1; clr_start = 1'b1;
    @(negedge clk);
    wr_stb = 1'b0; clr_start = 1'b0; {sel_ctrl, sel_dout, sel_din} = 3'b000;
    chk("clear wins", !start && c0 && !c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
