// tb_lgm1_vme_slave -- bus-cycle test of the VME slave decoder.
//
// A VME master model runs read and write cycles and checks: the right
// register select for base+0, +2, +4; one wr_stb per write cycle and none
// on reads; rd_en only on reads; DTACK* asserted 2 (synchroniser) +
// DTACK_TAP+1 SYSCLKs after the strobes and released after they go away;
// no response to another address, to a non-24-bit address modifier, or
// without a data strobe.
`timescale 1ns/1ps
module tb_lgm1_vme_slave;
  logic        clk = 0, rst_n = 0;
  logic        as_n = 1, write_n = 1, dtack_n;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = 6'h39;
  logic [23:1] addr = '0;
  logic        sel_din, sel_dout, sel_ctrl, wr_stb, rd_en;
  int checks = 0, failures = 0;

  lgm1_vme_slave #(.BASE_ADDR_HI(16'hDFC0), .DTACK_TAP(3)) dut (
    .clk(clk), .rst_n(rst_n), .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n),
    .vme_am(am), .vme_addr(addr), .vme_dtack_n(dtack_n),
    .sel_din(sel_din), .sel_dout(sel_dout), .sel_ctrl(sel_ctrl), .wr_stb(wr_stb), .rd_en(rd_en));

  always #50 clk = ~clk;   // 10 MHz SYSCLK

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one bus cycle; returns clocks to DTACK (-1: none) and what was seen
  task automatic cycle(input logic [23:0] a, input logic wr, input logic [5:0] amod,
                       input logic [1:0] dsn, output int lat, output int nwr,
                       output logic [2:0] sels, output logic rde);
    lat = -1; nwr = 0; sels = 3'b000; rde = 1'b0;
    @(negedge clk);
    addr = a[23:1]; am = amod; write_n = !wr;
    as_n = 1'b0;
    ds_n = dsn;
    for (int c = 1; c <= 20; c++) begin
      @(posedge clk);
      #1;
      if (wr_stb) nwr++;
      sels |= {sel_ctrl, sel_dout, sel_din};
      rde |= rd_en;
      if (!dtack_n && lat < 0) lat = c;
      if (lat >= 0 && c > lat + 1) break;
    end
    @(negedge clk);
    as_n = 1'b1; ds_n = 2'b11;
    repeat (3) @(posedge clk);
    #1;
    chk("dtack released", dtack_n);
    chk("selects released", !(sel_din || sel_dout || sel_ctrl || rd_en || wr_stb));
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, nwr;
    logic [2:0] sels;
    logic rde;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // write data_in
    cycle(24'hDFC000, 1'b1, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("wr din dtack latency", lat == 6);
    chk("wr din one strobe", nwr == 1);
    chk("wr din select", sels == 3'b001 && !rde);
    // write control, supervisory data AM, low byte strobe only
    cycle(24'hDFC004, 1'b1, 6'h3D, 2'b10, lat, nwr, sels, rde);
    chk("wr ctrl", lat == 6 && nwr == 1 && sels == 3'b100);
    // read data_out
    cycle(24'hDFC002, 1'b0, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("rd dout", lat == 6 && nwr == 0 && sels == 3'b010 && rde);
    // read data_in through an alias (A3 not decoded)
    cycle(24'hDFC008, 1'b0, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("rd alias", lat == 6 && sels == 3'b001 && rde);
    // base+6 is acknowledged but selects nothing
    cycle(24'hDFC006, 1'b1, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("base+6", lat == 6 && sels == 3'b000);
    // other board address
    cycle(24'hDFC100, 1'b1, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("other address", lat < 0 && nwr == 0 && sels == 3'b000);
    cycle(24'h5FC000, 1'b0, 6'h39, 2'b00, lat, nwr, sels, rde);
    chk("other address hi", lat < 0 && !rde);
    // A16 short I/O modifier
    cycle(24'hDFC000, 1'b1, 6'h29, 2'b00, lat, nwr, sels, rde);
    chk("other AM", lat < 0 && nwr == 0);
    // address strobe without data strobe
    cycle(24'hDFC000, 1'b1, 6'h39, 2'b11, lat, nwr, sels, rde);
    chk("no DS", lat < 0 && nwr == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
