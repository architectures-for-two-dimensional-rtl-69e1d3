// tb_lgca_update_proc -- exhaustive test of the L and R collision logic.
//
// Drives every site byte (arrivals, B, C) under each of the four rule sets
// into an L and an R instance and compares with the reference model. It
// also checks mass and momentum conservation on free sites with integer
// hexagonal coordinates, a few hand-worked collisions, and how many
// configurations each rule set changes (20, 32, 23, 35 of the 128 free
// configurations for sets 0..3).
`timescale 1ns/1ps
module tb_lgca_update_proc;
  import lgca_pkg::*;
  import lgca_ref_pkg::*;

  nbhd_t      nb;
  logic [1:0] rs;
  site_t      ql, qr;
  int         checks = 0, failures = 0;

  lgca_update_proc #(.RIGHT(1'b0)) u_l (.nb(nb), .rule_sel(rs), .q(ql));
  lgca_update_proc #(.RIGHT(1'b1)) u_r (.nb(nb), .rule_sel(rs), .q(qr));

  // link directions in (2x, y/sqrt3) units: 1 W, 2 NW, 3 NE, 4 E, 5 SE, 6 SW
  int dx [6] = '{-2, -1, 1, 2, 1, -1};
  int dy [6] = '{ 0,  1, 1, 0, -1, -1};

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s nb=%02h rs=%0d L=%02h R=%02h", what, nb, rs, ql, qr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int changed [4];
    for (int s = 0; s < 4; s++) begin
      changed[s] = 0;
      for (int v = 0; v < 256; v++) begin
        logic [7:0] el, er;
        rs = 2'(s);
        nb = nbhd_t'(8'(v));
        #1;
        el = ref_update(nb.arr, nb.b, nb.c, rs, 1'b0);
        er = ref_update(nb.arr, nb.b, nb.c, rs, 1'b1);
        check("L ref", ql == el);
        check("R ref", qr == er);
        if (!nb.b) begin
          int mi, mo, pxi, pyi, pxo, pyo;
          mi = $countones(nb.arr) + int'(nb.c);
          mo = $countones(ql.link) + int'(ql.c);
          pxi = 0; pyi = 0; pxo = 0; pyo = 0;
          for (int k = 0; k < 6; k++) begin
            // an arrival on link k+1 moves in direction of link k+4
            if (nb.arr[k+1]) begin pxi -= dx[k]; pyi -= dy[k]; end
            if (ql.link[k+1]) begin pxo += dx[k]; pyo += dy[k]; end
          end
          check("mass", mi == mo);
          check("momentum", pxi == pxo && pyi == pyo);
          if (!nb.c && ql != site_t'({1'b0, rot(nb.arr, 3), 1'b0})) changed[s]++;
          if (nb.c && ql != site_t'({1'b1, rot(nb.arr, 3), 1'b0})) changed[s]++;
          check("B out 0", !ql.b && !qr.b);
        end else begin
          check("wall", ql == site_t'({1'b0, nb.arr, 1'b1}) && qr == ql);
        end
      end
    end
    check("changed set0", changed[0] == 20);
    check("changed set1", changed[1] == 32);
    check("changed set2", changed[2] == 23);
    check("changed set3", changed[3] == 35);
    $display("changed per rule set: %0d %0d %0d %0d", changed[0], changed[1], changed[2], changed[3]);

    // hand-worked: arrivals on links 1 and 4 (head-on along the W-E line)
    rs = 2'd0;
    nb = '{c: 1'b0, arr: 6'b001001, b: 1'b0};
    #1;
    check("2B R -> links 2,5", qr.link == 6'b010010 && !qr.c);
    check("2B L -> links 3,6", ql.link == 6'b100100 && !ql.c);
    // single particle arriving on link 1 (moving E) meets a rest particle
    nb = '{c: 1'b1, arr: 6'b000001, b: 1'b0};
    #1;
    check("C1 -> links 3,5", ql.link == 6'b010100 && !ql.c);
    // no collision: particle arriving on link 2 continues out of link 5
    nb = '{c: 1'b0, arr: 6'b000010, b: 1'b0};
    #1;
    check("free flight", ql == site_t'(8'b0_010000_0));
    // 4B only in sets 2 and 3: holes on links 1,4 of arrivals
    nb = '{c: 1'b0, arr: 6'b110110, b: 1'b0};
    rs = 2'd1;
    #1;
    check("4B off", ql.link == 6'b110110);
    rs = 2'd2;
    #1;
    check("4B on R", qr.link == ~6'b010010);
    // wall with a rest particle: rest particle removed, particles reversed
    nb = '{c: 1'b1, arr: 6'b000101, b: 1'b1};
    #1;
    check("wall rest", ql == site_t'(8'b0_000101_1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
