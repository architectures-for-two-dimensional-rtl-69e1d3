// lgca_ref_pkg -- reference model used by the LGCA testbenches.
//
// Written independently of the RTL: the lattice geometry is worked out
// from physical rows and columns of the hexagonal lattice, and the
// collisions are listed as base patterns that are rotated by bit shifts.
//   site byte : bit 0 B, bits 1..6 links 1..6, bit 7 C
//   word m    : low byte = upper-row site (physical row 2*(m/R), column
//               m%R), high byte = the site below it, half a column right
package lgca_ref_pkg;

  // rotate a 6-bit set (bit i = link i+1) by r links toward higher numbers
  function automatic logic [5:0] rotl(input logic [5:0] v, input int r);
    logic [5:0] x;
    x = v;
    for (int i = 0; i < ((r % 6) + 6) % 6; i++) x = {x[4:0], x[5]};
    return x;
  endfunction

  // new state of one site from its arrivals (bit i = arrival on link i+1)
  function automatic logic [7:0] ref_update(input logic [5:0] arr, input logic b,
                                            input logic c, input logic [1:0] rs,
                                            input logic right);
    logic [5:0] v, o;
    logic       co;
    int         t;
    if (b) return {1'b0, arr, 1'b1};
    t  = right ? 1 : 5;
    v  = rotl(arr, 3);
    o  = v;
    co = c;
    for (int r = 0; r < 6; r++) begin
      if (v == rotl(6'b001001, r)) o = rotl(v, t);                          // 2B / C2
      if (!c && v == rotl(6'b010101, r)) o = rotl(v, 1);                    // 3S
      if (rs[0] && !c && v == rotl(6'b100101, r)) o = rotl(6'b010011, r);   // 3A
      if (rs[0] && !c && v == rotl(6'b010011, r)) o = rotl(6'b100101, r);   // 3A
      if (c && v == rotl(6'b000001, r)) begin o = rotl(6'b100010, r); co = 1'b0; end // C1
      if (!c && v == rotl(6'b100010, r)) begin o = rotl(6'b000001, r); co = 1'b1; end // C1
      if (rs[1] && !c && v == ~rotl(6'b001001, r)) o = rotl(v, t);          // 4B
    end
    return {co, o, 1'b0};
  endfunction

  // collision class of a free site, for coverage counting
  // 0 none, 1 2B, 2 C2, 3 3S, 4 3A, 5 C1, 6 4B
  function automatic int ref_class(input logic [5:0] arr, input logic c, input logic [1:0] rs);
    logic [5:0] v;
    v = rotl(arr, 3);
    for (int r = 0; r < 6; r++) begin
      if (v == rotl(6'b001001, r)) return c ? 2 : 1;
      if (!c && v == rotl(6'b010101, r)) return 3;
      if (rs[0] && !c && (v == rotl(6'b100101, r) || v == rotl(6'b010011, r))) return 4;
      if ((c && v == rotl(6'b000001, r)) || (!c && v == rotl(6'b100010, r))) return 5;
      if (rs[1] && !c && v == ~rotl(6'b001001, r)) return 6;
    end
    return 0;
  endfunction

  // word index and byte (0 low/odd, 1 high/even) of the neighbour of the
  // site (m, hi) across link k (1..6), R words per row pair
  function automatic void ref_neighbour(input int m, input bit hi, input int k, input int R,
                                        output int wn, output bit hn);
    int p, c, dp, dc, pn, pr;
    p = 2 * (m / R) + int'(hi);
    c = m % R;
    case (k)
      1: begin dp =  0; dc = -1; end
      4: begin dp =  0; dc =  1; end
      2: begin dp = -1; dc = hi ? 0 : -1; end
      3: begin dp = -1; dc = hi ? 1 :  0; end
      5: begin dp =  1; dc = hi ? 1 :  0; end
      default: begin dp = 1; dc = hi ? 0 : -1; end
    endcase
    pn = p + dp;
    pr = (pn >= 0) ? pn / 2 : -1;
    hn = bit'(pn - 2 * pr);
    wn = pr * R + c + dc;
  endfunction

  // one generation of the stream: new value of word m from words of s[]
  function automatic logic [15:0] ref_word(ref logic [15:0] s[$], input int m, input int R,
                                           input logic [1:0] rs);
    logic [7:0] byt [2];
    for (int h = 0; h < 2; h++) begin
      logic [5:0] arr;
      logic [7:0] own;
      own = h ? s[m][15:8] : s[m][7:0];
      for (int k = 1; k <= 6; k++) begin
        int wn; bit hn; logic [7:0] nb; int opp;
        ref_neighbour(m, bit'(h), k, R, wn, hn);
        nb  = hn ? s[wn][15:8] : s[wn][7:0];
        opp = ((k - 1 + 3) % 6) + 1;
        arr[k-1] = nb[opp];
      end
      byt[h] = ref_update(arr, own[0], own[7], rs, bit'(h));
    end
    return {byt[1], byt[0]};
  endfunction

  // a random site: particles with probability about dens/256, boundary
  // with probability bnd/256, no rest particle on a boundary
  function automatic logic [7:0] rand_site(input int dens, input int bnd);
    logic [7:0] x;
    for (int i = 1; i < 8; i++) x[i] = (($urandom % 256) < dens);
    x[0] = (($urandom % 256) < bnd);
    if (x[0]) x[7] = 1'b0;
    return x;
  endfunction

endpackage
