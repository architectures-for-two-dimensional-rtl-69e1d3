// lgca_update_proc -- collision logic of one LGCA update processor.
//
// Maps the particles arriving at a site (plus the site's own B and C bits)
// to the site's new state, i.e. the particles leaving it. The chip holds two
// of these: the L processor (RIGHT=0) for odd-numbered sites and the R
// processor (RIGHT=1) for even-numbered sites. They differ only in the
// direction a head-on pair is turned (rules 2B, 4B and the rest-spectator
// rule C2), which spreads the two equally likely outcomes over the lattice
// like a checkerboard instead of drawing random numbers.
//
// How it works: an arrival on link k moves toward link k+3, so the
// pre-collision velocity set is the arrival set rotated by three links.
// Collision classes, enabled by the rule set on C1,C0:
//   2B  two movers head-on, no rest particle: pair turned by +-60 degrees.
//   3S  three movers 120 degrees apart: turned by 60 degrees.
//   3A  head-on pair plus one spectator s, pair {s-1,s+2} <-> {s+1,s+4}
//       (rule sets 1 and 3 only).
//   C1  rest particle + one mover d <-> two movers d-1, d+1.
//   C2  head-on pair with a rest particle present: pair turned as in 2B,
//       the rest particle stays.
//   4B  four movers whose two holes are head-on: turned by +-60 degrees
//       (rule sets 2 and 3 only).
// Every other configuration passes straight through. A boundary site sends
// every particle back along the link it came in on, keeps B=1 and never
// holds a rest particle.
//
// The rule set numbering, the L/R split and the boundary behaviour follow
// the chip description. The exact member configurations of each class, and
// the choice that R turns toward higher link numbers, are this design's
// reading of standard FHP collisions. The chip used a PLA; this is plain
// combinational logic with the same input/output function.
//
// Interface: purely combinational, nb and rule_sel in, q out. q.b is a copy
// of nb.b: whether a site is solid never changes, so the B bit travels with
// the site unaltered.
module lgca_update_proc
  import lgca_pkg::*;
#(
  parameter bit RIGHT = 1'b0          // 0: L processor, 1: R processor
) (
  input  nbhd_t      nb,
  input  logic [1:0] rule_sel,        // {C1, C0}
  output site_t      q
);

  localparam int TURN = RIGHT ? 1 : -1;

  // a single mover on link k
  function automatic logic [6:1] one_hot(input int k);
    logic [6:1] o;
    o = '0;
    o[lnk(k, 0)] = 1'b1;
    return o;
  endfunction

  // two movers 120 degrees apart, on either side of link d
  function automatic logic [6:1] vee(input int d);
    return one_hot(lnk(d, -1)) | one_hot(lnk(d, 1));
  endfunction

  // 3A pair: spectator s with head-on pair {s-1, s+2} or {s+1, s+4}
  function automatic logic [6:1] tri_a(input int s);
    return one_hot(s) | one_hot(lnk(s, -1)) | one_hot(lnk(s, 2));
  endfunction
  function automatic logic [6:1] tri_b(input int s);
    return one_hot(s) | one_hot(lnk(s, 1)) | one_hot(lnk(s, 4));
  endfunction

  logic [6:1] vel;          // pre-collision velocities
  logic [6:1] res;          // post-collision velocities
  logic       rest;
  logic       en_3a, en_4b;
  int         nmov;

  always_comb begin
    en_3a = rule_sel[0];
    en_4b = rule_sel[1];
    vel   = rot(nb.arr, 3);
    nmov  = $countones(vel);
    res   = vel;
    rest  = nb.c;

    if (nb.b) begin
      // no-slip wall: each particle leaves along the link it arrived on
      res  = nb.arr;
      rest = 1'b0;
    end else begin
      // head-on pair (2B without a rest particle, C2 with one)
      if (nmov == 2 && vel == rot(vel, 3)) begin
        res = rot(vel, TURN);
      end
      // symmetric triple (3S)
      if (!nb.c && (vel == 6'b010101 || vel == 6'b101010)) begin
        res = rot(vel, 1);
      end
      // asymmetric triple (3A)
      if (en_3a && !nb.c && nmov == 3) begin
        for (int s = 1; s <= 6; s++) begin
          if (vel == tri_a(s))      res = tri_b(s);
          else if (vel == tri_b(s)) res = tri_a(s);
        end
      end
      // rest-particle collisions (C1)
      for (int d = 1; d <= 6; d++) begin
        if (nb.c && vel == one_hot(d)) begin
          res  = vee(d);
          rest = 1'b0;
        end else if (!nb.c && vel == vee(d)) begin
          res  = one_hot(d);
          rest = 1'b1;
        end
      end
      // four-body head-on holes (4B)
      if (en_4b && !nb.c && nmov == 4 && vel == rot(vel, 3)) begin
        res = rot(vel, TURN);
      end
    end

    q.c    = rest;
    q.link = res;
    q.b    = nb.b;
  end

endmodule
