// lgca_pkg -- shared types and helpers for the FHP lattice-gas pipeline.
//
// A lattice site is one byte. Bit 0 is B (the site is solid boundary), bits
// 1..6 are the six links of the hexagonal site (1 = left, 2 = upper left,
// 3 = upper right, 4 = right, 5 = lower right, 6 = lower left; link k and
// link k+3 point in opposite directions), and bit 7 is C (a particle at rest
// at the site). A link bit is 1 when a particle LEAVES the site along that
// link. Two sites travel together in a 16-bit word: the odd-numbered site in
// the low byte, the even-numbered site in the high byte. This encoding is the
// one the LGCA chip uses; the struct and helper names are this design's own.
package lgca_pkg;

  // One site as stored and streamed.
  typedef struct packed {
    logic       c;      // rest particle ("center")
    logic [6:1] link;   // outgoing particle on link 1..6
    logic       b;      // solid boundary site
  } site_t;

  // Two sites per stream word.
  typedef struct packed {
    site_t even;        // high byte: even-numbered site
    site_t odd;         // low byte:  odd-numbered site
  } word_t;

  // What one update processor sees for its site: the particles arriving on
  // each link (arr[k] = a neighbour sent a particle toward this site along
  // this site's link k) plus the site's own B and C bits.
  typedef struct packed {
    logic       c;
    logic [6:1] arr;
    logic       b;
  } nbhd_t;

  // Collision rule sets selected by the C1,C0 pins.
  typedef enum logic [1:0] {
    RS_BASE   = 2'd0,   // 2B, 3S, C1, C2
    RS_3A     = 2'd1,   // 2B, 3S, 3A, C1, C2
    RS_4B     = 2'd2,   // 2B, 3S, C1, C2, 4B
    RS_ALL    = 2'd3    // 2B, 3S, C1, C2, 3A, 4B
  } ruleset_e;

  // Link k rotated by r steps of 60 degrees (toward higher numbers), 1..6.
  function automatic int unsigned lnk(input int k, input int r);
    int v;
    v = ((k - 1 + r) % 6 + 6) % 6;
    return v + 1;
  endfunction

  // Rotate a 6-bit link set by r steps toward higher link numbers.
  function automatic logic [6:1] rot(input logic [6:1] s, input int r);
    logic [6:1] o;
    for (int k = 1; k <= 6; k++) o[lnk(k, r)] = s[k];
    return o;
  endfunction

endpackage
