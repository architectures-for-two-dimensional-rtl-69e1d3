// lgca_neighborhood_gen -- neighbourhood generator of the LGCA chip.
//
// The stream carries two sites per word: word w holds odd site 2w+1 (a
// site of an upper physical row) and even site 2w+2 (the site below and half
// a column to the right). With R words per row pair, the two sites of word m
// are updated from the word row above (words m-R-1, m-R), their own row
// (m-1, m, m+1) and the row below (m+R, m+R+1). This block keeps exactly
// those bytes in a window of nine registers:
//   bottom: low bytes of words n, n-1, n-2       (n = word just taken in)
//   middle: full words n-R, n-R-1, n-R-2         (m = n-R-1)
//   top:    high bytes of words n-2R, n-2R-1, n-2R-2
// The middle row is fed by the first line delay, the top row by the second.
// Two bytes are kept only as spare storage (low byte of n-2, high byte of
// n-2R), as on the chip.
//
// It then turns the neighbours' OUTGOING link bits into INCOMING link bits
// for each of the two sites: arr[k] is the neighbour across link k sending
// toward this site, which is that neighbour's link k+3. For the odd site:
//   link1 <- left  (low  m-1), link2 <- upper left  (high m-R-1),
//   link3 <- upper right (high m-R), link4 <- right (low m+1),
//   link5 <- lower right (high m),   link6 <- lower left (high m-1).
// For the even site:
//   link1 <- left (high m-1), link2 <- upper left (low m),
//   link3 <- upper right (low m+1), link4 <- right (high m+1),
//   link5 <- lower right (low m+R+1), link6 <- lower left (low m+R).
// These dependencies are the chip's; the register naming is this design's.
// The window does not know the column: at the left and right edges a site
// sees the sites at the other end of the neighbouring row, so the sides of
// the lattice wrap as the raster scan dictates.
//
// Timing: on each enabled edge the window shifts by one word; the outputs
// are combinational from the registers and belong to word m = n-R-1.
module lgca_neighborhood_gen
  import lgca_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  word_t  din,       // word n, the word being taken in
  input  word_t  mid_in,    // word n-R, from the first line delay
  input  word_t  top_in,    // word n-2R, from the second line delay
  output nbhd_t  odd_nb,    // incoming configuration of the odd site of m
  output nbhd_t  even_nb    // incoming configuration of the even site of m
);

  site_t bot0, bot1, bot2;  // low bytes of n, n-1, n-2
  word_t mid0, mid1, mid2;  // words n-R, n-R-1 (= m), n-R-2
  site_t top0, top1, top2;  // high bytes of n-2R, n-2R-1, n-2R-2

  always_ff @(posedge clk) begin
    if (en) begin
      bot0 <= din.odd;
      bot1 <= bot0;
      bot2 <= bot1;
      mid0 <= mid_in;
      mid1 <= mid0;
      mid2 <= mid1;
      top0 <= top_in.even;
      top1 <= top0;
      top2 <= top1;
    end
  end

  always_comb begin
    odd_nb.b      = mid1.odd.b;
    odd_nb.c      = mid1.odd.c;
    odd_nb.arr[1] = mid2.odd.link[4];
    odd_nb.arr[2] = top2.link[5];
    odd_nb.arr[3] = top1.link[6];
    odd_nb.arr[4] = mid0.odd.link[1];
    odd_nb.arr[5] = mid1.even.link[2];
    odd_nb.arr[6] = mid2.even.link[3];

    even_nb.b      = mid1.even.b;
    even_nb.c      = mid1.even.c;
    even_nb.arr[1] = mid2.even.link[4];
    even_nb.arr[2] = mid1.odd.link[5];
    even_nb.arr[3] = mid0.odd.link[6];
    even_nb.arr[4] = mid0.even.link[1];
    even_nb.arr[5] = bot0.link[2];
    even_nb.arr[6] = bot1.link[3];
  end

  // bot2 (the low byte of n-2) is spare storage and feeds nothing.

endmodule
