// lgm1_clock_div -- board clock divider of the LGM-1 interface.
//
// Two D flip-flops in a twisted ring (the first takes the inverted output
// of the second, the second takes the first) divide SYSCLK by four: the
// pair steps through 00, 10, 11, 01. bdclk is the second flip-flop, a
// square wave at a quarter of SYSCLK (10 MHz in, 2.5 MHz out on the
// prototype). Like the original, the flip-flops have no reset: every state
// lies on the four-state ring, so the divider runs from any power-up state.
//
// For use inside the SYSCLK domain, bdclk_en is high for the one SYSCLK
// cycle that ends with a rising edge of bdclk; the rest of the board uses
// it as a clock enable instead of clocking logic from bdclk.
module lgm1_clock_div (
  input  logic clk,        // SYSCLK
  output logic bdclk,      // SYSCLK / 4
  output logic bdclk_en    // one-cycle enable, once per bdclk period
);

  logic ff_a, ff_b;

  always_ff @(posedge clk) begin
    ff_a <= ~ff_b;
    ff_b <= ff_a;
  end

  assign bdclk    = ff_b;
  assign bdclk_en = ff_a & ~ff_b;   // ff_b rises at the next edge

endmodule
