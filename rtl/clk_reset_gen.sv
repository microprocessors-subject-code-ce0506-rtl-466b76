// clk_reset_gen: 8085 clock generator and reset logic.
//
// `x1` is the oscillator clock that a crystal on X1/X2 would produce. The
// processor state changes at half that rate: CLK OUT is x1 divided by two,
// and `ce` is high for the one x1 cycle that ends in a rising edge of CLK OUT,
// so logic clocked by x1 and enabled by `ce` steps once per CLK OUT period
// (one T-state). RESET IN (active low) is passed through two flip-flops to
// give the internal reset `rst`, which is also driven out as RESET OUT for
// the rest of the system. The divide-by-two follows the clock pin
// description; the two-stage synchroniser and the clock-enable scheme are
// this design's choices.
module clk_reset_gen (
  input  logic x1,
  input  logic reset_in_n,
  output logic clk_out,
  output logic ce,
  output logic rst,
  output logic reset_out
);
  logic div_q;
  logic r1, r2;

  always_ff @(posedge x1) begin
    div_q <= ~div_q;
    r1    <= ~reset_in_n;
    r2    <= r1;
  end

  assign clk_out   = div_q;
  assign ce        = ~div_q;
  assign rst       = r2;
  assign reset_out = r2;
endmodule
