// addr_latch373: octal transparent latch used to demultiplex AD7-AD0.
//
// While ALE (the latch enable G) is high the output follows AD7-AD0, which in
// the first T-state of a machine cycle carry address bits A7-A0; when ALE
// falls the latch holds that address for the rest of the cycle while AD7-AD0
// carry data. `oc_n` is the output control: low drives the output, high turns
// it off, which in a two-state model reads as zero. This is the 74LS373 role
// shown in the ALE figure. The storage is a level-sensitive latch on
// purpose, as in the 74LS373; synthesis reports its eight latch bits.
module addr_latch373 (
  input  logic       g,
  input  logic       oc_n,
  input  logic [7:0] d,
  output logic [7:0] q
);
  logic [7:0] lat;
  always_latch begin
    if (g) lat = d;
  end
  assign q = oc_n ? 8'h00 : lat;
endmodule
