// incdec16: the 16-bit incrementer/decrementer of the 8085 register array.
//
// Combinational: q = d + 1 when `dec` is low, d - 1 when it is high. The CPU
// uses copies of it to step the program counter after each fetched byte, to
// move the stack pointer for PUSH/POP/CALL/RET, for INX/DCX and to form the
// second address of LHLD/SHLD/XTHL. The document names the unit only; a plain
// adder is this design's choice of how to build it.
module incdec16 (
  input  logic [15:0] d,
  input  logic        dec,
  output logic [15:0] q
);
  always_comb q = dec ? d - 16'd1 : d + 16'd1;
endmodule
