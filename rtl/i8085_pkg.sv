// i8085_pkg: types and constants shared by the 8085 CPU and its system.
//
// Holds the flag-register layout (S Z - AC - P - CY, bit 7 down to bit 0),
// the ALU operation codes, the machine-cycle kinds with their IO/M, S1, S0
// status encodings, and the interrupt vector addresses. The status encodings
// and vectors follow the 8085 tables; the ALU operation numbering is this
// design's own.
package i8085_pkg;

  // Flag flip-flops. Bits 5, 3 and 1 of the flag byte read as zero.
  typedef struct packed {
    logic s;   // sign: bit 7 of the result
    logic z;   // zero
    logic ac;  // auxiliary carry out of bit 3
    logic p;   // even parity
    logic cy;  // carry / borrow
  } flags_t;

  function automatic logic [7:0] flags_to_byte(flags_t f);
    return {f.s, f.z, 1'b0, f.ac, 1'b0, f.p, 1'b0, f.cy};
  endfunction

  function automatic flags_t byte_to_flags(logic [7:0] b);
    flags_t f;
    f.s  = b[7];
    f.z  = b[6];
    f.ac = b[4];
    f.p  = b[2];
    f.cy = b[0];
    return f;
  endfunction

  // ALU operations. The first eight use the 8085 opcode field ooo of
  // 10ooosss / 11ooo110 directly.
  typedef enum logic [4:0] {
    ALU_ADD = 5'd0,
    ALU_ADC = 5'd1,
    ALU_SUB = 5'd2,
    ALU_SBB = 5'd3,
    ALU_ANA = 5'd4,
    ALU_XRA = 5'd5,
    ALU_ORA = 5'd6,
    ALU_CMP = 5'd7,
    ALU_RLC = 5'd8,
    ALU_RRC = 5'd9,
    ALU_RAL = 5'd10,
    ALU_RAR = 5'd11,
    ALU_DAA = 5'd12,
    ALU_CMA = 5'd13,
    ALU_STC = 5'd14,
    ALU_CMC = 5'd15,
    ALU_INR = 5'd16,
    ALU_DCR = 5'd17,
    ALU_PASS = 5'd18
  } alu_op_t;

  // Machine-cycle kinds.
  typedef enum logic [2:0] {
    MC_OF   = 3'd0,  // opcode fetch
    MC_MR   = 3'd1,  // memory read
    MC_MW   = 3'd2,  // memory write
    MC_IOR  = 3'd3,  // I/O read
    MC_IOW  = 3'd4,  // I/O write
    MC_INTA = 3'd5   // interrupt acknowledge
  } mcycle_t;

  // {IO/M, S1, S0} of each machine cycle.
  function automatic logic [2:0] mc_status(mcycle_t k);
    case (k)
      MC_OF:   return 3'b011;
      MC_MR:   return 3'b010;
      MC_MW:   return 3'b001;
      MC_IOR:  return 3'b110;
      MC_IOW:  return 3'b101;
      default: return 3'b111;  // MC_INTA
    endcase
  endfunction

  // Vectored interrupt and restart addresses.
  localparam logic [15:0] VEC_TRAP  = 16'h0024;
  localparam logic [15:0] VEC_RST55 = 16'h002C;
  localparam logic [15:0] VEC_RST65 = 16'h0034;
  localparam logic [15:0] VEC_RST75 = 16'h003C;

  // Interrupt sources, in falling priority.
  typedef enum logic [2:0] {
    IRQ_NONE = 3'd0,
    IRQ_TRAP = 3'd1,
    IRQ_R75  = 3'd2,
    IRQ_R65  = 3'd3,
    IRQ_R55  = 3'd4,
    IRQ_INTR = 3'd5
  } irq_t;

endpackage
