// int_ctrl8085: 8085 interrupt control.
//
// Takes the five interrupt pins and picks the highest-priority request that
// may be taken, in the order TRAP, RST 7.5, RST 6.5, RST 5.5, INTR. TRAP is
// not maskable. RST 7.5/6.5/5.5 need the interrupt-enable flip-flop (IE) set
// and their SIM mask bit clear; INTR needs IE. `irq` names the request and
// `irq_vec` is its restart address (TRAP 0024h, RST 5.5 002Ch, RST 6.5 0034h,
// RST 7.5 003Ch; INTR has none, its opcode comes from the INTA cycle).
//
// SIM (sim_we, sim_d = accumulator): D3 (MSE) set loads the masks from D2..D0;
// D4 set clears the RST 7.5 request flip-flop. RIM status `rim_q` is
// {I7.5, I6.5, I5.5, IE, M7.5, M6.5, M5.5}, bits 6..0 of the RIM byte; bit 7
// (SID) comes from the serial block. EI sets IE, DI clears it. The CPU pulses
// `ack` with `ack_src` when it takes an interrupt; this clears IE and the
// request latch of that source.
//
// Pins are sampled on clock edges with `ce` high. Choices of this design
// where the description is silent: RST 7.5 and TRAP are caught on a rising
// edge (RST 7.5 stays pending until taken or cleared by SIM; TRAP must also
// still be high when taken), RST 6.5/5.5 and INTR are level-sensitive, reset
// masks all three RST inputs and clears IE, and taking any interrupt
// (TRAP included) clears IE.
module int_ctrl8085
  import i8085_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic        rst,
  input  logic        trap,
  input  logic        rst75,
  input  logic        rst65,
  input  logic        rst55,
  input  logic        intr,
  input  logic        sim_we,
  input  logic [7:0]  sim_d,
  input  logic        ei,
  input  logic        di,
  input  logic        ack,
  input  irq_t        ack_src,
  output irq_t        irq,
  output logic [15:0] irq_vec,
  output logic [6:0]  rim_q,
  output logic        ie
);

  logic trap_q, r75_q;        // previous pin samples
  logic trap_ff, r75_ff;      // edge-caught requests
  logic m75, m65, m55;        // masks
  logic ie_q;

  assign ie    = ie_q;
  assign rim_q = {r75_ff, rst65, rst55, ie_q, m75, m65, m55};

  always_comb begin
    irq     = IRQ_NONE;
    irq_vec = 16'h0000;
    if (trap_ff && trap) begin
      irq = IRQ_TRAP;  irq_vec = VEC_TRAP;
    end else if (ie_q && !m75 && r75_ff) begin
      irq = IRQ_R75;   irq_vec = VEC_RST75;
    end else if (ie_q && !m65 && rst65) begin
      irq = IRQ_R65;   irq_vec = VEC_RST65;
    end else if (ie_q && !m55 && rst55) begin
      irq = IRQ_R55;   irq_vec = VEC_RST55;
    end else if (ie_q && intr) begin
      irq = IRQ_INTR;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trap_q  <= 1'b0;
      r75_q   <= 1'b0;
      trap_ff <= 1'b0;
      r75_ff  <= 1'b0;
      m75     <= 1'b1;
      m65     <= 1'b1;
      m55     <= 1'b1;
      ie_q    <= 1'b0;
    end else if (ce) begin
      trap_q <= trap;
      r75_q  <= rst75;
      if (trap && !trap_q) trap_ff <= 1'b1;
      else if (ack && ack_src == IRQ_TRAP) trap_ff <= 1'b0;
      if (rst75 && !r75_q) r75_ff <= 1'b1;
      else if ((ack && ack_src == IRQ_R75) || (sim_we && sim_d[4])) r75_ff <= 1'b0;
      if (sim_we && sim_d[3]) begin
        m75 <= sim_d[2];
        m65 <= sim_d[1];
        m55 <= sim_d[0];
      end
      if (ack || di) ie_q <= 1'b0;
      else if (ei) ie_q <= 1'b1;
    end
  end

endmodule
