// reg_array8085: the 8085 register array (B, C, D, E, H, L, the W/Z
// temporaries, stack pointer and program counter).
//
// Registers are selected with the 8085 instruction fields: an 8-bit register
// by its 3-bit code (B=0 C=1 D=2 E=3 H=4 L=5; codes 6 (M) and 7 (A) are not
// in this array and read as 0, writes to them are ignored) and a pair by its
// 2-bit code (BC=0 DE=1 HL=2 SP=3). One 8-bit write port, one pair write
// port, separate W and Z writes, a PC write and an XCHG swap of DE and HL.
// All writes happen on a clock edge with `ce` high; when the 8-bit and the
// pair port hit the same register the pair port wins. Reset clears PC (RESET
// IN sets the program counter to 0); the other registers are cleared too,
// which is this design's choice.
module reg_array8085 (
  input  logic        clk,
  input  logic        ce,
  input  logic        rst,
  // read ports
  input  logic [2:0]  r_sel,
  output logic [7:0]  r_q,
  input  logic [1:0]  rp_sel,
  output logic [15:0] rp_q,
  output logic [15:0] bc,
  output logic [15:0] de,
  output logic [15:0] hl,
  output logic [15:0] sp,
  output logic [15:0] pc,
  output logic [15:0] wz,
  // write ports
  input  logic        r_we,
  input  logic [2:0]  r_wsel,
  input  logic [7:0]  r_d,
  input  logic        rp_we,
  input  logic [1:0]  rp_wsel,
  input  logic [15:0] rp_d,
  input  logic        w_we,
  input  logic [7:0]  w_d,
  input  logic        z_we,
  input  logic [7:0]  z_d,
  input  logic        pc_we,
  input  logic [15:0] pc_d,
  input  logic        xchg
);

  logic [7:0] regs [6];   // B C D E H L
  logic [7:0] w_q, z_q;
  logic [15:0] sp_q, pc_q;

  assign bc = {regs[0], regs[1]};
  assign de = {regs[2], regs[3]};
  assign hl = {regs[4], regs[5]};
  assign sp = sp_q;
  assign pc = pc_q;
  assign wz = {w_q, z_q};

  always_comb begin
    r_q = (r_sel < 3'd6) ? regs[r_sel] : 8'd0;
    unique case (rp_sel)
      2'd0: rp_q = bc;
      2'd1: rp_q = de;
      2'd2: rp_q = hl;
      default: rp_q = sp_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 6; i++) regs[i] <= 8'd0;
      w_q  <= 8'd0;
      z_q  <= 8'd0;
      sp_q <= 16'd0;
      pc_q <= 16'd0;
    end else if (ce) begin
      if (r_we && r_wsel < 3'd6) regs[r_wsel] <= r_d;
      if (xchg) begin
        regs[2] <= regs[4];
        regs[3] <= regs[5];
        regs[4] <= regs[2];
        regs[5] <= regs[3];
      end
      if (rp_we) begin
        unique case (rp_wsel)
          2'd0: {regs[0], regs[1]} <= rp_d;
          2'd1: {regs[2], regs[3]} <= rp_d;
          2'd2: {regs[4], regs[5]} <= rp_d;
          default: sp_q <= rp_d;
        endcase
      end
      if (w_we) w_q <= w_d;
      if (z_we) z_q <= z_d;
      if (pc_we) pc_q <= pc_d;
    end
  end

endmodule
