// alu8085: the 8-bit arithmetic/logic unit of the 8085 with its flag logic.
//
// Purely combinational. `a` is the accumulator, `b` the second operand (a
// register, memory byte or immediate byte, held in the temp register by the
// CPU). `op` selects the operation; `result` is the new accumulator (or, for
// INR/DCR, the new value of the operand) and `f_out` the new flags.
//
// Flag rules follow the instruction descriptions: ADD/ADC/SUB/SBB/CMP set all
// five flags; subtraction sets CY on borrow; ORA/XRA reset CY and AC; rotates
// change only CY; CMA changes nothing; STC/CMC touch only CY; INR/DCR change
// S, Z, AC, P and keep CY. Choices of this design where the description says
// less: ANA clears CY and sets AC, as the 8085 does; AC of a subtraction is
// the carry out of bit 3 of A + ~B + ~borrow (two's-complement add); DAA uses
// the usual BCD adjust (+06h if low digit > 9 or AC, +60h if high digit > 9
// or CY).
module alu8085
  import i8085_pkg::*;
(
  input  alu_op_t     op,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  flags_t      f_in,
  output logic [7:0]  result,
  output flags_t      f_out
);

  logic [8:0] sum;
  logic [4:0] nib;
  logic       cin;
  logic [7:0] bx;
  logic [7:0] daa_add;
  logic       daa_cy;

  function automatic logic parity_even(logic [7:0] v);
    return ~^v;
  endfunction

  always_comb begin
    result = a;
    f_out  = f_in;
    sum    = '0;
    nib    = '0;
    cin    = 1'b0;
    bx     = b;
    daa_add = '0;
    daa_cy  = 1'b0;

    unique case (op)
      ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBB, ALU_CMP: begin
        // Subtraction is A + ~B + 1 (SUB, CMP) or A + ~B + ~CY (SBB).
        bx  = (op == ALU_SUB || op == ALU_SBB || op == ALU_CMP) ? ~b : b;
        cin = (op == ALU_ADC) ? f_in.cy :
              (op == ALU_SUB || op == ALU_CMP) ? 1'b1 :
              (op == ALU_SBB) ? ~f_in.cy : 1'b0;
        sum = {1'b0, a} + {1'b0, bx} + {8'd0, cin};
        nib = {1'b0, a[3:0]} + {1'b0, bx[3:0]} + {4'd0, cin};
        f_out.cy = (op == ALU_ADD || op == ALU_ADC) ? sum[8] : ~sum[8];
        f_out.ac = nib[4];
        f_out.s  = sum[7];
        f_out.z  = (sum[7:0] == 8'd0);
        f_out.p  = parity_even(sum[7:0]);
        result   = (op == ALU_CMP) ? a : sum[7:0];
      end
      ALU_ANA, ALU_XRA, ALU_ORA: begin
        result   = (op == ALU_ANA) ? (a & b) : (op == ALU_XRA) ? (a ^ b) : (a | b);
        f_out.cy = 1'b0;
        f_out.ac = (op == ALU_ANA);
        f_out.s  = result[7];
        f_out.z  = (result == 8'd0);
        f_out.p  = parity_even(result);
      end
      ALU_RLC: begin
        result   = {a[6:0], a[7]};
        f_out.cy = a[7];
      end
      ALU_RRC: begin
        result   = {a[0], a[7:1]};
        f_out.cy = a[0];
      end
      ALU_RAL: begin
        result   = {a[6:0], f_in.cy};
        f_out.cy = a[7];
      end
      ALU_RAR: begin
        result   = {f_in.cy, a[7:1]};
        f_out.cy = a[0];
      end
      ALU_DAA: begin
        if (a[3:0] > 4'd9 || f_in.ac) daa_add[3:0] = 4'h6;
        if (a > 8'h99 || f_in.cy) begin
          daa_add[7:4] = 4'h6;
          daa_cy       = 1'b1;
        end
        sum      = {1'b0, a} + {1'b0, daa_add};
        nib      = {1'b0, a[3:0]} + {1'b0, daa_add[3:0]};
        result   = sum[7:0];
        f_out.cy = daa_cy | sum[8];
        f_out.ac = nib[4];
        f_out.s  = result[7];
        f_out.z  = (result == 8'd0);
        f_out.p  = parity_even(result);
      end
      ALU_CMA: result = ~a;
      ALU_STC: f_out.cy = 1'b1;
      ALU_CMC: f_out.cy = ~f_in.cy;
      ALU_INR, ALU_DCR: begin
        result   = (op == ALU_INR) ? b + 8'd1 : b - 8'd1;
        f_out.ac = (op == ALU_INR) ? (b[3:0] == 4'hF) : (b[3:0] != 4'h0);
        f_out.s  = result[7];
        f_out.z  = (result == 8'd0);
        f_out.p  = parity_even(result);
      end
      default: result = b;  // ALU_PASS
    endcase
  end

endmodule
