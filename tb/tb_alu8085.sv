// tb_alu8085: self-checking test of the 8085 ALU.
//
// Drives every operation with random operands and flag inputs and compares
// result and flags with a reference model written here from the instruction
// descriptions (plain integer arithmetic, independent of the ALU's code).
// Also checks the four rotate examples (operand A7h) by their printed
// results: RLC 4Fh, RRC D3h, RAL 4Eh (CY was 0), RAR 53h (CY was 0).
module tb_alu8085;
  import i8085_pkg::*;

  alu_op_t    op;
  logic [7:0] a, b, y;
  flags_t     fi, fo;
  int checks = 0, failures = 0;

  alu8085 dut (.op, .a, .b, .f_in(fi), .result(y), .f_out(fo));

  function automatic logic par(int v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += (v >> i) & 1;
    return (n % 2) == 0;
  endfunction

  task automatic ref_model(input alu_op_t o, input int av, input int bv, input flags_t f,
                           output int ry, output flags_t rf);
    int t, c;
    rf = f; ry = av;
    case (o)
      ALU_ADD, ALU_ADC: begin
        c = (o == ALU_ADC) ? int'(f.cy) : 0;
        t = av + bv + c;
        ry = t & 255; rf.cy = t > 255; rf.ac = ((av & 15) + (bv & 15) + c) > 15;
        rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry);
      end
      ALU_SUB, ALU_SBB, ALU_CMP: begin
        c = (o == ALU_SBB) ? int'(f.cy) : 0;
        t = av - bv - c;
        ry = t & 255; rf.cy = t < 0;
        rf.ac = ((av & 15) + ((~bv) & 15) + (1 - c)) > 15;
        rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry);
        if (o == ALU_CMP) ry = av;
      end
      ALU_ANA, ALU_XRA, ALU_ORA: begin
        ry = (o == ALU_ANA) ? (av & bv) : (o == ALU_XRA) ? (av ^ bv) : (av | bv);
        rf.cy = 0; rf.ac = (o == ALU_ANA);
        rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry);
      end
      ALU_RLC: begin ry = ((av << 1) | (av >> 7)) & 255; rf.cy = av >= 128; end
      ALU_RRC: begin ry = ((av >> 1) | ((av & 1) << 7)) & 255; rf.cy = av & 1; end
      ALU_RAL: begin ry = ((av << 1) | int'(f.cy)) & 255; rf.cy = av >= 128; end
      ALU_RAR: begin ry = (av >> 1) | (int'(f.cy) << 7); rf.cy = av & 1; end
      ALU_CMA: ry = 255 - av;
      ALU_STC: rf.cy = 1;
      ALU_CMC: rf.cy = !f.cy;
      ALU_INR: begin ry = (bv + 1) & 255; rf.ac = (bv & 15) == 15;
                     rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry); end
      ALU_DCR: begin ry = (bv + 255) & 255; rf.ac = (bv & 15) != 0;
                     rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry); end
      ALU_DAA: begin
        int adj = 0; logic cyo = f.cy;
        if ((av & 15) > 9 || f.ac) adj += 6;
        if (av > 153 || f.cy) begin adj += 96; cyo = 1; end
        t = av + adj;
        ry = t & 255; rf.cy = cyo || t > 255; rf.ac = ((av & 15) + (adj & 15)) > 15;
        rf.s = ry >= 128; rf.z = ry == 0; rf.p = par(ry);
      end
      default: ry = bv;
    endcase
  endtask

  task automatic check(input string what, input int exp_y, input flags_t exp_f);
    #1;
    checks++;
    if (y !== exp_y[7:0] || fo !== exp_f) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h fi=%b: got %h %b exp %h %b",
               what, op, a, b, fi, y, fo, exp_y[7:0], exp_f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ry; flags_t rf;
    // Printed rotate examples.
    a = 8'hA7; b = 0; fi = '0;
    op = ALU_RLC; rf = fi; rf.cy = 1; check("RLC A7", 8'h4F, rf);
    op = ALU_RRC; rf = fi; rf.cy = 1; check("RRC A7", 8'hD3, rf);
    op = ALU_RAL; rf = fi; rf.cy = 1; check("RAL A7", 8'h4E, rf);
    op = ALU_RAR; rf = fi; rf.cy = 1; check("RAR A7", 8'h53, rf);
    // BCD: 38 + 45 = 83.
    a = 8'h7D; fi = '0; op = ALU_DAA; ref_model(op, a, 0, fi, ry, rf);
    check("DAA 7D", 8'h83, rf);
    // Random sweep.
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_t'($urandom_range(0, 18));
      a  = 8'($urandom);
      b  = 8'($urandom);
      fi = flags_t'($urandom);
      ref_model(op, a, b, fi, ry, rf);
      check("random", ry, rf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
