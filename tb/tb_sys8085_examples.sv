// tb_sys8085_examples: runs the textbook example of every 8085 instruction
// on the complete system at its default sizes.
//
// Each instruction group (data transfer, arithmetic, logical, rotate,
// branch, stack and machine control, and the five addressing modes) is
// exercised with the operands of its usual worked example, for instance
// LDA 2037h, STA 2050h, LHLD 2050h, SHLD 2500h, ADI 49h, ACI 48h, SUI 55h,
// SBI 65h, CPI 87h, ANI 96h, ORI 46h, XRI 16h, the four rotates on A7h,
// JMP/JZ/CALL/CZ to 2094h, RZ and RST 3. After each one the program saves
// the accumulator and flag byte with PUSH PSW / POP PSW (or a register pair
// with PUSH/POP), so that every result appears as a memory write on the bus.
//
// The testbench records every memory and I/O write in order and compares
// the list with one worked out by hand from the instruction descriptions.
// Flag byte = S Z 0 AC 0 P 0 CY. The program ends with OUT 01h of 99h and
// HLT. A watchdog stops the run if it never gets there.
module tb_sys8085_examples;
  import i8085_pkg::*;

  logic        x1 = 0, reset_in_n, clk_out, reset_out, ready, hold, hlda;
  logic        trap, rst75, rst65, rst55, intr, inta_n, sid, sod;
  logic [7:0]  intr_opcode, in_port, out_port, prog_d, data;
  logic        prog_we;
  logic [15:0] prog_addr, addr;
  logic        ale, io_m, s1, s0, rd_n, wr_n, memr_n, memw_n, ior_n, iow_n;

  sys8085 dut (.*);
  always #5 x1 = ~x1;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---------------- program image and expected writes ----------------
  typedef struct packed {
    logic        io;
    logic [15:0] a;
    logic [7:0]  d;
  } wr_t;

  logic [7:0]  img [logic [15:0]];
  logic [15:0] loc;
  wr_t         exp_q [$];
  wr_t         got_q [$];

  task automatic org(input logic [15:0] a); loc = a; endtask
  task automatic e(input logic [7:0] b); img[loc] = b; loc++; endtask
  task automatic e2(input logic [7:0] op, input logic [7:0] b); e(op); e(b); endtask
  task automatic e3(input logic [7:0] op, input logic [15:0] w);
    e(op); e(w[7:0]); e(w[15:8]);
  endtask
  task automatic xm(input logic [15:0] a, input logic [7:0] d);
    exp_q.push_back('{io: 1'b0, a: a, d: d});
  endtask
  // Stack writes: high byte to SP-1, then low byte to SP-2.
  task automatic xpush(input logic [15:0] sp, input logic [15:0] v);
    xm(sp - 16'd1, v[15:8]);
    xm(sp - 16'd2, v[7:0]);
  endtask

  // Working stack for the checks from 0100h on.
  localparam logic [15:0] SPW = 16'h2E00;

  // PUSH PSW; POP PSW: writes A then the flag byte.
  task automatic snap(input logic [7:0] a, input logic [7:0] f);
    e(8'hF5); e(8'hF1);
    xpush(SPW, {a, f});
  endtask
  // PUSH rp; POP rp (rp = B, D or H by opcode).
  task automatic snap_rp(input logic [7:0] push_op, input logic [15:0] v);
    e(push_op); e(push_op & 8'hFB);
    xpush(SPW, v);
  endtask

  task automatic build_program();
    logic [15:0] y;
    org(16'h0000);
    e3(8'hC3, 16'h0040);                        // JMP 0040h (skip the restart vectors)
    // RST 3 service: A = 77h
    org(16'h0018);
    e2(8'h3E, 8'h77); e(8'hC9);

    // ---------- data transfer ----------
    org(16'h0040);
    e3(8'h31, 16'h3000);                        // LXI SP,3000h
    e2(8'h06, 8'h75);                           // MVI B,75H
    e3(8'h21, 16'h2074);                        // LXI H,2074H
    e2(8'h36, 8'h55);  xm(16'h2074, 8'h55);     // MVI M,55H
    e2(8'h1E, 8'h3C);                           // MVI E,3Ch
    e(8'h53);                                   // MOV D,E      D = 3C
    e(8'hD5);          xpush(16'h3000, 16'h3C3C); // PUSH D
    e2(8'h3E, 8'hA5);                           // MVI A,A5h
    e(8'h47);                                   // MOV B,A      B = A5
    e(8'hC5);          xpush(16'h2FFE, 16'hA500); // PUSH B      (C = 00 from reset)
    e3(8'h3A, 16'h2037);                        // LDA 2037H    A = [2037] = 9E
    e3(8'h32, 16'h2050); xm(16'h2050, 8'h9E);   // STA 2050H
    e3(8'h11, 16'h2074);                        // LXI D,2074H
    e(8'h1A);                                   // LDAX D       A = 55
    e3(8'h01, 16'h2080);                        // LXI B,2080H
    e(8'h02);          xm(16'h2080, 8'h55);     // STAX B
    e3(8'h2A, 16'h2050);                        // LHLD 2050H   HL = 219E
    e3(8'h22, 16'h2500); xm(16'h2500, 8'h9E); xm(16'h2501, 8'h21); // SHLD 2500H
    e(8'hEB);                                   // XCHG         DE = 219E, HL = 2074
    e(8'hD5);          xpush(16'h2FFC, 16'h219E); // PUSH D
    e(8'hE5);          xpush(16'h2FFA, 16'h2074); // PUSH H
    e3(8'h21, 16'h2F00);                        // LXI H,2F00h
    e(8'hF9);                                   // SPHL         SP = 2F00
    e(8'hE5);          xpush(16'h2F00, 16'h2F00); // PUSH H
    e3(8'h21, 16'h1234);                        // LXI H,1234h
    e(8'hE3);          xm(16'h2EFF, 8'h12); xm(16'h2EFE, 8'h34); // XTHL  HL = 2F00
    e(8'hE5);          xpush(16'h2EFE, 16'h2F00); // PUSH H
    e(8'hC1);                                   // POP B        BC = 2F00
    e(8'hE1);                                   // POP H        HL = 1234
    e(8'hC5);          xpush(16'h2F00, 16'h2F00); // PUSH B
    e(8'hE5);          xpush(16'h2EFE, 16'h1234); // PUSH H
    e3(8'h21, 16'h0100);                        // LXI H,0100h
    e(8'hE9);                                   // PCHL
    e2(8'h3E, 8'hEE); e3(8'h32, 16'h2FF0);      // (skipped by PCHL)

    // ---------- arithmetic ----------
    org(16'h0100);
    e3(8'h31, SPW);                             // LXI SP,2E00h
    e2(8'h3E, 8'h3A); e2(8'h0E, 8'hC8);         // A = 3A, C = C8
    e(8'h81);          snap(8'h02, 8'h11);      // ADD C:  3A+C8 = 1_02, AC CY
    e3(8'h21, 16'h2074);                        // HL = 2074, [2074] = 55
    e(8'h86);          snap(8'h57, 8'h00);      // ADD M:  02+55 = 57
    e(8'h37); e2(8'h16, 8'h0F);                 // STC; MVI D,0Fh
    e(8'h8A);          snap(8'h67, 8'h10);      // ADC D:  57+0F+1 = 67, AC
    e(8'h8E);          snap(8'hBC, 8'h80);      // ADC M:  67+55 = BC, S
    e2(8'hC6, 8'h49);  snap(8'h05, 8'h15);      // ADI 49H: BC+49 = 1_05, AC P CY
    e2(8'hCE, 8'h48);  snap(8'h4E, 8'h04);      // ACI 48H: 05+48+1 = 4E, P
    e3(8'h11, 16'hF000);                        // LXI D,F000h
    e(8'h19);                                   // DAD D:  2074+F000 = 1_1074
    snap(8'h4E, 8'h05);                         //         only CY changes
    snap_rp(8'hE5, 16'h1074);                   //         HL = 1074
    e(8'h94);          snap(8'h3E, 8'h10);      // SUB H:  4E-10 = 3E
    e3(8'h21, 16'h2074);
    e(8'h96);          snap(8'hE9, 8'h91);      // SUB M:  3E-55 = E9, borrow
    e(8'h9A);          snap(8'hF8, 8'h91);      // SBB D:  E9-F0-1 = F8, borrow
    e(8'h9E);          snap(8'hA2, 8'h90);      // SBB M:  F8-55-1 = A2
    e2(8'hD6, 8'h55);  snap(8'h4D, 8'h04);      // SUI 55H: A2-55 = 4D
    e2(8'hDE, 8'h65);  snap(8'hE8, 8'h95);      // SBI 65H: 4D-65 = E8, borrow
    e(8'h14);                                   // INR D:  F0 -> F1, CY kept
    e(8'h7A);          snap(8'hF1, 8'h81);      // MOV A,D
    e(8'h34);          xm(16'h2074, 8'h56);     // INR M:  55 -> 56
    snap(8'hF1, 8'h05);
    e(8'h03);          snap_rp(8'hC5, 16'h2FC9); // INX B: 2FC8 -> 2FC9
    e(8'h0D);          snap(8'hF1, 8'h91);      // DCR C:  C9 -> C8, S AC
    e(8'h35);          xm(16'h2074, 8'h55);     // DCR M:  56 -> 55
    snap(8'hF1, 8'h15);
    e(8'h1B);          snap_rp(8'hD5, 16'hF0FF); // DCX D: F100 -> F0FF

    // ---------- compare and logical ----------
    e2(8'h3E, 8'h30); e2(8'h0E, 8'h45);
    e(8'hB9);          snap(8'h30, 8'h85);      // CMP C:  30 < 45, CY
    e2(8'h3E, 8'h55);
    e(8'hBE);          snap(8'h55, 8'h54);      // CMP M:  55 = 55, Z
    e2(8'hFE, 8'h87);  snap(8'h55, 8'h81);      // CPI 87H: 55 < 87, CY
    e(8'hA1);          snap(8'h45, 8'h10);      // ANA C:  55 & 45 = 45
    e2(8'h3E, 8'h0F);
    e(8'hA6);          snap(8'h05, 8'h14);      // ANA M:  0F & 55 = 05
    e2(8'hE6, 8'h96);  snap(8'h04, 8'h10);      // ANI 96H: 05 & 96 = 04
    e(8'hB0);          snap(8'h2F, 8'h00);      // ORA B:  04 | 2F = 2F
    e(8'hB6);          snap(8'h7F, 8'h00);      // ORA M:  2F | 55 = 7F
    e2(8'h3E, 8'h80);
    e2(8'hF6, 8'h46);  snap(8'hC6, 8'h84);      // ORI 46H: 80 | 46 = C6
    e2(8'h0E, 8'hC6);
    e(8'hA9);          snap(8'h00, 8'h44);      // XRA C:  C6 ^ C6 = 00
    e(8'hAE);          snap(8'h55, 8'h04);      // XRA M:  00 ^ 55 = 55
    e2(8'hEE, 8'h16);  snap(8'h43, 8'h00);      // XRI 16H: 55 ^ 16 = 43

    // ---------- rotate and flag control ----------
    e2(8'h3E, 8'hA7);
    e(8'h07);          snap(8'h4F, 8'h01);      // RLC: A7 -> 4F, CY=1
    e2(8'h3E, 8'hA7);
    e(8'h0F);          snap(8'hD3, 8'h01);      // RRC: A7 -> D3, CY=1
    e2(8'h3E, 8'hA7); e(8'h37); e(8'h3F);       // CY = 0
    e(8'h17);          snap(8'h4E, 8'h01);      // RAL: A7 -> 4E, CY=1
    e2(8'h3E, 8'hA7); e(8'h37);
    e(8'h17);          snap(8'h4F, 8'h01);      // RAL with CY=1: A7 -> 4F
    e2(8'h3E, 8'hA7); e(8'h37); e(8'h3F);
    e(8'h1F);          snap(8'h53, 8'h01);      // RAR: A7 -> 53, CY=1
    e(8'h2F);          snap(8'hAC, 8'h01);      // CMA: 53 -> AC
    e(8'h3F);          snap(8'hAC, 8'h00);      // CMC
    e(8'h37);          snap(8'hAC, 8'h01);      // STC

    // ---------- branch ----------
    // 2094h holds: MVI A,11h; RET. Jumps reach it with a return address
    // pushed first.
    y = loc + 16'd7;
    e3(8'h21, y); e(8'hE5); xpush(SPW, y);      // LXI H,y; PUSH H
    e3(8'hC3, 16'h2094);                        // JMP 2094H
    snap(8'h11, 8'h01);
    e2(8'h3E, 8'h22);
    y = loc + 16'd7;
    e3(8'h21, y); e(8'hE5); xpush(SPW, y);
    e3(8'hCA, 16'h2094);                        // JZ 2094H: Z=0, not taken
    e(8'hE1);                                   // POP H
    snap(8'h22, 8'h01);
    e(8'hAF);                                   // XRA A: Z=1, P=1
    y = loc + 16'd7;
    e3(8'h21, y); e(8'hE5); xpush(SPW, y);
    e3(8'hCA, 16'h2094);                        // JZ 2094H: taken
    snap(8'h11, 8'h44);
    e3(8'hCD, 16'h2094); xpush(SPW, loc);       // CALL 2094H
    e2(8'h3E, 8'h00); e(8'hB7);                 // MVI A,0; ORA A: Z=1 P=1
    e3(8'hCC, 16'h2094); xpush(SPW, loc);       // CZ 2094H: taken
    snap(8'h11, 8'h44);
    e2(8'hF6, 8'h01);                           // ORI 01h: A=11, Z=0, P=1
    e3(8'hCC, 16'h2094);                        // CZ 2094H: not taken
    snap(8'h11, 8'h04);
    // 2200h holds: MVI A,33h; RZ; MVI A,44h; RET
    e3(8'hCD, 16'h2200); xpush(SPW, loc);       // Z=0: RZ not taken
    snap(8'h44, 8'h04);
    e(8'hAF);                                   // Z=1
    e3(8'hCD, 16'h2200); xpush(SPW, loc);       // RZ taken
    snap(8'h33, 8'h44);
    e(8'hDF); xpush(SPW, loc);                  // RST 3 -> 0018h: A = 77
    snap(8'h77, 8'h44);
    e(8'h00);                                   // NOP

    // ---------- addressing-mode examples ----------
    e2(8'h06, 8'h37);                           // MVI B,37H
    e3(8'h11, 16'h3100);                        // LXI D,3100H
    e2(8'h3E, 8'h10);
    e2(8'hC6, 8'h60);  snap(8'h70, 8'h00);      // ADI 60H: 10+60 = 70
    e3(8'h3A, 16'h2050);                        // LDA 2050H: 9E
    e3(8'h32, 16'h2055); xm(16'h2055, 8'h9E);   // STA 2055H
    e2(8'h0E, 8'h0C);
    e(8'h41);                                   // MOV B,C: B = 0C
    e(8'h80);          snap(8'hAA, 8'h94);      // ADD B: 9E+0C = AA, S AC P
    e3(8'h21, 16'h2500);
    e(8'h7E);                                   // MOV A,M: A = [2500] = 9E
    e(8'h12);          xm(16'h3100, 8'h9E);     // STAX D
    e(8'h2F);                                   // CMA: 61
    e(8'h17);          snap(8'hC2, 8'h94);      // RAL: 61 -> C2, CY=0

    // ---------- machine control: interrupt enable, RIM, SIM ----------
    e(8'hFB);                                   // EI
    e(8'h20);          snap(8'h8F, 8'h94);      // RIM: SID=1, IE=1, masks 111
    e(8'hF3);                                   // DI
    e(8'h20);          snap(8'h87, 8'h94);      // RIM: IE=0
    e2(8'h3E, 8'h0A);  e(8'h30);                // SIM: MSE, masks 010
    e(8'h20);          snap(8'h82, 8'h94);      // RIM
    e2(8'h3E, 8'hC0);  e(8'h30);                // SIM: SDE, SOD=1
    e2(8'h3E, 8'h99);
    e2(8'hD3, 8'h01);                           // OUT 01h
    exp_q.push_back('{io: 1'b1, a: 16'h0101, d: 8'h99});
    e(8'h76);                                   // HLT

    // ---------- RAM contents placed before reset ----------
    org(16'h2037); e(8'h9E);
    org(16'h2051); e(8'h21);
    org(16'h2094); e2(8'h3E, 8'h11); e(8'hC9);
    org(16'h2200); e2(8'h3E, 8'h33); e(8'hC8); e2(8'h3E, 8'h44); e(8'hC9);
  endtask

  // ---------------- bus monitor ----------------
  // A write is recorded when its strobe rises, with the address and data of
  // its last low sample.
  logic        prev_w = 0;
  wr_t         last_w;
  always @(posedge x1) if (reset_in_n) begin
    if (!memw_n || !iow_n) begin
      last_w = '{io: !iow_n, a: addr, d: data};
      prev_w = 1;
    end else if (prev_w) begin
      got_q.push_back(last_w);
      prev_w = 0;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge x1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    reset_in_n = 0; ready = 1; hold = 0;
    {trap, rst75, rst65, rst55, intr} = '0;
    intr_opcode = 8'hFF;
    sid = 1; in_port = 8'h00;
    prog_we = 0; prog_addr = 0; prog_d = 0;
    build_program();
    repeat (4) @(posedge x1);
    foreach (img[k]) begin
      prog_we <= 1; prog_addr <= k; prog_d <= img[k];
      @(posedge x1);
    end
    prog_we <= 0;
    repeat (4) @(posedge x1);
    reset_in_n <= 1;

    while (out_port != 8'h99) @(posedge x1);
    repeat (200) @(posedge x1);

    chk(got_q.size() == exp_q.size(),
        $sformatf("write count %0d, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size(); i++) begin
      if (i < got_q.size()) begin
        wr_t g, x;
        g = got_q[i];
        x = exp_q[i];
        chk(g.io == x.io && g.d == x.d && (x.io ? g.a[7:0] == x.a[7:0] : g.a == x.a),
            $sformatf("write %0d: got %s %h <= %h, expected %s %h <= %h", i,
                      g.io ? "io" : "mem", g.a, g.d, x.io ? "io" : "mem", x.a, x.d));
      end
    end
    chk(sod == 1'b1, "SOD set by SIM");
    chk(!s1 && !s0 && rd_n && wr_n, "halted after HLT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
