// tb_sys8085: end-to-end test of the 8085 system at its default sizes.
//
// A program written here in machine code is placed in ROM through the load
// port while RESET IN is low. It exercises the five instruction groups
// (data transfer, arithmetic, logical, branching, machine control), the
// stack, I/O ports, RIM/SIM with SID/SOD, and all five interrupt inputs.
// Results are stored to RAM; the testbench watches the system bus and keeps
// its own copy of every memory write, which it then compares with values
// worked out by hand from the instruction descriptions (listed next to each
// instruction below).
//
// While the program runs the testbench also
//   - holds READY low during the IN instruction's I/O read (wait states),
//   - raises HOLD once and checks HLDA and that no strobe is active then,
//   - raises TRAP, RST 7.5, then RST 6.5 and RST 5.5 together (6.5 must be
//     served first), then INTR answered with RST 1 on the data bus,
//   - checks the status lines of every machine cycle against Table 4.1.
// Every mechanism is counted; one that never happened is a failure.
module tb_sys8085;
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

  // ---------------- program image ----------------
  logic [7:0] img [logic [15:0]];
  logic [15:0] loc;
  task automatic org(input logic [15:0] a); loc = a; endtask
  task automatic e(input logic [7:0] b); img[loc] = b; loc++; endtask
  task automatic e3(input logic [7:0] op, input logic [15:0] w);
    e(op); e(w[7:0]); e(w[15:8]);
  endtask

  localparam logic [15:0] FAIL = 16'h0300;

  task automatic isr(input logic [15:0 ] at, input logic [7:0] cnt_lo);
    org(at);
    e(8'hF5);                      // PUSH PSW
    e3(8'h3A, {8'h23, cnt_lo});    // LDA  23xx
    e(8'h3C);                      // INR A
    e3(8'h32, {8'h23, cnt_lo});    // STA  23xx
    e3(8'h3A, 16'h2310);           // LDA  2310h (total)
    e(8'h3C);                      // INR A
    e3(8'h32, 16'h2310);           // STA  2310h
    e(8'hF1);                      // POP PSW
    e(8'hFB);                      // EI
    e(8'hC9);                      // RET
  endtask

  task automatic build_program();
    org(16'h0000);
    e3(8'h31, 16'h4000);           // LXI SP,4000h
    e3(8'hC3, 16'h0080);           // JMP 0080h
    org(16'h0008); e3(8'hC3, 16'h0480);   // RST 1 (from INTR)
    org(16'h0024); e3(8'hC3, 16'h0400);   // TRAP
    org(16'h002C); e3(8'hC3, 16'h0420);   // RST 5.5
    org(16'h0034); e3(8'hC3, 16'h0440);   // RST 6.5
    org(16'h003C); e3(8'hC3, 16'h0460);   // RST 7.5

    // -- data transfer (the document's worked sequence) --
    org(16'h0080);
    e3(8'h21, 16'h2525);           // LXI H,2525h
    e(8'h36); e(8'h25);            // MVI M,25h      [2525]=25
    e(8'h46);                      // MOV B,M        B=25
    e(8'h2E); e(8'h26);            // MVI L,26h
    e(8'h36); e(8'h26);            // MVI M,26h      [2526]=26
    e(8'h4E);                      // MOV C,M        C=26
    e3(8'h22, 16'h4000);           // SHLD 4000h     [4000]=26 [4001]=25
    e(8'h0A);                      // LDAX B         A=[2526]=26
    e3(8'h32, 16'h2102);           // STA 2102h      26
    // -- arithmetic --
    e(8'h3E); e(8'h49);            // MVI A,49h
    e(8'hC6); e(8'h38);            // ADI 38h        A=81 S=1 AC=1 P=1 -> F=94
    e(8'hF5);                      // PUSH PSW       [3FFF]=81 [3FFE]=94
    e(8'h06); e(8'h90);            // MVI B,90h
    e(8'h80);                      // ADD B          A=11 CY=1
    e3(8'h32, 16'h2103);           // STA 2103h      11
    e(8'h3E); e(8'h05);            // MVI A,05h
    e(8'hCE); e(8'h10);            // ACI 10h        16 (CY was 1)
    e3(8'h32, 16'h2104);           // STA 2104h      16
    e(8'hD6); e(8'h20);            // SUI 20h        F6, CY=1
    e(8'hDE); e(8'h01);            // SBI 01h        F4
    e3(8'h32, 16'h2105);           // STA 2105h      F4
    e(8'h0E); e(8'h0F);            // MVI C,0Fh
    e(8'h0C);                      // INR C          10
    e(8'h79);                      // MOV A,C
    e3(8'h32, 16'h2106);           // STA 2106h      10
    e3(8'h11, 16'h00FF);           // LXI D,00FFh
    e(8'h13);                      // INX D          0100
    e3(8'h21, 16'hF000);           // LXI H,F000h
    e(8'h19);                      // DAD D          F100
    e(8'h29);                      // DAD H          E200, CY=1
    e3(8'h22, 16'h2107);           // SHLD 2107h     00 E2
    e(8'h3E); e(8'h00);            // MVI A,00h
    e(8'h17);                      // RAL            01
    e3(8'h32, 16'h2109);           // STA 2109h      01
    // -- logical --
    e(8'h3E); e(8'hA7);            // MVI A,A7h
    e(8'h07);                      // RLC            4F
    e3(8'h32, 16'h210A);
    e(8'h3E); e(8'hA7);
    e(8'h0F);                      // RRC            D3
    e3(8'h32, 16'h210B);
    e(8'h3E); e(8'hA7);
    e(8'h37); e(8'h3F);            // STC, CMC       CY=0
    e(8'h17);                      // RAL            4E
    e3(8'h32, 16'h210C);
    e(8'h3E); e(8'hA7);
    e(8'h37); e(8'h3F);
    e(8'h1F);                      // RAR            53
    e3(8'h32, 16'h210D);
    e(8'h3E); e(8'hF0);            // MVI A,F0h
    e(8'hE6); e(8'h3C);            // ANI 3Ch        30
    e(8'hEE); e(8'h0F);            // XRI 0Fh        3F
    e(8'hF6); e(8'h40);            // ORI 40h        7F
    e(8'h2F);                      // CMA            80
    e3(8'h32, 16'h210E);
    e(8'h3E); e(8'h38);            // MVI A,38h
    e(8'hC6); e(8'h45);            // ADI 45h        7D
    e(8'h27);                      // DAA            83
    e3(8'h32, 16'h210F);
    // -- branching --
    e(8'h3E); e(8'h50);            // MVI A,50h
    e(8'hFE); e(8'h60);            // CPI 60h        CY=1 Z=0
    e3(8'hDA, 16'h0180);           // JC 0180h       taken
    e3(8'hC3, FAIL);
    org(16'h0180);
    e3(8'hCA, FAIL);               // JZ             not taken
    e(8'hFE); e(8'h50);            // CPI 50h        Z=1
    e3(8'hC2, FAIL);               // JNZ            not taken
    e3(8'hCD, 16'h0200);           // CALL 0200h
    e3(8'h01, 16'h1234);           // LXI B,1234h
    e(8'hC5);                      // PUSH B
    e(8'hD1);                      // POP D          DE=1234
    e(8'hEB);                      // XCHG           HL=1234 DE=E200
    e3(8'h22, 16'h2111);           // SHLD 2111h     34 12
    e(8'hEB);                      // XCHG           HL=E200
    e(8'hE3);                      // XTHL           HL=8194, stack E200
    e3(8'h22, 16'h2113);           // SHLD 2113h     94 81
    e(8'hF1);                      // POP PSW        A=E2 F=00
    e3(8'h32, 16'h2115);           // STA 2115h      E2
    e(8'hDB); e(8'h00);            // IN 00h         A=5A (READY held low here)
    e(8'hD3); e(8'h01);            // OUT 01h        port=5A
    e3(8'h21, 16'h0500);           // LXI H,0500h
    e(8'hE9);                      // PCHL
    e3(8'hC3, FAIL);
    org(16'h0200);                 // subroutine
    e(8'h3E); e(8'h77);            // MVI A,77h
    e3(8'h32, 16'h2110);           // STA 2110h      77
    e(8'hC8);                      // RZ             (Z=1) returns
    e3(8'hC3, FAIL);
    org(FAIL);
    e(8'h3E); e(8'hEE); e(8'hD3); e(8'h01); e(8'h76);
    // -- machine control, interrupts --
    org(16'h0500);
    e(8'h3E); e(8'h08); e(8'h30);  // MVI A,08h; SIM  unmask all
    e(8'h3E); e(8'hC0); e(8'h30);  // MVI A,C0h; SIM  SOD=1
    e(8'hFB);                      // EI
    e(8'h3E); e(8'hA1);            // MVI A,A1h
    e(8'hD3); e(8'h01);            // OUT 01h        "ready for interrupts"
    e3(8'hC3, 16'h0520);
    org(16'h0520);
    e3(8'h3A, 16'h2310);           // LDA 2310h      interrupts served so far
    e(8'hFE); e(8'h05);            // CPI 05h
    e3(8'hCA, 16'h0530);           // JZ 0530h
    e(8'h76);                      // HLT            wait for the next one
    e3(8'hC3, 16'h0520);           // JMP 0520h
    org(16'h0530);
    e(8'h20);                      // RIM
    e3(8'h32, 16'h2116);           // STA 2116h      88
    e(8'hF3);                      // DI
    e(8'h3E); e(8'hAA);
    e(8'hD3); e(8'h01);            // OUT 01h        done
    e(8'h76);                      // HLT
    isr(16'h0400, 8'h00);          // TRAP    -> 2300
    isr(16'h0420, 8'h01);          // RST 5.5 -> 2301
    isr(16'h0440, 8'h02);          // RST 6.5 -> 2302
    isr(16'h0460, 8'h03);          // RST 7.5 -> 2303
    isr(16'h0480, 8'h04);          // INTR    -> 2304
  endtask

  // ---------------- bus monitor ----------------
  logic [7:0] shadow [logic [15:0]];
  logic [15:0] first_isr_write;   // counter written first in the 6.5/5.5 race
  logic        race_armed = 0;
  int n_hold = 0, n_wait_cycles = 0, n_inta = 0, n_halt = 0, n_status_bad = 0, n_cycles = 0;
  int n_ior = 0, n_iow = 0, n_mw = 0, n_mr = 0, n_of = 0;
  logic prev_ale = 0, prev_ior_n = 1;
  int ior_len = 0, last_ior_len = 0;

  always @(posedge x1) if (reset_in_n) begin
    if (!memw_n) begin
      shadow[addr] = data;
      if (race_armed && (addr == 16'h2301 || addr == 16'h2302)) begin
        first_isr_write = addr;
        race_armed = 0;
      end
    end
    if (hlda) begin
      n_hold++;
      if (!rd_n || !wr_n || ale) n_status_bad++;
    end
    if (!ior_n) ior_len++;
    if (ior_n && !prev_ior_n) begin last_ior_len = ior_len; ior_len = 0; end
    prev_ior_n = ior_n;
    // classify each machine cycle by its status and strobe (Table 4.1)
    if (!rd_n || !wr_n || !inta_n) begin
      logic [2:0] st;
      st = {io_m, s1, s0};
      if (!rd_n && !memr_n && !(st == 3'b011 || st == 3'b010)) n_status_bad++;
      if (!rd_n && !ior_n && st != 3'b110) n_status_bad++;
      if (!wr_n && !memw_n && st != 3'b001) n_status_bad++;
      if (!wr_n && !iow_n && st != 3'b101) n_status_bad++;
      if (!inta_n && st != 3'b111) n_status_bad++;
    end
    if (ale && !prev_ale) begin
      n_cycles++;
      case ({io_m, s1, s0})
        3'b011: n_of++;
        3'b010: n_mr++;
        3'b001: n_mw++;
        3'b110: n_ior++;
        3'b101: n_iow++;
        default: ;
      endcase
    end
    prev_ale = ale;
  end

  int inta_strobes = 0;
  logic prev_inta_n = 1;
  always @(posedge x1) begin
    if (!inta_n && prev_inta_n) inta_strobes++;
    prev_inta_n = inta_n;
  end

  // HALT seen: S1 S0 = 00 with no cycle running, and no ALE for a while.
  int idle_run = 0;
  always @(posedge x1) if (reset_in_n) begin
    if (!ale && rd_n && wr_n && inta_n && !s1 && !s0 && !hlda) idle_run++;
    else idle_run = 0;
    if (idle_run == 20) n_halt++;
  end

  // READY: hold low for 3 CLK OUT periods at the start of the IN cycle.
  always @(posedge x1) begin
    if (!ior_n && prev_ior_n) begin
      ready <= 0;
      repeat (6) @(posedge x1);
      ready <= 1;
    end
  end
  always @(posedge x1) if (!ready && !ior_n) n_wait_cycles++;

  // IN 00h / OUT 01h must copy the input port to the output port.
  logic saw_in_value = 0;
  always @(posedge x1) if (out_port == 8'h5A) saw_in_value = 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge x1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_total(input int n);
    while (!shadow.exists(16'h2310) || shadow[16'h2310] != 8'(n)) @(posedge x1);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [15:0] a;
    reset_in_n = 0; ready = 1; hold = 0;
    {trap, rst75, rst65, rst55, intr} = '0;
    intr_opcode = 8'hCF;           // RST 1
    sid = 1; in_port = 8'h5A;
    prog_we = 0; prog_addr = 0; prog_d = 0;
    build_program();
    repeat (4) @(posedge x1);
    // load program; clear the interrupt counters
    foreach (img[k]) begin
      prog_we <= 1; prog_addr <= k; prog_d <= img[k];
      @(posedge x1);
    end
    for (int k = 0; k <= 16; k++) begin
      prog_we <= 1; prog_addr <= 16'h2300 + 16'(k); prog_d <= 8'h00;
      @(posedge x1);
    end
    prog_we <= 0;
    repeat (4) @(posedge x1);
    shadow[16'h2310] = 8'h00;
    reset_in_n = 1;
    chk(1'b1, "reset released");

    // HOLD in the middle of the arithmetic section
    repeat (300) @(posedge x1);
    hold <= 1;
    repeat (40) @(posedge x1);
    chk(hlda, "HLDA answers HOLD");
    hold <= 0;

    // wait for "ready for interrupts"
    while (out_port != 8'hA1) @(posedge x1);
    chk(1'b1, "reached interrupt section");
    repeat (50) @(posedge x1);

    trap <= 1;                      // TRAP
    wait_total(1);
    trap <= 0;
    repeat (50) @(posedge x1);

    rst75 <= 1;                     // RST 7.5 pulse
    repeat (6) @(posedge x1);
    rst75 <= 0;
    wait_total(2);
    repeat (50) @(posedge x1);

    race_armed = 1;                 // RST 6.5 and RST 5.5 together
    rst65 <= 1; rst55 <= 1;
    while (!shadow.exists(16'h2302) || shadow[16'h2302] != 8'h01) @(posedge x1);
    rst65 <= 0;
    while (!shadow.exists(16'h2301) || shadow[16'h2301] != 8'h01) @(posedge x1);
    rst55 <= 0;
    wait_total(4);
    repeat (50) @(posedge x1);

    intr <= 1;                      // INTR, answered with RST 1
    while (inta_n) @(posedge x1);
    intr <= 0;
    wait_total(5);

    while (out_port != 8'hAA && out_port != 8'hEE) @(posedge x1);
    repeat (100) @(posedge x1);

    // ---------------- results ----------------
    chk(out_port == 8'hAA, $sformatf("program ended normally (port %h)", out_port));
    begin
      logic [15:0] ea [$] = '{16'h2525, 16'h2526, 16'h4000, 16'h4001, 16'h2102, 16'h2103,
                              16'h2104, 16'h2105, 16'h2106, 16'h2107, 16'h2108, 16'h2109,
                              16'h210A, 16'h210B, 16'h210C, 16'h210D, 16'h210E, 16'h210F,
                              16'h2110, 16'h2111, 16'h2112, 16'h2113, 16'h2114, 16'h2115,
                              16'h2116, 16'h2300, 16'h2301, 16'h2302, 16'h2303, 16'h2304,
                              16'h2310};
      logic [7:0]  ev [$] = '{8'h25, 8'h26, 8'h26, 8'h25, 8'h26, 8'h11,
                              8'h16, 8'hF4, 8'h10, 8'h00, 8'hE2, 8'h01,
                              8'h4F, 8'hD3, 8'h4E, 8'h53, 8'h80, 8'h83,
                              8'h77, 8'h34, 8'h12, 8'h94, 8'h81, 8'hE2,
                              8'h88, 8'h01, 8'h01, 8'h01, 8'h01, 8'h01,
                              8'h05};
      foreach (ea[i]) begin
        a = ea[i];
        chk(shadow.exists(a) && shadow[a] == ev[i],
            $sformatf("[%h] = %h, expected %h", a, shadow.exists(a) ? shadow[a] : 8'hxx, ev[i]));
      end
    end
    chk(first_isr_write == 16'h2302, "RST 6.5 served before RST 5.5");
    chk(sod == 1'b1, "SOD set by SIM");
    chk(saw_in_value, "IN 00h / OUT 01h moved 5Ah from input to output port");
    chk(n_status_bad == 0, $sformatf("%0d status/strobe mismatches", n_status_bad));
    chk(last_ior_len > 4 && (last_ior_len % 2) == 0,
        $sformatf("IOR strobe with wait states lasts whole CLK periods (%0d X1 cycles)", last_ior_len));
    // mechanisms
    $display("mechanisms: hold=%0d wait=%0d inta=%0d halt=%0d cycles=%0d OF=%0d MR=%0d MW=%0d IOR=%0d IOW=%0d",
             n_hold, n_wait_cycles, inta_strobes, n_halt, n_cycles, n_of, n_mr, n_mw, n_ior, n_iow);
    chk(n_hold > 0, "HOLD/HLDA happened");
    chk(n_wait_cycles > 0, "READY wait states happened");
    chk(inta_strobes > 0, "INTA cycle happened");
    chk(n_halt > 0, "HALT happened");
    chk(n_of > 0 && n_mr > 0 && n_mw > 0 && n_ior > 0 && n_iow > 0, "all machine-cycle types seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
