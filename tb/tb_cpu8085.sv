// tb_cpu8085: test of the 8085 core on its own bus, with a 64 KB memory
// model in the testbench.
//
// The testbench demultiplexes AD7-AD0 with ALE like the system does, serves
// reads from its memory, and records every write. The program (machine code
// written below) covers instructions the system test does not: SUB, SBB,
// ANA, XRA, ORA, CMP, INR M, DCR M, MOV M,r, STAX B, LDAX D, LHLD, SPHL,
// CMC, Jcc on S and P, Ccc/Rcc, RST n, HLT with wake-up by RST 7.5, and an
// INTR answered with a three-byte CALL supplied over three INTA cycles.
//
// Timing: `ce` is held high, so one clock is one T-state. For each
// instruction before the interrupt part the number of T-states from its
// opcode fetch to the next one is compared with this design's cycle table
// (opcode fetch 4 T, other machine cycles 3 T). ALE must last exactly one
// T-state, RD/WR two, and the status lines must match the cycle type.
module tb_cpu8085;
  import i8085_pkg::*;

  logic clk = 0, ce = 1, rst;
  logic [7:0] a_hi, ad_out, ad_in;
  logic ad_oe, bus_oe, ale, io_m, s1, s0, rd_n, wr_n, ready, hold, hlda;
  logic trap, rst75, rst65, rst55, intr, inta_n, sid, sod;

  cpu8085 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---------------- memory model ----------------
  logic [7:0] mem [65536];
  logic [7:0] wlog [logic [15:0]];
  logic [7:0] lat_lo;
  logic [15:0] baddr;
  logic [7:0] inta_bytes [3] = '{8'hCD, 8'h00, 8'h03};  // CALL 0300h
  int inta_idx = 0;

  always_comb baddr = {a_hi, lat_lo};
  always_ff @(posedge clk) if (ale) lat_lo <= ad_out;   // ALE high for all of T1
  always_comb begin
    if (!rd_n)        ad_in = mem[baddr];
    else if (!inta_n) ad_in = inta_bytes[inta_idx];
    else              ad_in = 8'hFF;
  end
  logic prev_inta_n = 1;
  always @(posedge clk) begin
    if (inta_n && !prev_inta_n && inta_idx < 2) inta_idx++;
    prev_inta_n = inta_n;
    if (!wr_n && !io_m) begin
      mem[baddr] = ad_out;
      wlog[baddr] = ad_out;
    end
  end

  logic [15:0] loc;
  task automatic org(input logic [15:0] a); loc = a; endtask
  task automatic e(input logic [7:0] b); mem[loc] = b; loc++; endtask
  task automatic e3(input logic [7:0] op, input logic [15:0] w);
    e(op); e(w[7:0]); e(w[15:8]);
  endtask
  localparam logic [15:0] FAIL = 16'h0700;

  task automatic build();
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    org(16'h0000);
    e3(8'h31, 16'h3000);           // LXI SP,3000h
    e3(8'hC3, 16'h0080);           // JMP 0080h   (past the restart vectors)
    org(16'h0080);
    e(8'h3E); e(8'h3C);            // MVI A,3Ch
    e(8'h06); e(8'h0F);            // MVI B,0Fh
    e(8'h90);                      // SUB B       2D
    e3(8'h32, 16'h1000);           // STA 1000h
    e(8'h37);                      // STC
    e(8'h98);                      // SBB B       2D-0F-1 = 1D
    e3(8'h32, 16'h1001);
    e(8'hA0);                      // ANA B       0D
    e3(8'h32, 16'h1002);
    e(8'hAF);                      // XRA A       00, Z=1
    e3(8'hC2, FAIL);               // JNZ
    e(8'hB0);                      // ORA B       0F
    e(8'hB8);                      // CMP B       Z=1
    e3(8'hC2, FAIL);               // JNZ
    e3(8'h21, 16'h1010);           // LXI H,1010h
    e(8'h36); e(8'h7F);            // MVI M,7Fh
    e(8'h34);                      // INR M       80: S=1 P=0
    e3(8'hF2, FAIL);               // JP  (not taken)
    e3(8'hEA, FAIL);               // JPE (not taken)
    e(8'h35);                      // DCR M       7F: S=0 P=0
    e3(8'hFA, FAIL);               // JM  (not taken)
    e3(8'hE2, 16'h0100);           // JPO 0100h   taken
    e3(8'hC3, FAIL);
    org(16'h0100);
    e(8'h56);                      // MOV D,M     D=7F
    e(8'h23);                      // INX H       1011
    e(8'h72);                      // MOV M,D     [1011]=7F
    e(8'h3E); e(8'h99);            // MVI A,99h
    e3(8'h11, 16'h1020);           // LXI D,1020h
    e(8'h12);                      // STAX D      [1020]=99
    e(8'h3E); e(8'h55);            // MVI A,55h
    e3(8'h01, 16'h1021);           // LXI B,1021h
    e(8'h02);                      // STAX B      [1021]=55
    e(8'h3E); e(8'h00);            // MVI A,00h
    e3(8'h11, 16'h1021);           // LXI D,1021h
    e(8'h1A);                      // LDAX D      A=55
    e(8'h3C);                      // INR A       56
    e3(8'h32, 16'h1022);           // STA 1022h   56
    e3(8'h2A, 16'h1020);           // LHLD 1020h  HL=5599
    e3(8'h22, 16'h1023);           // SHLD 1023h  99 55
    e3(8'h21, 16'h2FF0);           // LXI H,2FF0h
    e(8'hF9);                      // SPHL
    e(8'hE5);                      // PUSH H      [2FEF]=2F [2FEE]=F0
    e(8'h37); e(8'h3F);            // STC, CMC
    e3(8'hDA, FAIL);               // JC (not taken)
    e(8'hEF);                      // RST 5 -> 0028h
    e(8'hAF);                      // XRA A       Z=1
    e3(8'hC4, FAIL);               // CNZ (not taken)
    e3(8'hCC, 16'h0200);           // CZ 0200h
    e(8'h3E); e(8'h0B);            // MVI A,0Bh   MSE, unmask 7.5 only
    e(8'h30);                      // SIM
    e(8'hFB);                      // EI
    e(8'h76);                      // HLT         woken by RST 7.5
    e(8'h76);                      // HLT         woken by INTR
    e(8'h3E); e(8'hAA);
    e3(8'h32, 16'h10FF);           // STA 10FFh   AA = done
    e(8'h76);
    org(16'h0028);                 // RST 5
    e(8'h3E); e(8'h5E); e3(8'h32, 16'h1025); e(8'hC9);
    org(16'h003C);                 // RST 7.5
    e(8'h3E); e(8'h75); e3(8'h32, 16'h1027); e(8'hFB); e(8'hC9);
    org(16'h0200);                 // called by CZ
    e(8'h3E); e(8'hC2);
    e3(8'h32, 16'h1026);
    e(8'hC0);                      // RNZ (not taken)
    e(8'hC8);                      // RZ
    e3(8'hC3, FAIL);
    org(16'h0300);                 // called through INTA
    e(8'h3E); e(8'h1A); e3(8'h32, 16'h1028); e(8'hFB); e(8'hC9);
    org(FAIL);
    e(8'h3E); e(8'hEE); e3(8'h32, 16'h10FF); e(8'h76);
  endtask

  // expected T-states of an instruction in this design
  function automatic int texp(logic [7:0] op, logic taken);
    casez (op)
      8'h76: return -1;
      8'b01???110, 8'b01110???, 8'b10???110, 8'b000?0010, 8'b000?1010: return 7;
      8'b01??????, 8'b10??????: return 4;
      8'b00110110, 8'b0011010?: return 10;             // MVI M, INR M, DCR M
      8'b00???110, 8'b11???110: return 7;
      8'b00??0001: return 10;                          // LXI
      8'b0011?010: return 13;                          // STA, LDA
      8'b0010?010: return 16;                          // SHLD, LHLD
      8'b11???010, 8'hC3: return 10;                   // Jcc, JMP
      8'b11???100: return taken ? 16 : 10;             // Ccc
      8'hCD: return 16;
      8'b11???000: return taken ? 10 : 4;              // Rcc
      8'hC9, 8'b11??0001, 8'b11??0101, 8'b11???111, 8'hD3, 8'hDB: return 10;
      8'hE3: return 19;
      default: return 4;
    endcase
  endfunction

  // ---------------- timing and status monitor ----------------
  int tcount = 0, last_fetch_t = -1;
  logic [7:0] last_op;
  logic [15:0] last_fetch_addr;
  logic timing_on = 1;
  int n_timed = 0, ale_len = 0, rd_len = 0, wr_len = 0;
  logic prev_ale = 0, prev_rd_n = 1, prev_wr_n = 1;

  always @(posedge clk) if (!rst) begin
    tcount++;
    // ALE one T-state, strobes two T-states
    if (ale) ale_len++;
    if (!ale && prev_ale) begin chk(ale_len == 1, "ALE lasts one T-state"); ale_len = 0; end
    if (!rd_n) rd_len++;
    if (rd_n && !prev_rd_n) begin chk(rd_len == 2, $sformatf("RD lasts two T-states (%0d)", rd_len)); rd_len = 0; end
    if (!wr_n) wr_len++;
    if (wr_n && !prev_wr_n) begin chk(wr_len == 2, "WR lasts two T-states"); wr_len = 0; end
    if (ale) chk({io_m, s1, s0} inside {3'b011, 3'b010, 3'b001, 3'b110, 3'b101, 3'b111},
                 "valid status at ALE");
    if (ale && !prev_ale && {io_m, s1, s0} == 3'b011) begin
      if (last_fetch_t >= 0 && timing_on) begin
        logic taken;
        int want;
        taken = ({a_hi, ad_out} != last_fetch_addr + 16'd1) &&
                ({a_hi, ad_out} != last_fetch_addr + 16'd3);
        want = texp(last_op, taken);
        if (want > 0) begin
          n_timed++;
          chk(tcount - last_fetch_t == want,
              $sformatf("opcode %h at %h took %0d T, expected %0d", last_op, last_fetch_addr,
                        tcount - last_fetch_t, want));
        end
      end
      last_fetch_t = tcount;
      last_fetch_addr = {a_hi, ad_out};
      last_op = mem[{a_hi, ad_out}];
      if (last_op == 8'h30) timing_on = 0;   // stop at SIM: interrupts follow
    end
    prev_ale = ale; prev_rd_n = rd_n; prev_wr_n = wr_n;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_write(input logic [15:0] a);
    while (!wlog.exists(a)) @(posedge clk);
  endtask

  initial begin
    int halts;
    build();
    {trap, rst75, rst65, rst55, intr, hold} = '0;
    ready = 1; sid = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait_write(16'h1026);
    // wait for HLT: S1 S0 = 00 and no strobes
    while (s1 || s0 || !rd_n || ale) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(!bus_oe && !ad_oe, "buses released in HALT");
    rst75 <= 1; @(posedge clk); rst75 <= 0;
    wait_write(16'h1027);
    repeat (20) @(posedge clk);
    intr <= 1;
    while (inta_n) @(posedge clk);
    intr <= 0;
    wait_write(16'h10FF);
    repeat (10) @(posedge clk);
    begin
      logic [15:0] ea [$] = '{16'h1000, 16'h1001, 16'h1002, 16'h1010, 16'h1011, 16'h1020,
                              16'h1021, 16'h1022, 16'h1023, 16'h1024, 16'h2FEF, 16'h2FEE,
                              16'h1025, 16'h1026, 16'h1027, 16'h1028, 16'h10FF};
      logic [7:0]  ev [$] = '{8'h2D, 8'h1D, 8'h0D, 8'h7F, 8'h7F, 8'h99,
                              8'h55, 8'h56, 8'h99, 8'h55, 8'h2F, 8'hF0,
                              8'h5E, 8'hC2, 8'h75, 8'h1A, 8'hAA};
      foreach (ea[i])
        chk(wlog.exists(ea[i]) && wlog[ea[i]] == ev[i],
            $sformatf("[%h] = %h, expected %h", ea[i], wlog.exists(ea[i]) ? wlog[ea[i]] : 8'h00, ev[i]));
    end
    chk(inta_idx == 2, $sformatf("three INTA cycles for CALL (%0d)", inta_idx + 1));
    chk(n_timed > 40, $sformatf("%0d instructions timed", n_timed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
