// cpu8085: the 8085 processor core (timing and control, instruction register
// and decoder, accumulator, temp register, flag flip-flops, bus buffers).
//
// How it works. Every instruction is a sequence of machine cycles: an opcode
// fetch (T1..T4) followed by zero to five memory or I/O cycles (T1..T3). One
// T-state passes on each rising edge of `clk` with `ce` high (one CLK OUT
// period). In T1 ALE is high, A15-A8 carry the high address byte and AD7-AD0
// the low byte; IO/M, S1 and S0 give the cycle type (opcode fetch 011, memory
// read 010, memory write 001, I/O read 110, I/O write 101, interrupt
// acknowledge 111). In T2 and T3 RD (or WR, or INTA) is low; a write drives
// its data on AD7-AD0. READY is sampled at the end of T2: while it is low the
// cycle stays in T2 (wait states). Read data is taken from AD7-AD0 at the end
// of T3. An opcode fetch uses T4 to decode; the instruction step that ends a
// cycle decides the next cycle. A 16-bit address taken from the program
// counter is incremented at the end of the cycle that used it.
//
// At the end of every instruction the interrupt controller is consulted.
// TRAP and RST 7.5/6.5/5.5 spend one idle T-state, push PC and jump to their
// vector. INTR runs an interrupt-acknowledge cycle instead of an opcode fetch,
// reads the opcode (RST n, or CALL whose address bytes then also come from
// acknowledge cycles) from the bus and executes it without advancing PC. HLT
// stops the processor (S1 S0 = 00, buses released) until an interrupt or
// reset. HOLD is honoured between machine cycles: HLDA rises and the
// address, data and control lines are released until HOLD falls.
//
// Released lines are reported with `bus_oe` (A15-A8, IO/M, RD, WR) and
// `ad_oe` (AD7-AD0); RD, WR and INTA then read high, as a pull-up would give.
// The buses are also released, and ALE held low, while reset is active.
//
// Follows the document: the register set and programming model, the five
// flags, the instruction set and its flag effects, Table 4.1 status codes,
// interrupt priorities and vectors, RIM/SIM bit layout, ALE demultiplexing,
// READY/HOLD/HLDA and RESET IN behaviour. This design's own choices, where
// the document gives no timing: opcode encodings are those of the 8085;
// every opcode fetch takes 4 T-states and every other cycle 3 (plus waits);
// 16-bit work (INX, DCX, DAD, SPHL, PCHL) finishes within T4; a conditional
// jump or call always reads both address bytes; undefined opcodes act as
// NOP.
module cpu8085
  import i8085_pkg::*;
(
  input  logic        clk,
  input  logic        ce,
  input  logic        rst,
  // bus
  output logic [7:0]  a_hi,
  output logic [7:0]  ad_out,
  output logic        ad_oe,
  input  logic [7:0]  ad_in,
  output logic        bus_oe,
  output logic        ale,
  output logic        io_m,
  output logic        s1,
  output logic        s0,
  output logic        rd_n,
  output logic        wr_n,
  input  logic        ready,
  // DMA
  input  logic        hold,
  output logic        hlda,
  // interrupts
  input  logic        trap,
  input  logic        rst75,
  input  logic        rst65,
  input  logic        rst55,
  input  logic        intr,
  output logic        inta_n,
  // serial
  input  logic        sid,
  output logic        sod
);

  typedef enum logic [2:0] {
    TS_T1, TS_T2, TS_T3, TS_T4, TS_HALT, TS_HOLD
  } tstate_t;

  // ------------------------------------------------------------------
  // State
  // ------------------------------------------------------------------
  tstate_t     ts;
  mcycle_t     mc_kind;
  logic        mc_use_pc;   // address is PC
  logic        mc_inc_pc;   // PC advances at the end of this cycle
  logic        mc_fetch;    // opcode cycle (goes on to T4)
  logic [15:0] mc_addr;
  logic [7:0]  mc_wdata;
  logic [2:0]  step;
  logic [7:0]  ir;
  logic [7:0]  acc;
  flags_t      flg;
  logic        inta_mode;   // executing an opcode supplied by INTA
  logic        vec_mode;    // executing a TRAP/RST x.5 call
  logic [15:0] vec_q;

  // ------------------------------------------------------------------
  // Register array, incrementers, ALU, interrupt and serial control
  // ------------------------------------------------------------------
  logic [2:0]  r_sel;
  logic [7:0]  r_q;
  logic [15:0] rp_q, bc, de, hl, sp, pc, wz;
  logic        r_we, rp_we, w_we, z_we, pc_we, xchg;
  logic [2:0]  r_wsel;
  logic [1:0]  rp_wsel;
  logic [7:0]  r_d, w_d, z_d;
  logic [15:0] rp_d, pc_d;

  reg_array8085 u_regs (
    .clk, .ce, .rst,
    .r_sel, .r_q, .rp_sel(ir[5:4]), .rp_q,
    .bc, .de, .hl, .sp, .pc, .wz,
    .r_we, .r_wsel, .r_d, .rp_we, .rp_wsel, .rp_d,
    .w_we, .w_d, .z_we, .z_d, .pc_we, .pc_d, .xchg
  );

  logic [15:0] pc_inc, sp_inc, sp_dec, wz_inc, rp_step;
  incdec16 u_pc_inc (.d(pc),   .dec(1'b0),  .q(pc_inc));
  incdec16 u_sp_inc (.d(sp),   .dec(1'b0),  .q(sp_inc));
  incdec16 u_sp_dec (.d(sp),   .dec(1'b1),  .q(sp_dec));
  incdec16 u_wz_inc (.d(wz),   .dec(1'b0),  .q(wz_inc));
  incdec16 u_rp_id  (.d(rp_q), .dec(ir[3]), .q(rp_step));

  alu_op_t    alu_op;
  logic [7:0] alu_b, alu_y;
  flags_t     alu_f;
  alu8085 u_alu (.op(alu_op), .a(acc), .b(alu_b), .f_in(flg), .result(alu_y), .f_out(alu_f));

  logic        sim_we, ei_x, di_x, int_ack;
  irq_t        irq, ack_src;
  logic [15:0] irq_vec;
  logic [6:0]  rim_q;
  logic        sid_bit;

  int_ctrl8085 u_int (
    .clk, .ce, .rst, .trap, .rst75, .rst65, .rst55, .intr,
    .sim_we, .sim_d(acc), .ei(ei_x), .di(di_x), .ack(int_ack), .ack_src,
    .irq, .irq_vec, .rim_q, .ie()
  );

  serial_io8085 u_ser (
    .clk, .ce, .rst, .sim_we, .sim_d(acc), .sid, .sod, .sid_bit
  );

  // ------------------------------------------------------------------
  // Bus outputs, decoded from the T-state and the current cycle
  // ------------------------------------------------------------------
  logic [15:0] cur_addr;
  logic        in_cycle, is_read, is_write, is_inta;
  logic [2:0]  st;

  always_comb begin
    cur_addr = mc_use_pc ? pc : mc_addr;
    in_cycle = (ts == TS_T1) || (ts == TS_T2) || (ts == TS_T3) || (ts == TS_T4);
    is_inta  = (mc_kind == MC_INTA);
    is_write = (mc_kind == MC_MW) || (mc_kind == MC_IOW);
    is_read  = !is_write && !is_inta;
    st       = mc_status(mc_kind);

    // While reset is held the buses float, as in HALT and HOLD.
    bus_oe = in_cycle && !rst;
    hlda   = (ts == TS_HOLD) || (ts == TS_HALT && hold);
    ale    = (ts == TS_T1) && !rst;
    a_hi   = in_cycle ? cur_addr[15:8] : 8'h00;
    io_m   = in_cycle ? st[2] : 1'b0;
    s1     = in_cycle ? st[1] : 1'b0;
    s0     = in_cycle ? st[0] : 1'b0;
    rd_n   = !(((ts == TS_T2) || (ts == TS_T3)) && is_read);
    wr_n   = !(((ts == TS_T2) || (ts == TS_T3)) && is_write);
    inta_n = !(((ts == TS_T2) || (ts == TS_T3)) && is_inta);
    ad_oe  = !rst && ((ts == TS_T1) || (((ts == TS_T2) || (ts == TS_T3)) && is_write));
    ad_out = (ts == TS_T1) ? cur_addr[7:0] : (ad_oe ? mc_wdata : 8'h00);
  end

  // Assertions on bus rules: never read and write at once; ALE only in T1.
  always @(posedge clk) begin
    if (!rst) begin
      assert (rd_n || wr_n) else $error("RD and WR both active");
      assert (!(ale && (!rd_n || !wr_n))) else $error("strobe active during ALE");
    end
  end

  // ------------------------------------------------------------------
  // Instruction decode and sequencing
  // ------------------------------------------------------------------
  logic [2:0] ddd, sss;
  logic [1:0] rpf;
  assign ddd = ir[5:3];
  assign sss = ir[2:0];
  assign rpf = ir[5:4];

  logic [7:0] src8;       // register operand named by sss (or ddd for INR/DCR)
  logic       cond;
  logic       ev;         // an instruction step ends on this edge
  logic       pc_inc_ev;  // the current cycle's PC increment happens now
  logic [15:0] pc_now;    // PC as it will be after this edge
  logic       ir_ld;

  always_comb begin
    r_sel = (ir[7:6] == 2'b00) ? ddd : sss;
    src8  = (r_sel == 3'd7) ? acc : r_q;
    unique case (ddd)
      3'd0: cond = !flg.z;
      3'd1: cond =  flg.z;
      3'd2: cond = !flg.cy;
      3'd3: cond =  flg.cy;
      3'd4: cond = !flg.p;
      3'd5: cond =  flg.p;
      3'd6: cond = !flg.s;
      default: cond = flg.s;
    endcase
    ev        = ce && (((ts == TS_T3) && !mc_fetch) || (ts == TS_T4));
    ir_ld     = ce && (ts == TS_T3) && mc_fetch;
    pc_inc_ev = ce && (ts == TS_T3) && mc_inc_pc;
    pc_now    = pc_inc_ev ? pc_inc : pc;
  end

  // ALU operand and operation
  always_comb begin
    alu_op = ALU_PASS;
    alu_b  = src8;
    if (ir[7:6] == 2'b10) begin
      alu_op = alu_op_t'({2'b00, ir[5:3]});
      alu_b  = (sss == 3'd6) ? ad_in : src8;
    end else if (ir[7:6] == 2'b11 && sss == 3'd6) begin
      alu_op = alu_op_t'({2'b00, ir[5:3]});
      alu_b  = ad_in;
    end else if (ir[7:6] == 2'b00 && (sss == 3'd4 || sss == 3'd5)) begin
      alu_op = (sss == 3'd4) ? ALU_INR : ALU_DCR;
      alu_b  = (ddd == 3'd6) ? ad_in : src8;
    end else if (ir[7:6] == 2'b00 && sss == 3'd7) begin
      alu_op = alu_op_t'(5'd8 + {2'b00, ir[5:3]});
    end
  end

  // Next-cycle request and register writes for the step ending at `ev`.
  logic        x_done;       // instruction complete
  logic        x_issue;      // start another machine cycle
  mcycle_t     x_kind;
  logic        x_use_pc;     // next cycle addressed by PC (and advances it)
  logic [15:0] x_addr;
  logic [7:0]  x_wdata;
  logic        x_halt;
  logic        a_we, f_we;
  logic [7:0]  a_d;
  flags_t      f_d;
  logic        x_pc_we;
  logic [15:0] x_pc_d;
  logic [16:0] dad_sum;
  logic [15:0] rst_target;

  always_comb begin
    x_done   = 1'b0;
    x_issue  = 1'b0;
    x_kind   = MC_MR;
    x_use_pc = 1'b0;
    x_addr   = 16'h0000;
    x_wdata  = 8'h00;
    x_halt   = 1'b0;
    a_we = 1'b0;  a_d = alu_y;
    f_we = 1'b0;  f_d = alu_f;
    r_we = 1'b0;  r_wsel = ddd;  r_d = 8'h00;
    rp_we = 1'b0; rp_wsel = rpf; rp_d = 16'h0000;
    w_we = 1'b0;  w_d = ad_in;
    z_we = 1'b0;  z_d = ad_in;
    x_pc_we = 1'b0; x_pc_d = 16'h0000;
    xchg = 1'b0;
    sim_we = 1'b0; ei_x = 1'b0; di_x = 1'b0;
    dad_sum = {1'b0, hl} + {1'b0, rp_q};
    rst_target = vec_mode ? vec_q : {10'd0, ir[5:3], 3'b000};

    if (ev) begin
      casez (ir)
        // ---------------- MOV / HLT ----------------
        8'b01??????: begin
          if (ir == 8'h76) begin
            x_done = 1'b1;
            x_halt = 1'b1;
          end else if (sss == 3'd6) begin                 // MOV r,M
            if (step == 3'd0) begin
              x_issue = 1'b1; x_kind = MC_MR; x_addr = hl;
            end else begin
              x_done = 1'b1;
              if (ddd == 3'd7) begin a_we = 1'b1; a_d = ad_in; end
              else begin r_we = 1'b1; r_d = ad_in; end
            end
          end else if (ddd == 3'd6) begin                 // MOV M,r
            if (step == 3'd0) begin
              x_issue = 1'b1; x_kind = MC_MW; x_addr = hl; x_wdata = src8;
            end else x_done = 1'b1;
          end else begin                                  // MOV r,r
            x_done = 1'b1;
            if (ddd == 3'd7) begin a_we = 1'b1; a_d = src8; end
            else begin r_we = 1'b1; r_d = src8; end
          end
        end
        // ---------------- ALU r / ALU M ----------------
        8'b10??????: begin
          if (sss == 3'd6 && step == 3'd0) begin
            x_issue = 1'b1; x_kind = MC_MR; x_addr = hl;
          end else begin
            x_done = 1'b1;
            f_we = 1'b1;
            a_we = (ddd != 3'd7);  // CMP keeps A
          end
        end
        // ---------------- ALU immediate ----------------
        8'b11???110: begin
          if (step == 3'd0) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
          end else begin
            x_done = 1'b1;
            f_we = 1'b1;
            a_we = (ddd != 3'd7);
          end
        end
        // ---------------- MVI ----------------
        8'b00???110: begin
          if (step == 3'd0) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
          end else if (ddd == 3'd6 && step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MW; x_addr = hl; x_wdata = ad_in;
          end else begin
            x_done = 1'b1;
            if (ddd == 3'd7) begin a_we = 1'b1; a_d = ad_in; end
            else if (ddd != 3'd6) begin r_we = 1'b1; r_d = ad_in; end
          end
        end
        // ---------------- INR / DCR ----------------
        8'b00???10?: begin
          if (ddd == 3'd6) begin
            if (step == 3'd0) begin
              x_issue = 1'b1; x_kind = MC_MR; x_addr = hl;
            end else if (step == 3'd1) begin
              x_issue = 1'b1; x_kind = MC_MW; x_addr = hl; x_wdata = alu_y;
              f_we = 1'b1;
            end else x_done = 1'b1;
          end else begin
            x_done = 1'b1;
            f_we = 1'b1;
            if (ddd == 3'd7) begin a_we = 1'b1; a_d = alu_y; end
            else begin r_we = 1'b1; r_d = alu_y; end
          end
        end
        // ---------------- rotates, DAA, CMA, STC, CMC ----------------
        8'b00???111: begin
          x_done = 1'b1;
          f_we = 1'b1;
          a_we = 1'b1;
        end
        // ---------------- LXI ----------------
        8'b00??0001: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
            z_we = (step == 3'd1);
          end else begin
            x_done = 1'b1;
            rp_we = 1'b1; rp_d = {ad_in, wz[7:0]};
          end
        end
        // ---------------- DAD ----------------
        8'b00??1001: begin
          x_done = 1'b1;
          rp_we = 1'b1; rp_wsel = 2'd2; rp_d = dad_sum[15:0];
          f_we = 1'b1; f_d = flg; f_d.cy = dad_sum[16];
        end
        // ---------------- INX / DCX ----------------
        8'b00???011: begin
          x_done = 1'b1;
          rp_we = 1'b1; rp_d = rp_step;
        end
        // ---------------- STAX / LDAX ----------------
        8'b000?0010, 8'b000?1010: begin
          if (step == 3'd0) begin
            x_issue = 1'b1;
            x_kind  = ir[3] ? MC_MR : MC_MW;
            x_addr  = ir[4] ? de : bc;
            x_wdata = acc;
          end else begin
            x_done = 1'b1;
            if (ir[3]) begin a_we = 1'b1; a_d = ad_in; end
          end
        end
        // ---------------- SHLD / LHLD / STA / LDA ----------------
        8'b001??010: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
            z_we = (step == 3'd1);
          end else if (step == 3'd2) begin
            w_we = 1'b1;
            x_issue = 1'b1;
            x_addr  = {ad_in, wz[7:0]};
            unique case (ir[4:3])
              2'b00: begin x_kind = MC_MW; x_wdata = hl[7:0]; end  // SHLD
              2'b01: x_kind = MC_MR;                                // LHLD
              2'b10: begin x_kind = MC_MW; x_wdata = acc; end       // STA
              default: x_kind = MC_MR;                              // LDA
            endcase
          end else if (step == 3'd3 && ir[4] == 1'b0) begin
            x_issue = 1'b1; x_addr = wz_inc;
            if (ir[3]) begin
              x_kind = MC_MR;                                       // LHLD: L done
              r_we = 1'b1; r_wsel = 3'd5; r_d = ad_in;
            end else begin
              x_kind = MC_MW; x_wdata = hl[15:8];                   // SHLD: H next
            end
          end else begin
            x_done = 1'b1;
            if (ir == 8'h3A) begin a_we = 1'b1; a_d = ad_in; end
            if (ir == 8'h2A) begin r_we = 1'b1; r_wsel = 3'd4; r_d = ad_in; end
          end
        end
        // ---------------- RIM / SIM / NOP and undefined 00xxx000 --------
        8'b00???000: begin
          x_done = 1'b1;
          if (ir == 8'h20) begin a_we = 1'b1; a_d = {sid_bit, rim_q}; end
          if (ir == 8'h30) sim_we = 1'b1;
        end
        // ---------------- Rcc / RET ----------------
        8'b11???000, 8'hC9, 8'hD9: begin
          if (step == 3'd0 && ir[0] == 1'b0 && !cond) x_done = 1'b1;
          else if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MR; x_addr = sp;
            rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_inc;
            z_we = (step == 3'd1);
          end else begin
            x_done = 1'b1;
            x_pc_we = 1'b1; x_pc_d = {ad_in, wz[7:0]};
          end
        end
        // ---------------- POP ----------------
        8'b11??0001: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MR; x_addr = sp;
            rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_inc;
            z_we = (step == 3'd1);
          end else begin
            x_done = 1'b1;
            if (rpf == 2'd3) begin
              a_we = 1'b1; a_d = ad_in;
              f_we = 1'b1; f_d = byte_to_flags(wz[7:0]);
            end else begin
              rp_we = 1'b1; rp_d = {ad_in, wz[7:0]};
            end
          end
        end
        // ---------------- PCHL / SPHL ----------------
        8'hE9: begin x_done = 1'b1; x_pc_we = 1'b1; x_pc_d = hl; end
        8'hF9: begin x_done = 1'b1; rp_we = 1'b1; rp_wsel = 2'd3; rp_d = hl; end
        // ---------------- Jcc / JMP ----------------
        8'b11???010, 8'hC3, 8'hCB: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
            z_we = (step == 3'd1);
          end else begin
            x_done = 1'b1;
            if (ir[0] || cond) begin x_pc_we = 1'b1; x_pc_d = {ad_in, wz[7:0]}; end
          end
        end
        // ---------------- OUT / IN ----------------
        8'hD3, 8'hDB: begin
          if (step == 3'd0) begin
            x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
          end else if (step == 3'd1) begin
            x_issue = 1'b1; x_addr = {ad_in, ad_in};
            x_kind  = ir[3] ? MC_IOR : MC_IOW;
            x_wdata = acc;
          end else begin
            x_done = 1'b1;
            if (ir[3]) begin a_we = 1'b1; a_d = ad_in; end
          end
        end
        // ---------------- XTHL ----------------
        8'hE3: begin
          unique case (step)
            3'd0: begin x_issue = 1'b1; x_kind = MC_MR; x_addr = sp; end
            3'd1: begin x_issue = 1'b1; x_kind = MC_MR; x_addr = sp_inc; z_we = 1'b1; end
            3'd2: begin x_issue = 1'b1; x_kind = MC_MW; x_addr = sp_inc; x_wdata = hl[15:8];
                        w_we = 1'b1; end
            3'd3: begin x_issue = 1'b1; x_kind = MC_MW; x_addr = sp; x_wdata = hl[7:0]; end
            default: begin x_done = 1'b1; rp_we = 1'b1; rp_wsel = 2'd2; rp_d = wz; end
          endcase
        end
        // ---------------- XCHG / DI / EI ----------------
        8'hEB: begin x_done = 1'b1; xchg = 1'b1; end
        8'hF3: begin x_done = 1'b1; di_x = 1'b1; end
        8'hFB: begin x_done = 1'b1; ei_x = 1'b1; end
        // ---------------- Ccc / CALL ----------------
        8'b11???100, 8'hCD: begin
          unique case (step)
            3'd0, 3'd1: begin
              x_issue = 1'b1; x_kind = MC_MR; x_use_pc = 1'b1;
              z_we = (step == 3'd1);
            end
            3'd2: begin
              w_we = 1'b1;
              if (ir[0] || cond) begin
                x_issue = 1'b1; x_kind = MC_MW; x_addr = sp_dec; x_wdata = pc_now[15:8];
                rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_dec;
              end else x_done = 1'b1;
            end
            3'd3: begin
              x_issue = 1'b1; x_kind = MC_MW; x_addr = sp_dec; x_wdata = pc_now[7:0];
              rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_dec;
            end
            default: begin x_done = 1'b1; x_pc_we = 1'b1; x_pc_d = wz; end
          endcase
        end
        // ---------------- PUSH ----------------
        8'b11??0101: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MW; x_addr = sp_dec;
            rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_dec;
            if (rpf == 2'd3) x_wdata = (step == 3'd0) ? acc : flags_to_byte(flg);
            else             x_wdata = (step == 3'd0) ? rp_q[15:8] : rp_q[7:0];
          end else x_done = 1'b1;
        end
        // ---------------- RST n (also TRAP / RST x.5 entry) ----------------
        8'b11???111: begin
          if (step == 3'd0 || step == 3'd1) begin
            x_issue = 1'b1; x_kind = MC_MW; x_addr = sp_dec;
            x_wdata = (step == 3'd0) ? pc_now[15:8] : pc_now[7:0];
            rp_we = 1'b1; rp_wsel = 2'd3; rp_d = sp_dec;
          end else begin
            x_done = 1'b1; x_pc_we = 1'b1; x_pc_d = rst_target;
          end
        end
        default: x_done = 1'b1;  // DD, ED, FD: no operation
      endcase
    end
  end

  // Machine-cycle operand reads from PC turn into acknowledge cycles while
  // an INTA-supplied instruction runs (PC is not advanced).
  mcycle_t x_kind_eff;
  assign x_kind_eff = (x_use_pc && inta_mode) ? MC_INTA : x_kind;

  // Instruction boundary: interrupt, halt or next fetch.
  logic bnd;        // boundary decision on this edge
  logic take_irq;
  always_comb begin
    bnd      = (ev && x_done) || (ce && ts == TS_HALT);
    take_irq = bnd && (irq == IRQ_TRAP ||
                       (irq != IRQ_NONE && !(ev && ir == 8'hF3)));  // DI blocks at once
    int_ack  = take_irq;
    ack_src  = irq;
  end

  // PC write arbitration: an instruction's own PC write wins.
  always_comb begin
    pc_we = x_pc_we || pc_inc_ev;
    pc_d  = x_pc_we ? x_pc_d : pc_inc;
  end

  // ------------------------------------------------------------------
  // Sequencer registers
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ts        <= TS_T1;
      mc_kind   <= MC_OF;
      mc_use_pc <= 1'b1;
      mc_inc_pc <= 1'b1;
      mc_fetch  <= 1'b1;
      mc_addr   <= 16'h0000;
      mc_wdata  <= 8'h00;
      step      <= 3'd0;
      ir        <= 8'h00;
      acc       <= 8'h00;
      flg       <= '0;
      inta_mode <= 1'b0;
      vec_mode  <= 1'b0;
      vec_q     <= 16'h0000;
    end else if (ce) begin
      if (a_we) acc <= a_d;
      if (f_we) flg <= f_d;
      if (ir_ld) ir <= ad_in;

      unique case (ts)
        TS_T1: ts <= TS_T2;
        TS_T2: if (ready) ts <= TS_T3;
        TS_T3: if (mc_fetch) ts <= TS_T4;
        TS_HOLD: if (!hold) ts <= TS_T1;
        default: ;
      endcase

      if (ev && x_issue) begin
        mc_kind   <= x_kind_eff;
        mc_use_pc <= x_use_pc;
        mc_inc_pc <= x_use_pc && !inta_mode;
        mc_fetch  <= 1'b0;
        mc_addr   <= x_addr;
        mc_wdata  <= x_wdata;
        step      <= step + 3'd1;
        ts        <= hold ? TS_HOLD : TS_T1;
      end

      if (bnd) begin
        step     <= 3'd0;
        mc_addr  <= 16'h0000;
        mc_wdata <= 8'h00;
        if (take_irq && irq == IRQ_INTR) begin
          // Acknowledge cycle replaces the opcode fetch.
          mc_kind   <= MC_INTA;
          mc_use_pc <= 1'b1;
          mc_inc_pc <= 1'b0;
          mc_fetch  <= 1'b1;
          inta_mode <= 1'b1;
          vec_mode  <= 1'b0;
          ts        <= hold ? TS_HOLD : TS_T1;
        end else if (take_irq) begin
          // One idle T-state, then push PC and jump to the vector.
          ir        <= 8'hFF;
          vec_mode  <= 1'b1;
          vec_q     <= irq_vec;
          inta_mode <= 1'b0;
          mc_kind   <= MC_OF;
          mc_fetch  <= 1'b1;
          mc_use_pc <= 1'b1;
          mc_inc_pc <= 1'b0;
          ts        <= TS_T4;
        end else if ((ev && x_halt) || ts == TS_HALT) begin
          ts        <= TS_HALT;
          inta_mode <= 1'b0;
          vec_mode  <= 1'b0;
        end else begin
          mc_kind   <= MC_OF;
          mc_use_pc <= 1'b1;
          mc_inc_pc <= 1'b1;
          mc_fetch  <= 1'b1;
          inta_mode <= 1'b0;
          vec_mode  <= 1'b0;
          ts        <= hold ? TS_HOLD : TS_T1;
        end
      end
    end
  end

endmodule
