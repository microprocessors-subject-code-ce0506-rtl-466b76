// tb_reg_array8085: random test of the register array against a reference
// copy kept in the testbench: 8-bit writes by register code, pair writes
// (BC, DE, HL, SP), W/Z writes, PC writes, XCHG, read ports, the clock
// enable and reset (PC = 0).
module tb_reg_array8085;
  logic clk = 0, ce, rst;
  logic [2:0] r_sel, r_wsel;
  logic [7:0] r_q, r_d, w_d, z_d;
  logic [1:0] rp_sel, rp_wsel;
  logic [15:0] rp_q, bc, de, hl, sp, pc, wz, rp_d, pc_d;
  logic r_we, rp_we, w_we, z_we, pc_we, xchg;
  int checks = 0, failures = 0;

  reg_array8085 dut (.*);
  always #5 clk = ~clk;

  logic [7:0] m [6];
  logic [7:0] mw, mz;
  logic [15:0] msp, mpc;

  task automatic cmp(input string w, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {r_we, rp_we, w_we, z_we, pc_we, xchg} = '0;
    r_sel = 0; rp_sel = 0; r_wsel = 0; rp_wsel = 0; r_d = 0; rp_d = 0; w_d = 0; z_d = 0; pc_d = 0;
    ce = 1; rst = 1;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 6; i++) m[i] = 0;
    mw = 0; mz = 0; msp = 0; mpc = 0;
    cmp("pc after reset", pc, 16'h0000);
    for (int i = 0; i < 3000; i++) begin
      ce    = ($urandom_range(0, 3) != 0);
      r_we  = 1'($urandom); r_wsel = 3'($urandom); r_d = 8'($urandom);
      rp_we = ($urandom_range(0, 3) == 0); rp_wsel = 2'($urandom); rp_d = 16'($urandom);
      w_we  = 1'($urandom); w_d = 8'($urandom);
      z_we  = 1'($urandom); z_d = 8'($urandom);
      pc_we = 1'($urandom); pc_d = 16'($urandom);
      xchg  = ($urandom_range(0, 7) == 0);
      r_sel = 3'($urandom); rp_sel = 2'($urandom);
      @(posedge clk);
      if (ce) begin
        logic [7:0] n [6];
        for (int k = 0; k < 6; k++) n[k] = m[k];
        if (r_we && r_wsel < 6) n[r_wsel] = r_d;
        if (xchg) begin n[2] = m[4]; n[3] = m[5]; n[4] = m[2]; n[5] = m[3]; end
        if (rp_we) begin
          if (rp_wsel == 3) msp = rp_d;
          else begin n[2*rp_wsel] = rp_d[15:8]; n[2*rp_wsel+1] = rp_d[7:0]; end
        end
        for (int k = 0; k < 6; k++) m[k] = n[k];
        if (w_we) mw = w_d;
        if (z_we) mz = z_d;
        if (pc_we) mpc = pc_d;
      end
      #1;
      cmp("bc", bc, {m[0], m[1]});
      cmp("de", de, {m[2], m[3]});
      cmp("hl", hl, {m[4], m[5]});
      cmp("sp", sp, msp);
      cmp("pc", pc, mpc);
      cmp("wz", wz, {mw, mz});
      cmp("r_q", {8'h0, r_q}, {8'h0, (r_sel < 6) ? m[r_sel] : 8'h00});
      cmp("rp_q", rp_q, (rp_sel == 3) ? msp : {m[2*rp_sel], m[2*rp_sel+1]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
