// tb_int_ctrl8085: directed test of the interrupt controller: reset state,
// SIM mask loading, EI/DI, priority order TRAP > 7.5 > 6.5 > 5.5 > INTR with
// their vectors, RST 7.5 edge latching and its SIM reset, TRAP ignoring IE
// and masks, acknowledge clearing IE, and the RIM status bits.
module tb_int_ctrl8085;
  import i8085_pkg::*;
  logic clk = 0, ce = 1, rst;
  logic trap, rst75, rst65, rst55, intr, sim_we, ei, di, ack, ie;
  logic [7:0] sim_d;
  irq_t ack_src, irq;
  logic [15:0] irq_vec;
  logic [6:0] rim_q;
  int checks = 0, failures = 0;

  int_ctrl8085 dut (.*);
  always #5 clk = ~clk;

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic exp_irq(input irq_t e, input logic [15:0] v, input string w);
    checks++;
    if (irq !== e || (e != IRQ_NONE && e != IRQ_INTR && irq_vec !== v)) begin
      failures++; $display("FAIL %s: irq=%0d vec=%h exp %0d %h", w, irq, irq_vec, e, v);
    end
  endtask

  task automatic exp_rim(input logic [6:0] e, input string w);
    checks++;
    if (rim_q !== e) begin failures++; $display("FAIL %s: rim=%b exp %b", w, rim_q, e); end
  endtask

  task automatic sim(input logic [7:0] v);
    sim_we = 1; sim_d = v; tick(); sim_we = 0;
  endtask

  task automatic do_ack(input irq_t s);
    ack = 1; ack_src = s; tick(); ack = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {trap, rst75, rst65, rst55, intr, sim_we, ei, di, ack} = '0;
    sim_d = 0; ack_src = IRQ_NONE;
    rst = 1; tick(); tick(); rst = 0;
    exp_rim(7'b000_0_111, "reset: IE clear, all masked");
    rst65 = 1; rst55 = 1; intr = 1; tick();
    exp_irq(IRQ_NONE, 0, "nothing while IE clear");
    ei = 1; tick(); ei = 0;
    exp_irq(IRQ_INTR, 0, "masked RSTs, INTR taken");
    sim(8'b0000_1000);  // MSE, unmask all
    exp_irq(IRQ_R65, VEC_RST65, "6.5 over 5.5");
    exp_rim(7'b011_1_000, "pending 6.5 5.5, IE, no masks");
    rst75 = 1; tick();
    exp_irq(IRQ_R75, VEC_RST75, "7.5 over 6.5");
    rst75 = 0; tick();
    exp_irq(IRQ_R75, VEC_RST75, "7.5 latched after pin falls");
    trap = 1; tick();
    exp_irq(IRQ_TRAP, VEC_TRAP, "TRAP highest");
    do_ack(IRQ_TRAP);
    exp_irq(IRQ_NONE, 0, "TRAP not repeated while pin stays high; IE cleared");
    trap = 0; tick();
    exp_rim(7'b111_0_000, "ack cleared IE");
    exp_irq(IRQ_NONE, 0, "no maskable with IE clear");
    ei = 1; tick(); ei = 0;
    exp_irq(IRQ_R75, VEC_RST75, "7.5 still pending");
    sim(8'b0001_0000);  // R7.5 reset, masks unchanged
    exp_irq(IRQ_R65, VEC_RST65, "7.5 cleared by SIM");
    sim(8'b0000_1010);  // mask 6.5
    exp_irq(IRQ_R55, VEC_RST55, "6.5 masked -> 5.5");
    rst55 = 0; tick();
    exp_irq(IRQ_INTR, 0, "INTR lowest");
    di = 1; tick(); di = 0;
    exp_irq(IRQ_NONE, 0, "DI blocks all maskable");
    trap = 1; tick();
    exp_irq(IRQ_TRAP, VEC_TRAP, "TRAP with IE clear");
    trap = 0; tick();
    ei = 1; tick(); ei = 0; rst75 = 1; tick(); rst75 = 0;
    do_ack(IRQ_R75);
    exp_rim(7'b010_0_010, "7.5 request and IE cleared by ack");
    // clock enable low: pins not sampled
    ei = 1; tick(); ei = 0; intr = 0; rst65 = 0;
    ce = 0; rst75 = 1; tick(); rst75 = 0; tick(); ce = 1; tick();
    exp_irq(IRQ_NONE, 0, "edge missed while ce low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
