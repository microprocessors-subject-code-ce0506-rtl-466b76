// tb_clk_reset_gen: checks CLK OUT runs at half the X1 frequency, that `ce`
// marks one X1 cycle per CLK OUT period (just before CLK OUT rises), and
// that RESET IN low yields reset and RESET OUT two X1 edges later.
module tb_clk_reset_gen;
  logic x1 = 0, reset_in_n, clk_out, ce, rst, reset_out;
  int checks = 0, failures = 0;
  clk_reset_gen dut (.*);
  always #5 x1 = ~x1;

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x1_edges, co_rises, ces;
    logic prev_co;
    reset_in_n = 0;
    repeat (3) @(posedge x1);
    #1 chk(rst && reset_out, "reset follows RESET IN");
    reset_in_n = 1;
    @(posedge x1); #1 chk(rst, "reset still high one edge later");
    @(posedge x1); #1 chk(!rst && !reset_out, "reset released two edges later");
    x1_edges = 0; co_rises = 0; ces = 0; prev_co = clk_out;
    repeat (200) begin
      logic ce_before;
      ce_before = ce;
      @(posedge x1); #1;
      x1_edges++;
      if (ce_before) ces++;
      if (clk_out && !prev_co) begin
        co_rises++;
        chk(ce_before, "ce high in the x1 cycle before CLK OUT rises");
      end
      prev_co = clk_out;
    end
    chk(co_rises == 100, $sformatf("CLK OUT = X1/2 (%0d rises in 200)", co_rises));
    chk(ces == 100, $sformatf("one ce per CLK OUT (%0d)", ces));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
