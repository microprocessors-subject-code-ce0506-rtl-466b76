// tb_io_ports: checks the input port is driven only for IOR at its address,
// the output latch loads only for IOW at its address and holds otherwise,
// and reset clears it.
module tb_io_ports;
  logic clk = 0, rst, ior_n, iow_n, hit;
  logic [7:0] port_addr, din, in_pins, out_pins, dout;
  int checks = 0, failures = 0;
  io_ports #(.IN_ADDR(8'h00), .OUT_ADDR(8'h01)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model;
    ior_n = 1; iow_n = 1; port_addr = 0; din = 0; in_pins = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    chk(out_pins == 0, "reset clears output");
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      port_addr = ($urandom_range(0, 3) == 0) ? 8'($urandom) : 8'($urandom_range(0, 1));
      din = 8'($urandom); in_pins = 8'($urandom);
      ior_n = 1'($urandom); iow_n = 1'($urandom);
      #1;
      chk(hit == (!ior_n && port_addr == 0), "input hit");
      chk(!hit || dout == in_pins, "input data");
      @(posedge clk); #1;
      if (!iow_n && port_addr == 8'h01) model = din;
      chk(out_pins == model, $sformatf("output latch %h exp %h", out_pins, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
