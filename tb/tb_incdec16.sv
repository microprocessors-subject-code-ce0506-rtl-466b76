// tb_incdec16: checks the 16-bit incrementer/decrementer, including the
// wrap-around at FFFFh and 0000h, against integer arithmetic.
module tb_incdec16;
  logic [15:0] d, q;
  logic dec;
  int checks = 0, failures = 0;
  incdec16 dut (.d, .dec, .q);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input logic [15:0] dv, input logic dd);
    int e;
    d = dv; dec = dd; #1;
    e = dd ? (int'(dv) + 65535) % 65536 : (int'(dv) + 1) % 65536;
    checks++;
    if (q !== 16'(e)) begin failures++; $display("FAIL d=%h dec=%b q=%h", dv, dd, q); end
  endtask

  initial begin
    t(16'hFFFF, 0); t(16'h0000, 1); t(16'h00FF, 0); t(16'h0100, 1);
    for (int i = 0; i < 1000; i++) t(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
