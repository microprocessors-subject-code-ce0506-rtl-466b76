// tb_addr_latch373: checks that the latch follows AD while G (ALE) is high,
// holds the address after G falls while AD changes to data, and that OC
// high disables the output. Uses the demultiplexing example of address
// 2005h and data 4Fh.
module tb_addr_latch373;
  logic g, oc_n;
  logic [7:0] d, q;
  int checks = 0, failures = 0;
  addr_latch373 dut (.g, .oc_n, .d, .q);

  task automatic expect_q(input logic [7:0] e, input string w);
    #1; checks++;
    if (q !== e) begin failures++; $display("FAIL %s: q=%h exp %h", w, q, e); end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oc_n = 0; g = 1; d = 8'h05;      expect_q(8'h05, "transparent");
    d = 8'h33;                       expect_q(8'h33, "follows");
    d = 8'h05;                       expect_q(8'h05, "address");
    g = 0; #1; d = 8'h4F;            expect_q(8'h05, "hold after ALE falls");
    oc_n = 1;                        expect_q(8'h00, "output off");
    oc_n = 0;                        expect_q(8'h05, "output on");
    for (int i = 0; i < 50; i++) begin
      automatic logic [7:0] v = 8'($urandom);
      g = 1; d = v; #1; g = 0; #1; d = ~v;
      expect_q(v, "random hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
