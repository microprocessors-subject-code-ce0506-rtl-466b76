// tb_ctrl_decode8085: exhaustive check of the MEMR/MEMW/IOR/IOW decode over
// all eight combinations of IO/M, RD and WR.
module tb_ctrl_decode8085;
  logic io_m, rd_n, wr_n, memr_n, memw_n, ior_n, iow_n;
  int checks = 0, failures = 0;
  ctrl_decode8085 dut (.*);

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic [3:0] exp;
      {io_m, rd_n, wr_n} = 3'(i);
      #1;
      // expected strobes (1 = active): memr memw ior iow
      exp = {!io_m && !rd_n, !io_m && !wr_n, io_m && !rd_n, io_m && !wr_n};
      checks++;
      if ({!memr_n, !memw_n, !ior_n, !iow_n} !== exp) begin
        failures++;
        $display("FAIL io_m=%b rd_n=%b wr_n=%b got %b%b%b%b", io_m, rd_n, wr_n,
                 memr_n, memw_n, ior_n, iow_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
