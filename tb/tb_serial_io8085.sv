// tb_serial_io8085: checks SOD is loaded from bit 7 only when SIM has bit 6
// (SDE) set, that it holds otherwise, and that SID reaches sid_bit one
// enabled clock later.
module tb_serial_io8085;
  logic clk = 0, ce = 1, rst, sim_we, sid, sod, sid_bit;
  logic [7:0] sim_d;
  int checks = 0, failures = 0;
  serial_io8085 dut (.*);
  always #5 clk = ~clk;

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic chk(input logic g, input logic e, input string w);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %b exp %b", w, g, e); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    sim_we = 0; sim_d = 0; sid = 0;
    rst = 1; tick(); rst = 0;
    chk(sod, 0, "reset");
    sim_we = 1; sim_d = 8'hC0; tick(); sim_we = 0; chk(sod, 1, "SOD=1 with SDE");
    sim_we = 1; sim_d = 8'h08; tick(); sim_we = 0; chk(sod, 1, "no SDE keeps SOD");
    sim_we = 1; sim_d = 8'h40; tick(); sim_we = 0; chk(sod, 0, "SOD=0 with SDE");
    sid = 1; tick(); chk(sid_bit, 1, "SID sampled");
    sid = 0; tick(); chk(sid_bit, 0, "SID sampled 0");
    model = 0;
    for (int i = 0; i < 500; i++) begin
      sim_we = 1'($urandom); sim_d = 8'($urandom); sid = 1'($urandom);
      tick();
      if (sim_we && sim_d[6]) model = sim_d[7];
      chk(sod, model, "random SOD");
      chk(sid_bit, sid, "random SID");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
