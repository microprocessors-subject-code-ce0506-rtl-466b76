// tb_sys_memory: checks the ROM/RAM: load-port writes to both regions, bus
// reads with MEMR, bus writes with MEMW reaching RAM but not ROM, no `hit`
// without MEMR or outside both regions, against a reference array.
module tb_sys_memory;
  localparam int ROMB = 256, RAMB = 512;
  logic clk = 0;
  logic [15:0] addr, prog_addr;
  logic [7:0] din, dout, prog_d;
  logic memr_n, memw_n, hit, prog_we;
  int checks = 0, failures = 0;

  sys_memory #(.ROM_BYTES(ROMB), .RAM_BYTES(RAMB)) dut (.*);
  always #5 clk = ~clk;

  logic [7:0] ref_m [logic [15:0]];

  function automatic logic mapped(logic [15:0] a);
    return (a < ROMB) || (a >= 16'h2000 && a < 16'h2000 + RAMB);
  endfunction

  function automatic logic [15:0] rnd_addr();
    case ($urandom_range(0, 2))
      0: return 16'($urandom_range(0, ROMB - 1));
      1: return 16'h2000 + 16'($urandom_range(0, RAMB - 1));
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    memr_n = 1; memw_n = 1; prog_we = 0; addr = 0; din = 0; prog_addr = 0; prog_d = 0;
    // load every mapped byte
    for (int a = 0; a < ROMB; a++) begin
      prog_we = 1; prog_addr = 16'(a); prog_d = 8'($urandom); ref_m[16'(a)] = prog_d; @(posedge clk); #1;
    end
    for (int a = 0; a < RAMB; a++) begin
      prog_we = 1; prog_addr = 16'h2000 + 16'(a); prog_d = 8'($urandom);
      ref_m[16'h2000 + 16'(a)] = prog_d; @(posedge clk); #1;
    end
    prog_we = 0;
    for (int i = 0; i < 3000; i++) begin
      addr = rnd_addr();
      if ($urandom_range(0, 1)) begin
        // bus write
        din = 8'($urandom); memw_n = 0; memr_n = 1;
        @(posedge clk); #1; memw_n = 1;
        if (addr >= 16'h2000 && addr < 16'h2000 + RAMB) ref_m[addr] = din;
      end
      memr_n = 0; #1;
      checks++;
      if (hit !== mapped(addr) || (mapped(addr) && dout !== ref_m[addr])) begin
        failures++; $display("FAIL read %h: hit=%b dout=%h exp %h", addr, hit, dout,
                             mapped(addr) ? ref_m[addr] : 8'h00);
      end
      memr_n = 1; #1;
      checks++;
      if (hit !== 1'b0) begin failures++; $display("FAIL hit without MEMR"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
