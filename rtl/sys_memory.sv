// sys_memory: the ROM and read/write memory of the 8085 system.
//
// Two arrays on the demultiplexed bus: a ROM of ROM_BYTES at ROM_BASE and a
// RAM of RAM_BYTES at RAM_BASE. A read is combinational: while MEMR is low and
// the address falls in either region, `dout` holds the byte and `hit` is high
// so the system drives it onto the data bus. A write to the RAM happens on
// each rising clock edge while MEMW is low; writes to the ROM region from the
// bus are ignored. The load port (prog_we/prog_addr/prog_d) writes either
// region directly and stands in for programming the ROM before the CPU runs.
//
// The document asks only for ROM and RAM; the sizes, addresses and the load
// port are this design's choices (8 KB ROM at 0000h, 16 KB RAM at 2000h,
// which holds the example addresses 2050h, 2500h and 4000h used with LDA,
// SHLD and friends).
module sys_memory #(
  parameter int unsigned ROM_BYTES = 8192,
  parameter logic [15:0] ROM_BASE  = 16'h0000,
  parameter int unsigned RAM_BYTES = 16384,
  parameter logic [15:0] RAM_BASE  = 16'h2000
) (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic [7:0]  din,
  input  logic        memr_n,
  input  logic        memw_n,
  output logic [7:0]  dout,
  output logic        hit,
  input  logic        prog_we,
  input  logic [15:0] prog_addr,
  input  logic [7:0]  prog_d
);
  localparam int RA = $clog2(ROM_BYTES);
  localparam int WA = $clog2(RAM_BYTES);

  logic [7:0] rom [ROM_BYTES];
  logic [7:0] ram [RAM_BYTES];

  logic [15:0] rom_off, ram_off, prog_rom_off, prog_ram_off;
  logic in_rom, in_ram, prog_in_rom, prog_in_ram;

  // base <= a < base + size, worked out with a signed offset
  function automatic logic in_region(logic [15:0] a, logic [15:0] base, int size);
    int off;
    off = int'(a) - int'(base);
    return (off >= 0) && (off < size);
  endfunction

  always_comb begin
    rom_off      = addr - ROM_BASE;
    ram_off      = addr - RAM_BASE;
    prog_rom_off = prog_addr - ROM_BASE;
    prog_ram_off = prog_addr - RAM_BASE;
    in_rom       = in_region(addr, ROM_BASE, ROM_BYTES);
    in_ram       = in_region(addr, RAM_BASE, RAM_BYTES);
    prog_in_rom  = in_region(prog_addr, ROM_BASE, ROM_BYTES);
    prog_in_ram  = in_region(prog_addr, RAM_BASE, RAM_BYTES);
    hit  = !memr_n && (in_rom || in_ram);
    dout = !hit ? 8'h00 : in_rom ? rom[rom_off[RA-1:0]] : ram[ram_off[WA-1:0]];
  end

  always_ff @(posedge clk) begin
    if (prog_we && prog_in_rom) rom[prog_rom_off[RA-1:0]] <= prog_d;
  end

  always_ff @(posedge clk) begin
    if (prog_we && prog_in_ram) ram[prog_ram_off[WA-1:0]] <= prog_d;
    else if (!memw_n && in_ram) ram[ram_off[WA-1:0]] <= din;
  end
endmodule
