// sys8085: a complete 8085 microcomputer: processor, clock and reset,
// address latch, control-signal decoder, ROM/RAM and an input and an output
// port on one system bus.
//
// The processor multiplexes the low address byte and the data on AD7-AD0.
// An address latch captures A7-A0 while ALE is high, so the system address
// bus is {A15-A8, latched A7-A0} for the whole machine cycle. IO/M, RD and WR
// are combined into MEMR, MEMW, IOR and IOW, which select the memory or an
// I/O port. The data bus is driven by whichever agent owns it: the
// processor (address in T1, write data), the memory (MEMR), the input port
// (IOR), or, during an interrupt acknowledge, the interrupting device, which
// supplies `intr_opcode` (normally an RST n opcode). With no driver the bus
// reads FFh, as a pull-up would give.
//
// `x1` is the oscillator clock (twice CLK OUT). Everything is clocked by x1;
// the processor advances one T-state per CLK OUT period. The load port
// prog_* writes the ROM or RAM directly and is used to place a program before
// RESET IN is released. Outputs also show the bus for observation.
// The processor's bus-enable output (low in HALT, HOLD and reset) has no
// consumer here, since nothing else drives A15-A8 or the strobes; it is
// left unconnected inside the top.
//
// Follows the document: the system organisation (processor, memory, input,
// output on address, data and control buses), ALE demultiplexing with an
// octal latch, and the MEMR/MEMW/IOR/IOW decode. This design's choices:
// memory map (8 KB ROM at 0000h, 16 KB RAM at 2000h), port addresses (input
// 00h, output 01h), the interrupting device model and the load port.
module sys8085 #(
  parameter int unsigned ROM_BYTES = 8192,
  parameter int unsigned RAM_BYTES = 16384,
  parameter logic [7:0]  IN_ADDR   = 8'h00,
  parameter logic [7:0]  OUT_ADDR  = 8'h01
) (
  input  logic        x1,
  input  logic        reset_in_n,
  output logic        clk_out,
  output logic        reset_out,
  input  logic        ready,
  input  logic        hold,
  output logic        hlda,
  input  logic        trap,
  input  logic        rst75,
  input  logic        rst65,
  input  logic        rst55,
  input  logic        intr,
  input  logic [7:0]  intr_opcode,
  output logic        inta_n,
  input  logic        sid,
  output logic        sod,
  input  logic [7:0]  in_port,
  output logic [7:0]  out_port,
  input  logic        prog_we,
  input  logic [15:0] prog_addr,
  input  logic [7:0]  prog_d,
  // bus observation
  output logic [15:0] addr,
  output logic [7:0]  data,
  output logic        ale,
  output logic        io_m,
  output logic        s1,
  output logic        s0,
  output logic        rd_n,
  output logic        wr_n,
  output logic        memr_n,
  output logic        memw_n,
  output logic        ior_n,
  output logic        iow_n
);

  logic ce, rst;
  clk_reset_gen u_clk (
    .x1, .reset_in_n, .clk_out, .ce, .rst, .reset_out
  );

  logic [7:0] a_hi, ad_out, a_lo;
  logic       ad_oe;

  cpu8085 u_cpu (
    .clk(x1), .ce, .rst,
    .a_hi, .ad_out, .ad_oe, .ad_in(data), .bus_oe(),
    .ale, .io_m, .s1, .s0, .rd_n, .wr_n, .ready,
    .hold, .hlda,
    .trap, .rst75, .rst65, .rst55, .intr, .inta_n,
    .sid, .sod
  );

  addr_latch373 u_latch (.g(ale), .oc_n(1'b0), .d(ad_out), .q(a_lo));
  assign addr = {a_hi, a_lo};

  ctrl_decode8085 u_dec (
    .io_m, .rd_n, .wr_n, .memr_n, .memw_n, .ior_n, .iow_n
  );

  logic [7:0] mem_q, io_q;
  logic       mem_hit, io_hit;

  sys_memory #(.ROM_BYTES(ROM_BYTES), .RAM_BYTES(RAM_BYTES)) u_mem (
    .clk(x1), .addr, .din(data), .memr_n, .memw_n,
    .dout(mem_q), .hit(mem_hit),
    .prog_we, .prog_addr, .prog_d
  );

  io_ports #(.IN_ADDR(IN_ADDR), .OUT_ADDR(OUT_ADDR)) u_io (
    .clk(x1), .rst, .port_addr(addr[7:0]), .din(data),
    .ior_n, .iow_n, .in_pins(in_port), .out_pins(out_port),
    .dout(io_q), .hit(io_hit)
  );

  // System data bus.
  always_comb begin
    if (ad_oe)        data = ad_out;
    else if (mem_hit) data = mem_q;
    else if (io_hit)  data = io_q;
    else if (!inta_n) data = intr_opcode;
    else              data = 8'hFF;
  end

endmodule
