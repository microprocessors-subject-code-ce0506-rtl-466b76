// io_ports: one input port and one output port of the 8085 system.
//
// The 8085 puts an 8-bit port address on A7-A0 during IN and OUT. While IOR
// is low and the latched address equals IN_ADDR, the input pins are driven on
// the data bus (`dout`, `hit`). On each rising clock edge while IOW is low
// and the address equals OUT_ADDR, the data bus is stored in the output
// latch, whose value drives the output pins. Port addresses, one port of each
// kind and the reset value 00h are this design's choices.
module io_ports #(
  parameter logic [7:0] IN_ADDR  = 8'h00,
  parameter logic [7:0] OUT_ADDR = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] port_addr,
  input  logic [7:0] din,
  input  logic       ior_n,
  input  logic       iow_n,
  input  logic [7:0] in_pins,
  output logic [7:0] out_pins,
  output logic [7:0] dout,
  output logic       hit
);
  always_comb begin
    hit  = !ior_n && (port_addr == IN_ADDR);
    dout = hit ? in_pins : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (rst) out_pins <= 8'h00;
    else if (!iow_n && port_addr == OUT_ADDR) out_pins <= din;
  end
endmodule
