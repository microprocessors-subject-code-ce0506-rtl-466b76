// serial_io8085: 8085 serial I/O control (SID and SOD pins).
//
// SOD is a flip-flop written by SIM: when the CPU executes SIM with
// accumulator bit 6 (SDE, serial data enable) set, SOD takes accumulator bit
// 7; with SDE clear SOD keeps its value. SID is sampled every enabled clock
// into `sid_bit`, which RIM places in bit 7 of the accumulator. Reset clears
// SOD (this design's choice; the reset level of SOD is not given).
module serial_io8085 (
  input  logic       clk,
  input  logic       ce,
  input  logic       rst,
  input  logic       sim_we,
  input  logic [7:0] sim_d,
  input  logic       sid,
  output logic       sod,
  output logic       sid_bit
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sod     <= 1'b0;
      sid_bit <= 1'b0;
    end else if (ce) begin
      sid_bit <= sid;
      if (sim_we && sim_d[6]) sod <= sim_d[7];
    end
  end
endmodule
