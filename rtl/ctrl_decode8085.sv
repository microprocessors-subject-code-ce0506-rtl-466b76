// ctrl_decode8085: generates the four memory and I/O strobes of an 8085
// system from IO/M, RD and WR.
//
//   MEMR = low when IO/M = 0 and RD = 0
//   MEMW = low when IO/M = 0 and WR = 0
//   IOR  = low when IO/M = 1 and RD = 0
//   IOW  = low when IO/M = 1 and WR = 0
//
// All strobes are active low and combinational, as in the control-signal
// figure; during HOLD, HALT or reset the CPU raises RD and WR so all four
// are inactive.
module ctrl_decode8085 (
  input  logic io_m,
  input  logic rd_n,
  input  logic wr_n,
  output logic memr_n,
  output logic memw_n,
  output logic ior_n,
  output logic iow_n
);
  always_comb begin
    memr_n = io_m  | rd_n;
    memw_n = io_m  | wr_n;
    ior_n  = ~io_m | rd_n;
    iow_n  = ~io_m | wr_n;
  end
endmodule
