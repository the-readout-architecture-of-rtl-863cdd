// Register bank of the MCC: eight 16-bit configuration registers.
//   reg 0 CSR : [1:0] output mode (0: 40 Mbit/s on one line, 1: 80 Mbit/s on two
//               lines, 2: 80 Mbit/s on one line using both edges, 3: 160 Mbit/s on
//               two lines using both edges), [2] self test (FE inputs ignored, only
//               data written with WRFIFO is built), [3] BCID check enable, [4] Lev1
//               number check enable
//   reg 1 FEEN: enable mask of the 16 FE chips (disabled chips get no trigger and
//               take no part in event building)
//   reg 2     : [7:0] length of the calibration strobe in clocks (0 counts as 1)
//   reg 3..7  : general purpose, read/write
// `wr` writes `wdata` to register `waddr`. `raddr` reads combinationally. The MCC
// global reset loads the defaults: CSR = 0x0018 (40 Mbit/s, checks on), FEEN = 0xFFFF.
// Timing: a write takes effect on the next clock.
// Eight registers of 16 bits and their purposes (FE enables, output mode, error
// checking, self test) follow the published MCC. The bit map is this design's own.
module mcc_regbank
  import pix_pkg::*;
#(
  parameter int N = 8,
  parameter int W = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 wr,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(N)-1:0] raddr,
  output logic [W-1:0]         rdata,
  output omode_e               mode,
  output logic                 selftest,
  output logic                 chk_bcid,
  output logic                 chk_l1,
  output logic [W-1:0]         fe_en,
  output logic [7:0]           cal_width
);
  logic [W-1:0] r [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
      r[0] <= W'(16'h0018);
      r[1] <= W'(16'hFFFF);
    end else if (wr) begin
      r[waddr] <= wdata;
    end
  end

  assign rdata    = r[raddr];
  assign mode     = omode_e'(r[0][1:0]);
  assign selftest = r[0][2];
  assign chk_bcid = r[0][3];
  assign chk_l1   = r[0][4];
  assign fe_en    = r[1];
  assign cal_width = r[2][7:0];
endmodule
