// One pixel detector module: the MCC and the 16 FE chips it reads out, wired in a
// star.
// Each FE chip has its own serial data line to the MCC and its own trigger line.
// The three slow configuration lines (CCK, DCI, LD) and the BCID-reset,
// event-counter-reset and calibration strobes are common to all chips. Each chip
// is told apart by a geographical address equal to its position 0..15. The module
// has a single command input `dci` and the two event output lines `dto_r/dto_f`
// (bits for the rising and the falling clock edge). Everything runs on the 40 MHz
// clock.
// The analog front ends are not modelled: `disc` carries the discriminator outputs
// of all 46080 pixels. FE chip f, column pair c, pixel p is bit
// (f*NUM_CP + c)*CP_PIXELS + p. The optical links (receiver and laser driver) are
// not part of the RTL either.
// The star topology, 16 chips and the line set follow the published system. Bringing
// the fast strobes on separate wires is this design's choice.
module pixel_module
  import pix_pkg::*;
#(
  parameter int NUM_FE    = 16,
  parameter int NUM_CP    = 18,
  parameter int CP_PIXELS = 160
) (
  input  logic                            clk,
  input  logic                            dci,
  input  logic [NUM_FE*NUM_CP*CP_PIXELS-1:0] disc,
  output logic [1:0]                      dto_r,
  output logic [1:0]                      dto_f,
  output logic                            run_mode,
  output logic [NUM_FE-1:0]               fast_or
);
  localparam int FE_PIX = NUM_CP * CP_PIXELS;

  logic [NUM_FE-1:0] fe_dout, fe_lv1;
  logic fe_bcr, fe_ecr, fe_cal, fe_cck, fe_dci, fe_ld;

  mcc #(.NUM_FE(NUM_FE), .FIFO_DEPTH(128)) u_mcc (
    .clk, .dci, .fe_din(fe_dout), .fe_lv1, .fe_bcr, .fe_ecr, .fe_cal,
    .fe_cck, .fe_dci, .fe_ld, .dto_r, .dto_f, .run_mode
  );

  for (genvar f = 0; f < NUM_FE; f++) begin : g_fe
    fe_chip #(.NUM_CP(NUM_CP), .NPIX(CP_PIXELS), .EOC_DEPTH(64)) u_fe (
      .clk, .geo(4'(f)), .cck(fe_cck), .dci(fe_dci), .ld(fe_ld),
      .lv1(fe_lv1[f]), .bcr(fe_bcr), .ecr(fe_ecr), .cal_inj(fe_cal),
      .disc(disc[f*FE_PIX +: FE_PIX]), .dout(fe_dout[f]), .fast_or(fast_or[f])
    );
  end
endmodule
