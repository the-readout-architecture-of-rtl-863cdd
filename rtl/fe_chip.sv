// Digital part of one FE read-out chip: 18 column pairs of 160 pixels, each with its
// End-of-Column (EoC) buffer, the Gray time stamp, the read-out sequencer, the
// control logic and the self-trigger generator.
//
// Data flow: a pixel hit (discriminator pulse) is stored in the pixel and moved
// over the column bus to the EoC buffer. There it waits for the Lev1 latency. On a
// Lev1 at the right moment it is tagged with the event number. The read-out
// sequencer then pushes the event's hits and an End-of-Event word to the MCC on the
// serial line `dout` (40 Mbit/s).
// Control: `cck/dci/ld` load the Command, Global and pixel registers (see
// fe_config). The chip has no reset pin. A GlobalReset command clears the whole
// digital part. `bcr` restarts the time stamp (BCID) and `ecr` the event counter.
// `lv1` is the trigger from the MCC. When self-triggering is enabled in the Global
// Register it only arms the self-trigger generator.
// The analog front end is not modelled. `disc` are the discriminator outputs,
// pixel p of column pair c at bit c*NPIX+p. `cal_inj` is the calibration strobe
// seen by pixels with Calibration enable set.
// The pixel shift register runs through column pair 0 first and on to the last one.
// So of a full chain load, the first NPIX*14 bits end in the last column pair,
// starting at bit 0 of its pixel 0.
// The structure follows the published FE. The serial formats and register layouts
// are this design's own.
module fe_chip
  import pix_pkg::*;
#(
  parameter int NUM_CP = 18,
  parameter int NPIX   = 160,
  parameter int EOC_DEPTH = 64
) (
  input  logic                   clk,
  input  logic [3:0]             geo,
  input  logic                   cck,
  input  logic                   dci,
  input  logic                   ld,
  input  logic                   lv1,
  input  logic                   bcr,
  input  logic                   ecr,
  input  logic                   cal_inj,
  input  logic [NUM_CP*NPIX-1:0] disc,
  output logic                   dout,
  output logic                   fast_or
);
  localparam int GLOB_W = 166;

  logic              grst;
  logic [GLOB_W-1:0] glob;
  logic              pix_shift, pix_sdi;
  logic [19:0]       cmd_reg;
  logic [TS_W-1:0]   ts_gray, ts_bin;
  logic [TS_W-1:0]   latency, st_delay;
  logic              st_en;
  logic [17:0]       cp_en_all;
  logic              lv1_int, lv1_st, lv1_acc;
  logic [L1_W-1:0]   lv1_id, rd_l1;
  logic              ovf_clr;
  logic [4:0]        pending;

  logic [NUM_CP-1:0]           cp_fo, hv, rd_avail, rd_pop, ovf, eoc_full;
  logic [NUM_CP-1:0][7:0]      hrow, rd_row;
  logic [NUM_CP-1:0][TS_W-1:0] hle, htot, rd_tot;
  logic [NUM_CP:0]             chain;

  assign latency   = glob[7:0];
  assign st_en     = glob[8];
  assign st_delay  = glob[16:9];
  assign cp_en_all = glob[34:17];

  fe_config u_cfg (
    .clk, .geo, .cck, .dci, .ld, .grst, .glob, .pix_shift, .pix_sdi, .cmd_reg
  );

  gray_timestamp #(.W(TS_W)) u_ts (
    .clk, .rst(grst | bcr), .gray(ts_gray), .bin(ts_bin)
  );

  assign chain[0] = pix_sdi;
  for (genvar c = 0; c < NUM_CP; c++) begin : g_cp
    fe_column_pair #(.NPIX(NPIX)) u_cp (
      .clk, .rst(grst), .ts_gray, .cp_en(cp_en_all[c]),
      .disc(disc[c*NPIX +: NPIX]), .cal_inj,
      .pix_shift, .pix_sdi(chain[c]), .pix_sdo(chain[c+1]), .trim(),
      .hit_valid(hv[c]), .hit_row(hrow[c]), .hit_le(hle[c]), .hit_tot(htot[c]),
      .fast_or(cp_fo[c])
    );
    fe_eoc_buffer #(.DEPTH(EOC_DEPTH)) u_eoc (
      .clk, .rst(grst), .ts_bin, .latency, .lv1(lv1_acc), .lv1_id,
      .wr_valid(hv[c]), .wr_row(hrow[c]), .wr_le(hle[c]), .wr_tot(htot[c]),
      .rd_l1, .rd_avail(rd_avail[c]), .rd_row(rd_row[c]), .rd_tot(rd_tot[c]),
      .rd_pop(rd_pop[c]), .ovf(ovf[c]), .ovf_clr, .full(eoc_full[c])
    );
  end

  assign fast_or = |cp_fo;

  fe_self_trigger #(.DLY_W(TS_W)) u_st (
    .clk, .rst(grst), .arm(lv1 & st_en), .fast_or, .delay(st_delay), .lv1_out(lv1_st)
  );
  assign lv1_int = st_en ? lv1_st : lv1;

  fe_readout #(.NUM_CP(NUM_CP), .PEND(16)) u_ro (
    .clk, .rst(grst), .ecr, .ts_bin, .lv1(lv1_int), .lv1_acc, .lv1_id,
    .rd_l1, .rd_avail, .rd_row, .rd_tot, .rd_pop, .ovf, .ovf_clr,
    .dout, .pending
  );
endmodule
