// Digital part of one FE column pair: the pixel cells and the column bus.
//
// Each pixel watches its discriminator output. On the rising edge it stores the
// Gray time stamp as the leading edge (LE). On the falling edge it stores the
// trailing edge (TE) and flags a hit. A pixel holding a hit ignores new pulses
// until the hit has left. The column bus is a 20 MHz bus, so every second 40 MHz
// clock the lowest-numbered pixel with a hit is moved to the End of Column (EoC):
// pixel index, LE and time over threshold (TOT = TE - LE) in binary. The pixel is
// then cleared.
//
// Every pixel has 14 configuration bits in a shift register that runs through the
// whole column pair. Per pixel the bits are {fdac[4:0], tdac[4:0], cal_en,
// hitbus_en, mask, kill}. The first bit shifted in ends up as bit 0 (kill) of pixel 0. `kill` blocks the
// discriminator and `mask` blocks read-out. `hitbus_en` adds the pixel to the
// Fast OR. `cal_en` lets the calibration strobe `cal_inj` act as a discriminator
// pulse; this stands in for the analog charge injection. TDAC and FDAC only trim
// the analog front end and are brought out on `trim`.
//
// Interface: `hit_valid` is a one-clock strobe with `hit_row/le/tot`. `pix_shift`
// moves the configuration chain by one bit. `cp_en` = 0 disables the whole column
// pair.
// Timing: an edge is seen one clock after the discriminator changes. A hit is on the
// bus at most 2 clocks after its trailing edge if no other pixel is waiting.
// The 160 pixels, the 14 bits and the 20 MHz bus follow the published FE. The bit
// order, the priority order and the injection model are this design's choices.
module fe_column_pair
  import pix_pkg::*;
#(
  parameter int NPIX = 160
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [TS_W-1:0]     ts_gray,
  input  logic                cp_en,
  input  logic [NPIX-1:0]     disc,
  input  logic                cal_inj,
  // pixel configuration shift register
  input  logic                pix_shift,
  input  logic                pix_sdi,
  output logic                pix_sdo,
  output logic [NPIX*10-1:0]  trim,       // {fdac,tdac} per pixel, to the analog front end
  // column bus to the EoC
  output logic                hit_valid,
  output logic [7:0]          hit_row,
  output logic [TS_W-1:0]     hit_le,
  output logic [TS_W-1:0]     hit_tot,
  output logic                fast_or
);
  localparam int CFG_W = 14;

  logic [NPIX*CFG_W-1:0] cfg;
  logic [NPIX-1:0] kill, mask, hb_en, cal_en;
  logic [NPIX-1:0] d_eff, d_q, busy, pend;
  logic [TS_W-1:0] le_g [NPIX];
  logic [TS_W-1:0] te_g [NPIX];
  logic            phase;
  logic            sel_found;
  logic [7:0]      sel_idx;

  always_comb begin
    for (int p = 0; p < NPIX; p++) begin
      kill[p]   = cfg[p*CFG_W + 0];
      mask[p]   = cfg[p*CFG_W + 1];
      hb_en[p]  = cfg[p*CFG_W + 2];
      cal_en[p] = cfg[p*CFG_W + 3];
      trim[p*10 +: 10] = cfg[p*CFG_W + 4 +: 10];
    end
    d_eff = (disc | ({NPIX{cal_inj}} & cal_en)) & ~kill & {NPIX{cp_en}};
  end

  assign fast_or = |(d_eff & hb_en);
  // chain input enters at the top bit and walks down to pixel 0 after NPIX*14 shifts
  assign pix_sdo = cfg[0];

  // lowest-index pixel with a hit waiting
  always_comb begin
    sel_found = 1'b0;
    sel_idx   = '0;
    for (int p = NPIX-1; p >= 0; p--) begin
      if (pend[p]) begin
        sel_found = 1'b1;
        sel_idx   = 8'(p);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg       <= '0;
      d_q       <= '0;
      busy      <= '0;
      pend      <= '0;
      phase     <= 1'b0;
      hit_valid <= 1'b0;
      hit_row   <= '0;
      hit_le    <= '0;
      hit_tot   <= '0;
    end else begin
      if (pix_shift) cfg <= {pix_sdi, cfg[NPIX*CFG_W-1:1]};
      d_q       <= d_eff;
      phase     <= ~phase;
      hit_valid <= 1'b0;
      for (int p = 0; p < NPIX; p++) begin
        if (d_eff[p] && !d_q[p] && !busy[p] && !pend[p]) begin
          busy[p] <= 1'b1;
          le_g[p] <= ts_gray;
        end else if (!d_eff[p] && d_q[p] && busy[p]) begin
          busy[p] <= 1'b0;
          te_g[p] <= ts_gray;
          pend[p] <= ~mask[p];
        end
      end
      if (phase && sel_found) begin
        pend[sel_idx] <= 1'b0;
        hit_valid     <= 1'b1;
        hit_row       <= sel_idx;
        hit_le        <= gray2bin(le_g[sel_idx]);
        hit_tot       <= gray2bin(te_g[sel_idx]) - gray2bin(le_g[sel_idx]);
      end
    end
  end
endmodule
