// Module Controller Chip (MCC): the digital controller that sits on each pixel
// module between the ROD and the 16 FE chips.
//
// Downstream, the command decoder turns the ROD's serial command line into
// triggers, fast commands and slow commands. Triggers go through the trigger
// controller to every enabled FE chip (at most 16 pending events). Fast commands
// become BCID-reset, event-counter-reset and calibration strobes for the FE chips.
// Slow commands write and read the register bank, reset the MCC or the FE chips,
// send configuration strings to the FE chips, enter Run Mode, or write words
// straight into a receiver FIFO for self test.
// Upstream, each FE line has a serial receiver and a 128-word FIFO. The scoreboard
// notes the End-of-Event words. When all enabled chips have finished the oldest
// event, the event builder builds it and the output link sends it at the selected
// rate.
// A register read (RDREG) is answered with a REGDATA word {1'b0, addr, value} on the
// output link, between events. Addresses 0-7 read the register bank. Addresses 8-15
// read status: 8 dropped triggers, 9 events with errors, 10 FIFOs that lost hits
// since the last EoE, 11 FIFOs that lost an EoE, 12 {pending events, FE
// configuration busy, FE configuration request dropped}, 13-15 the scoreboard row
// of the oldest event.
// The MCC has no reset pin. Its command decoder finds the idle state on its own,
// and the GRST command then resets the rest. Until then the outputs are
// meaningless.
// Ports: `fe_din` are the FE data lines. `fe_lv1`, `fe_bcr`, `fe_ecr`, `fe_cal` are
// per-module strobes. `fe_cck/fe_dci/fe_ld` are the common configuration lines.
// `dto_r/dto_f` are the two output lines (rising- and falling-edge bits).
// The block structure follows the published MCC. The encodings are this design's
// own.
module mcc
  import pix_pkg::*;
#(
  parameter int NUM_FE     = 16,
  parameter int FIFO_DEPTH = 128
) (
  input  logic              clk,
  input  logic              dci,
  input  logic [NUM_FE-1:0] fe_din,
  output logic [NUM_FE-1:0] fe_lv1,
  output logic              fe_bcr,
  output logic              fe_ecr,
  output logic              fe_cal,
  output logic              fe_cck,
  output logic              fe_dci,
  output logic              fe_ld,
  output logic [1:0]        dto_r,
  output logic [1:0]        dto_f,
  output logic              run_mode
);
  mcc_cmd_t cmd;
  logic     rst;
  omode_e   mode;
  logic     selftest, chk_bcid, chk_l1;
  logic [15:0] fe_en16, rdata;
  logic [7:0]  cal_width, cal_cnt;
  logic [NUM_FE-1:0] fe_en;

  logic              ev_valid, ev_done, sb_ready;
  logic [L1_W-1:0]   ev_l1;
  logic [TS_W-1:0]   ev_bcid;
  logic [4:0]        ev_skip, pending;
  logic [15:0]       dropped_total, err_events;

  logic [NUM_FE-1:0]             rx_valid, f_wr, eoe_wr, rd_valid, rd_pop, lost_hits, eoe_lost;
  logic [NUM_FE-1:0][WORD_W-1:0] rx_word, f_wdata, rd_data;
  logic [NUM_FE-1:0]             sb_row;

  logic               eb_valid, eb_ready, eb_idle, l_valid, l_ready, l_busy, fcfg_busy, fcfg_err;
  logic [OWORD_W-1:0] eb_data, l_data;
  logic               rb_pend;
  logic [OWORD_W-1:0] rb_word;
  logic               rb_sel;
  logic [15:0]        status;

  assign rst   = cmd.grst;
  assign fe_en = fe_en16[NUM_FE-1:0];

  mcc_cmd_decoder u_dec (.clk, .dci, .cmd, .run_mode);

  mcc_regbank #(.N(NREG), .W(REG_W)) u_regs (
    .clk, .rst, .wr(cmd.wrreg), .waddr(cmd.addr[2:0]), .wdata(cmd.data[15:0]),
    .raddr(cmd.addr[2:0]), .rdata, .mode, .selftest, .chk_bcid, .chk_l1,
    .fe_en(fe_en16), .cal_width
  );

  mcc_trigger_ctrl #(.NUM_FE(NUM_FE), .PEND(16)) u_trig (
    .clk, .rst, .trig(cmd.trig), .bcr(cmd.bcr), .ecr(cmd.ecr), .fe_en,
    .fe_lv1, .fe_bcr, .fe_ecr, .ev_valid, .ev_l1, .ev_bcid, .ev_skip,
    .pop(ev_done), .pending, .dropped_total
  );

  // calibration strobe of programmable length
  always_ff @(posedge clk) begin
    if (rst) begin
      cal_cnt <= '0; fe_cal <= 1'b0;
    end else if (cmd.cal) begin
      cal_cnt <= (cal_width == 0) ? 8'd1 : cal_width;
      fe_cal  <= 1'b1;
    end else if (cal_cnt > 8'd1) begin
      cal_cnt <= cal_cnt - 1'b1;
    end else begin
      cal_cnt <= '0; fe_cal <= 1'b0;
    end
  end

  mcc_fe_cfg #(.DIV(8)) u_fecfg (
    .clk, .rst, .wrfe(cmd.wrfe), .ld_lvl(cmd.addr[3]), .len(cmd.len), .data(cmd.data),
    .fegrst(cmd.fegrst), .cck(fe_cck), .dci(fe_dci), .ld(fe_ld), .busy(fcfg_busy),
    .err_busy(fcfg_err)
  );

  for (genvar f = 0; f < NUM_FE; f++) begin : g_fe
    logic inj;
    assign inj        = cmd.wrfifo && int'(cmd.addr) == f;
    assign f_wr[f]    = inj || (rx_valid[f] && !selftest);
    assign f_wdata[f] = inj ? cmd.data[WORD_W-1:0] : rx_word[f];

    mcc_rx u_rx (.clk, .rst, .din(fe_din[f]), .valid(rx_valid[f]), .word(rx_word[f]));

    mcc_rx_fifo #(.DEPTH(FIFO_DEPTH), .W(WORD_W), .EOE_RESERVE(16)) u_fifo (
      .clk, .rst, .wr_valid(f_wr[f]), .wr_data(f_wdata[f]), .eoe_wr(eoe_wr[f]),
      .rd_valid(rd_valid[f]), .rd_data(rd_data[f]), .rd_pop(rd_pop[f]), .count(),
      .lost_hits(lost_hits[f]), .eoe_lost(eoe_lost[f])
    );
  end

  mcc_scoreboard #(.NUM_FE(NUM_FE), .PEND(16)) u_sb (
    .clk, .rst, .eoe_wr, .fe_en, .ready(sb_ready), .done(ev_done), .head_row(sb_row)
  );

  mcc_event_builder #(.NUM_FE(NUM_FE)) u_eb (
    .clk, .rst, .fe_en, .chk_bcid, .chk_l1,
    .ev_valid, .ev_l1, .ev_bcid, .ev_skip, .sb_ready, .ev_done,
    .rd_valid, .rd_data, .rd_pop,
    .ow_valid(eb_valid), .ow_data(eb_data), .ow_ready(eb_ready), .idle(eb_idle),
    .err_events
  );

  always_comb begin
    unique case (cmd.addr[2:0])
      3'd0:    status = dropped_total;
      3'd1:    status = err_events;
      3'd2:    status = 16'(lost_hits);
      3'd3:    status = 16'(eoe_lost);
      3'd4:    status = {9'b0, pending, fcfg_busy, fcfg_err};
      default: status = 16'(sb_row);
    endcase
  end

  // register read-back word, sent between events
  always_ff @(posedge clk) begin
    if (rst) begin
      rb_pend <= 1'b0; rb_word <= '0;
    end else if (cmd.rdreg) begin
      rb_pend <= 1'b1;
      rb_word <= {OT_REGDATA, 1'b0, cmd.addr, cmd.addr[3] ? status : rdata};
    end else if (rb_sel && l_ready) begin
      rb_pend <= 1'b0;
    end
  end

  assign rb_sel   = rb_pend && eb_idle && !eb_valid;
  assign l_valid  = rb_sel ? 1'b1 : eb_valid;
  assign l_data   = rb_sel ? rb_word : eb_data;
  assign eb_ready = l_ready && !rb_sel;

  mcc_output_link #(.WORD_W_P(OWORD_W)) u_link (
    .clk, .rst, .mode, .w_valid(l_valid), .w_data(l_data), .w_ready(l_ready),
    .dto_r, .dto_f, .busy(l_busy)
  );
endmodule
