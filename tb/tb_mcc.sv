// Self-checking test of the MCC with 4 FE inputs and 32-word FIFOs. Behavioural FE
// models in the tb answer each trigger with hit words and an End-of-Event word on
// their serial lines. The MCC starts from its power-up state with no reset. It is
// brought up over the command line only (quiet line, GRST, register writes), and
// its 160 Mbit/s output is decoded. Every module event is compared with the words
// the tb predicts. Each mechanism is counted and must happen at least once:
//   event built, FE without hits compressed away, BCID mismatch flagged,
//   FIFO overflow (hits lost, flagged), triggers dropped with 16 pending and the
//   warning count in the next header, register read-back, self-test injection,
//   FE configuration string on CCK/DCI/LD, Run Mode entered and left.
module tb_mcc;
  import pix_pkg::*;
  localparam int NF = 4;
  logic clk = 1'b0;
  logic dci, fe_bcr, fe_ecr, fe_cal, fe_cck, fe_dci, fe_ld, run_mode;
  logic [NF-1:0] fe_din, fe_lv1;
  logic [1:0] dto_r, dto_f;
  logic [1:0] out_mode = 2'd0;
  bit out_on = 0;
  int checks = 0, failures = 0;
  // FE models
  logic [7:0] fe_bc;
  logic [3:0] fe_l1 [NF];
  int  nhits [NF];           // hits each FE sends for the next triggers
  bit  bad_bcid [NF];
  bit  hold = 0;
  typedef struct { int l1; logic [7:0] bc; int n; bit bad; } job_t;
  job_t jobs [NF][$];
  // FE config line monitor
  logic cck_q = 0;
  logic [31:0] cfg_rx;
  int cfg_n = 0;
  // mechanism counters
  int m_event = 0, m_compress = 0, m_bcid = 0, m_ovf = 0, m_drop = 0, m_readback = 0,
      m_selftest = 0, m_fecfg = 0, m_run = 0;

  always #5 clk = ~clk;

  mcc #(.NUM_FE(NF), .FIFO_DEPTH(32)) dut (
    .clk, .dci, .fe_din, .fe_lv1, .fe_bcr, .fe_ecr, .fe_cal, .fe_cck, .fe_dci, .fe_ld,
    .dto_r, .dto_f, .run_mode);

  `include "tb_cmd_tasks.svh"
  `include "tb_out_decode.svh"

  always @(posedge clk) begin
    fe_bc <= fe_bcr ? 8'd0 : fe_bc + 8'd1;
    for (int f = 0; f < NF; f++) begin
      if (fe_ecr) fe_l1[f] <= '0;
      else if (fe_lv1[f]) begin
        jobs[f].push_back('{int'(fe_l1[f]), fe_bc, nhits[f], bad_bcid[f]});
        fe_l1[f] <= fe_l1[f] + 1'b1;
      end
    end
    cck_q <= fe_cck;
    if (fe_cck && !cck_q) begin cfg_rx = {cfg_rx[30:0], fe_dci}; cfg_n++; end
  end

  // serial senders
  for (genvar f = 0; f < NF; f++) begin : g_fe
    task automatic send(input logic [20:0] w);
      fe_din[f] = 1'b1; @(negedge clk);
      for (int i = 20; i >= 0; i--) begin fe_din[f] = w[i]; @(negedge clk); end
      fe_din[f] = 1'b0;
    endtask
    initial begin
      fe_din[f] = 1'b0;
      forever begin
        @(negedge clk);
        if (!hold && jobs[f].size() != 0) begin
          automatic job_t j = jobs[f].pop_front();
          for (int h = 0; h < j.n; h++) send({8'(h), 5'(f), 8'(h + 1)});
          send({3'b111, 1'b0, 5'b0, 4'(j.l1), j.bad ? j.bc + 8'd1 : j.bc});
        end
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected words of one event; nh/bad per FE, en = enable mask
  function automatic void expect_event(ref logic [23:0] e[$], input int skip, input int l1,
      input logic [7:0] bc, input int nh[NF], input bit bad[NF], input int kept[NF], input logic [NF-1:0] en);
    logic [15:0] em = '0;
    e.push_back({OT_HEADER, 5'(skip), 4'b0, 4'(l1), bc});
    for (int f = 0; f < NF; f++) if (en[f]) begin
      automatic bit ov = kept[f] < nh[f];
      if (kept[f] > 0) begin
        e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'(f)});
        for (int h = 0; h < kept[f]; h++) e.push_back({OT_HIT, 8'(h), 5'(f), 8'(h + 1)});
      end
      if (bad[f] || ov) begin
        e.push_back({OT_FEFLAG, bad[f], 1'b0, ov, 1'b0, 13'b0, 4'(f)});
        em[f] = 1'b1;
      end
    end
    e.push_back({OT_TRAILER, 5'b0, em});
  endfunction

  task automatic compare(input string name, input logic [23:0] e[$]);
    check(out_words.size() == e.size(), $sformatf("%s: %0d words, got %0d", name, e.size(), out_words.size()));
    foreach (e[i]) if (i < out_words.size())
      check(out_words[i] == e[i], $sformatf("%s word %0d: %h expected %h", name, i, out_words[i], e[i]));
    out_words.delete();
  endtask

  task automatic trigger_and_wait(output logic [7:0] bc, input int wait_clk);
    cmd_trigger();
    @(negedge clk);   // fe_lv1 is out now
    bc = fe_bc;
    cmd_idle(wait_clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] e[$];
    logic [7:0] bc;
    int nh[NF], kept[NF];
    bit bad[NF];
    dci = 0;
    foreach (nhits[f]) begin nhits[f] = 0; bad_bcid[f] = 0; end
    cmd_idle(70);                      // decoder finds idle on its own
    cmd_slow(4'd3, 4'd0);              // GRST
    cmd_idle(5);
    cmd_wrreg(4'd0, 16'h0003 | 16'h0018);   // 160 Mbit/s, checks on
    cmd_wrreg(4'd1, 16'h000B);              // FE 0, 1, 3 enabled
    cmd_fast(F_BCR); cmd_fast(F_ECR);
    out_mode = 2'd3; out_on = 1;
    cmd_idle(5);
    // run mode
    cmd_slow(4'd2, 4'd0); cmd_idle(2);
    if (run_mode) m_run++;
    // event 0: FE0 2 hits, FE1 none, FE3 1 hit
    nhits = '{2, 0, 0, 1};
    trigger_and_wait(bc, 300);
    nh = nhits; kept = nhits; bad = '{0, 0, 0, 0};
    e.delete(); expect_event(e, 0, 0, bc, nh, bad, kept, 4'b1011);
    compare("event 0", e);
    m_event++; m_compress++;
    check(fe_lv1 == 0, "trigger pulses ended");
    // event 1: BCID error on FE3
    nhits = '{1, 0, 0, 0}; bad_bcid[3] = 1;
    trigger_and_wait(bc, 300);
    bad_bcid[3] = 0;
    nh = nhits; kept = nhits; bad = '{0, 0, 0, 1};
    e.delete(); expect_event(e, 0, 1, bc, nh, bad, kept, 4'b1011);
    compare("event 1 (BCID error)", e);
    m_bcid++;
    // event 2: 40 hits from FE1 into a 32-word FIFO with 16 reserved
    nhits = '{0, 40, 0, 0};
    trigger_and_wait(bc, 1500);
    nh = nhits; kept = '{0, 16, 0, 0}; bad = '{0, 0, 0, 0};
    e.delete(); expect_event(e, 0, 2, bc, nh, bad, kept, 4'b1011);
    compare("event 2 (overflow)", e);
    m_ovf++;
    check(run_mode, "still in run mode");
    // 18 triggers with the FE answers held back: 2 dropped
    nhits = '{0, 0, 0, 0};
    hold = 1;
    e.delete();
    for (int i = 0; i < 18; i++) begin
      cmd_trigger(); @(negedge clk);
      if (i < 16) begin
        nh = nhits; kept = nhits; bad = '{0, 0, 0, 0};
        expect_event(e, 0, (3 + i) % 16, fe_bc, nh, bad, kept, 4'b1011);
      end
      cmd_idle(2);
    end
    hold = 0;
    cmd_idle(2500);
    compare("16 pending events", e);
    trigger_and_wait(bc, 300);
    e.delete(); expect_event(e, 2, 3, bc, nh, bad, kept, 4'b1011);
    compare("event after drops", e);
    m_drop++;
    // register read-back leaves run mode
    cmd_slow(4'd1, 4'd1); cmd_idle(40);
    check(!run_mode, "slow command left run mode");
    if (!run_mode) m_run++;
    e.delete(); e.push_back({OT_REGDATA, 1'b0, 4'd1, 16'h000B});
    compare("read-back FEEN", e);
    cmd_slow(4'd1, 4'd8); cmd_idle(40);
    e.delete(); e.push_back({OT_REGDATA, 1'b0, 4'd8, 16'd2});
    compare("read-back dropped-trigger count", e);
    m_readback++;
    // self test: FE inputs ignored, words written over the command line
    cmd_wrreg(4'd0, 16'h0007 | 16'h0018);
    cmd_wrreg(4'd1, 16'h0001);
    nhits = '{3, 0, 0, 0};               // the FE model still sends; must be ignored
    trigger_and_wait(bc, 200);
    cmd_wrfifo(4'd0, {8'd77, 5'd9, 8'd5});
    cmd_wrfifo(4'd0, {3'b111, 1'b0, 5'b0, 4'd4, bc});
    cmd_idle(100);
    e.delete();
    e.push_back({OT_HEADER, 5'd0, 4'b0, 4'd4, bc});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd0});
    e.push_back({OT_HIT, 8'd77, 5'd9, 8'd5});
    e.push_back({OT_TRAILER, 5'b0, 16'b0});
    compare("self-test event", e);
    m_selftest++;
    // FE configuration string
    cfg_n = 0;
    cmd_wrfe(1'b1, 20, 32'hF1234);
    cmd_idle(200);
    check(cfg_n == 20 && cfg_rx[19:0] == 20'hF1234, "FE configuration string");
    if (cfg_n == 20) m_fecfg++;
    $display("mechanisms: event=%0d compress=%0d bcid=%0d ovf=%0d drop=%0d readback=%0d selftest=%0d fecfg=%0d run=%0d",
             m_event, m_compress, m_bcid, m_ovf, m_drop, m_readback, m_selftest, m_fecfg, m_run);
    check(m_event > 0 && m_compress > 0 && m_bcid > 0 && m_ovf > 0 && m_drop > 0 &&
          m_readback > 0 && m_selftest > 0 && m_fecfg > 0 && m_run >= 2, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
