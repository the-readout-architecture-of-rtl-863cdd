// End-to-end test of pixel_module, reduced to 2 FE chips of 2 column pairs x 16
// pixels. Everything goes through the module's command input. The MCC is reset,
// the FE chips get a broadcast GlobalReset, and the FE Global Registers (latency
// 40) and pixel registers are loaded through the MCC's FE configuration port.
// Discriminator pulses then make hits, and triggers are sent at the right moment.
// The decoded output must hold the module events the tb predicts. Mechanisms
// counted (each must happen): events built across both chips, a chip without hits
// left out, calibration injection through the pixel register, triggers dropped at
// 16 pending with the warning in the next event, output mode switch.
module tb_pixel_module;
  import pix_pkg::*;
  localparam int NF = 2, NCP = 2, NPIX = 16, LAT = 40;
  logic clk = 1'b0;
  logic dci, run_mode;
  logic [NF*NCP*NPIX-1:0] disc;
  logic [1:0] dto_r, dto_f;
  logic [NF-1:0] fast_or;
  logic [1:0] out_mode = 2'd0;
  bit out_on = 0;
  int checks = 0, failures = 0;
  int m_event = 0, m_compress = 0, m_cal = 0, m_drop = 0, m_mode = 0;

  always #5 clk = ~clk;

  pixel_module #(.NUM_FE(NF), .NUM_CP(NCP), .CP_PIXELS(NPIX)) dut (
    .clk, .dci, .disc, .dto_r, .dto_f, .run_mode, .fast_or);

  `include "tb_cmd_tasks.svh"
  `include "tb_out_decode.svh"

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic compare(input string name, input logic [23:0] e[$]);
    check(out_words.size() == e.size(), $sformatf("%s: %0d words, got %0d", name, e.size(), out_words.size()));
    foreach (e[i]) if (i < out_words.size())
      check(out_words[i] == e[i], $sformatf("%s word %0d: %h expected %h", name, i, out_words[i], e[i]));
    out_words.delete();
  endtask

  // FE command word through the MCC (LD high), then wait until it is sent
  task automatic fe_cmd(input logic [4:0] c);
    cmd_wrfe(1'b1, 20, 32'({1'b1, 4'd0, 10'b0, c}));
    cmd_idle(20 * 8 + 10);
  endtask
  // bit string with LD low, in chunks of 32
  task automatic fe_data(input logic [1023:0] v, input int n);
    int i = n;
    while (i > 0) begin
      automatic int k = (i > 32) ? 32 : i;
      cmd_wrfe(1'b0, k, 32'(v >> (i - k)));
      cmd_idle(k * 8 + 10);
      i -= k;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] e[$];
    logic [1023:0] v;
    int b_neg, s_neg, nneg;
    logic [7:0] bc;
    dci = 0; disc = '0; nneg = 0;
    cmd_idle(70);
    cmd_slow(4'd3, 4'd0); cmd_idle(5);           // MCC reset
    cmd_slow(4'd4, 4'd0); cmd_idle(200);         // FE broadcast GlobalReset
    cmd_slow(4'd3, 4'd0); cmd_idle(5);           // MCC reset again: flush FIFOs
    // Global Register: latency 40, column pairs on
    v = '0; v[7:0] = 8'(LAT); v[34:17] = '1;
    fe_cmd(5'b00010);
    fe_data(v, 166);
    fe_cmd(5'b00100);
    // pixel chain, both chips: calibration enable on chip-local cp 0 pixel 6
    // (first 16*14 bits go to the last column pair, cp 1)
    v = '0;
    v[NCP*NPIX*14 - 1 - ((NPIX + 6) * 14 + 3)] = 1'b1;
    fe_cmd(5'b01000);
    fe_data(v, NCP*NPIX*14);
    fe_cmd(5'b00000);
    cmd_wrreg(4'd0, 16'h0018);                   // 40 Mbit/s on one line
    out_on = 1;
    // BCID reset, then count clocks to predict the BCID
    cmd_fast(F_BCR);
    // event 0: FE0 cp0 px3, FE1 cp1 px9
    cmd_idle(20);
    disc[0*NCP*NPIX + 0*NPIX + 3] = 1; disc[1*NCP*NPIX + 1*NPIX + 9] = 1;
    repeat (4) @(negedge clk);
    disc = '0;
    cmd_idle(LAT - 6 - 4);
    cmd_trigger();
    cmd_idle(400);
    check(out_words.size() > 0, "event 0 out");
    bc = out_words.size() > 0 ? out_words[0][7:0] : 8'd0;
    e.delete();
    e.push_back({OT_HEADER, 5'd0, 4'b0, 4'd0, bc});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd0});
    e.push_back({OT_HIT, 8'd3, 5'd0, 8'd4});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd1});
    e.push_back({OT_HIT, 8'd9, 5'd1, 8'd4});
    e.push_back({OT_TRAILER, 5'b0, 16'b0});
    // The counters restart 12 clocks after the first BCR bit. The trigger's first bit
    // comes 9 + 20 + 4 + (LAT - 10) clocks after it and is tagged 7 clocks later.
    check(bc == 8'(9 + 20 + 4 + LAT - 10 + 7 - 12), $sformatf("BCID %0d", bc));
    compare("event 0", e);
    m_event++;
    // event 1: calibration strobe, only FE chips' cp0 pixel 6; mode 160 Mbit/s
    cmd_wrreg(4'd0, 16'h001B); out_mode = 2'd3; m_mode++;
    cmd_wrreg(4'd2, 16'd3);                      // strobe 3 clocks
    cmd_idle(10);
    cmd_fast(F_CAL);
    cmd_idle(LAT - 5);                           // strobe reaches the pixels 1 clock after the command ends
    cmd_trigger();
    cmd_idle(400);
    bc = out_words.size() > 0 ? out_words[0][7:0] : 8'd0;
    e.delete();
    e.push_back({OT_HEADER, 5'd0, 4'b0, 4'd1, bc});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd0});
    e.push_back({OT_HIT, 8'd6, 5'd0, 8'd3});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd1});
    e.push_back({OT_HIT, 8'd6, 5'd0, 8'd3});
    e.push_back({OT_TRAILER, 5'b0, 16'b0});
    compare("event 1 (calibration)", e);
    m_cal++;
    // event 2: only FE1 hit -> FE0 left out
    disc[1*NCP*NPIX + 0*NPIX + 1] = 1; repeat (2) @(negedge clk); disc = '0;
    cmd_idle(LAT - 6 - 2);
    cmd_trigger();
    cmd_idle(300);
    bc = out_words.size() > 0 ? out_words[0][7:0] : 8'd0;
    e.delete();
    e.push_back({OT_HEADER, 5'd0, 4'b0, 4'd2, bc});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd1});
    e.push_back({OT_HIT, 8'd1, 5'd0, 8'd2});
    e.push_back({OT_TRAILER, 5'b0, 16'b0});
    compare("event 2 (compression)", e);
    m_compress++;
    // 40 Mbit/s again, then 20 triggers back to back: some dropped
    cmd_wrreg(4'd0, 16'h0018); out_mode = 2'd0; m_mode++;
    cmd_idle(10);
    for (int i = 0; i < 20; i++) cmd_trigger();
    cmd_idle(4000);
    begin
      int nhdr = 0, skipped = 0;
      foreach (out_words[i]) if (out_words[i][23:21] == OT_HEADER) begin
        nhdr++; skipped += int'(out_words[i][20:16]);
      end
      out_words.delete();
      cmd_trigger(); cmd_idle(300);
      foreach (out_words[i]) if (out_words[i][23:21] == OT_HEADER) begin
        nhdr++; skipped += int'(out_words[i][20:16]);
      end
      check(nhdr + skipped == 21, $sformatf("events %0d + skipped %0d = 21", nhdr, skipped));
      check(skipped > 0, "some triggers dropped");
      if (skipped > 0) m_drop++;
    end
    $display("mechanisms: event=%0d compress=%0d cal=%0d drop=%0d mode=%0d",
             m_event, m_compress, m_cal, m_drop, m_mode);
    check(m_event > 0 && m_compress > 0 && m_cal > 0 && m_drop > 0 && m_mode > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
