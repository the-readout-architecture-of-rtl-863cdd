// Self-checking test of fe_column_pair with 16 pixels. The test loads a pixel
// configuration through the shift chain: one pixel masked, one killed, one on the
// Fast OR, one calibration-enabled. It then fires discriminator pulses. Checked:
// only unmasked, live pixels are read out, lowest index first, one hit every 2
// clocks (20 MHz). Leading edge and TOT must equal the tb's own time stamps. The
// Fast OR follows only hit-bus-enabled pixels, the calibration strobe fires only its
// pixel, and the chain output returns the loaded bits.
module tb_fe_column_pair;
  import pix_pkg::*;
  localparam int NPIX = 16;
  logic clk = 1'b0;
  logic rst, cp_en, cal_inj, pix_shift, pix_sdi, pix_sdo, hit_valid, fast_or;
  logic [NPIX-1:0] disc;
  logic [NPIX*10-1:0] trim;
  logic [7:0] hit_row, hit_le, hit_tot, tsb;
  int checks = 0, failures = 0;
  int hits_seen[$];
  int hit_t[$];
  int lev[$], tots[$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tsb <= rst ? 8'd0 : tsb + 8'd1;
  end

  fe_column_pair #(.NPIX(NPIX)) dut (
    .clk, .rst, .ts_gray(tsb ^ (tsb >> 1)), .cp_en, .disc, .cal_inj,
    .pix_shift, .pix_sdi, .pix_sdo, .trim, .hit_valid, .hit_row, .hit_le, .hit_tot, .fast_or
  );

  always @(posedge clk) if (hit_valid && !rst) begin
    hits_seen.push_back(int'(hit_row)); hit_t.push_back(cyc);
    lev.push_back(int'(hit_le)); tots.push_back(int'(hit_tot));
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPIX*14-1:0] cfgv;
    int t0, t1;
    cfgv = '0;
    cfgv[3*14 + 1] = 1'b1;             // pixel 3 masked
    cfgv[5*14 + 0] = 1'b1;             // pixel 5 killed
    cfgv[7*14 + 2] = 1'b1;             // pixel 7 on Fast OR
    cfgv[2*14 + 3] = 1'b1;             // pixel 2 calibration enabled
    cfgv[9*14 + 4 +: 10] = 10'h2A5;    // pixel 9 trim
    rst = 1; cp_en = 1; cal_inj = 0; pix_shift = 0; pix_sdi = 0; disc = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < NPIX*14; i++) begin
      pix_sdi = cfgv[i]; pix_shift = 1; @(negedge clk);
    end
    pix_shift = 0;
    check(trim[9*10 +: 10] == 10'h2A5, "trim bits of pixel 9");
    check(pix_sdo == cfgv[0], "chain output bit");
    // simultaneous hits on pixels 1, 3 (masked), 4, 5 (killed), 12
    @(negedge clk);
    t0 = int'(tsb);
    disc[1] = 1; disc[3] = 1; disc[4] = 1; disc[5] = 1; disc[12] = 1;
    repeat (6) @(negedge clk);
    t1 = int'(tsb);
    disc = '0;
    check(fast_or == 1'b0, "no fast-or from non-hitbus pixels");
    repeat (20) @(negedge clk);
    check(hits_seen.size() == 3, $sformatf("three hits read out, got %0d (%p)", hits_seen.size(), hits_seen));
    if (hits_seen.size() == 3) begin
      check(hits_seen[0] == 1 && hits_seen[1] == 4 && hits_seen[2] == 12, "priority order 1,4,12");
      check(hit_t[1] - hit_t[0] == 2 && hit_t[2] - hit_t[1] == 2, "one hit per two clocks");
      foreach (lev[i]) begin
        check(lev[i] == t0, $sformatf("leading edge %0d vs %0d", lev[i], t0));
        check(tots[i] == t1 - t0, $sformatf("tot %0d vs %0d", tots[i], t1 - t0));
      end
    end
    hits_seen.delete(); hit_t.delete(); lev.delete(); tots.delete();
    // Fast OR from pixel 7
    disc[7] = 1; @(negedge clk);
    check(fast_or == 1'b1, "fast-or from hitbus pixel");
    disc[7] = 0; @(negedge clk);
    check(fast_or == 1'b0, "fast-or drops");
    repeat (6) @(negedge clk);
    hits_seen.delete(); hit_t.delete(); lev.delete(); tots.delete();
    // calibration strobe: only pixel 2
    cal_inj = 1; repeat (3) @(negedge clk); cal_inj = 0;
    repeat (8) @(negedge clk);
    check(hits_seen.size() == 1 && hits_seen[0] == 2, "calibration injects pixel 2 only");
    check(tots.size() == 1 && tots[0] == 3, $sformatf("calibration tot 3: %p", tots));
    // disabled column pair
    hits_seen.delete(); cp_en = 0;
    disc[0] = 1; repeat (2) @(negedge clk); disc[0] = 0; repeat (8) @(negedge clk);
    check(hits_seen.size() == 0, "disabled column pair is silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
