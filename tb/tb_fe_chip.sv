// Self-checking test of fe_chip, reduced to 2 column pairs of 16 pixels and 4 EoC
// slots. The chip starts from its power-up state and is brought up by commands on
// its configuration lines only: broadcast GlobalReset, Global Register (latency 20),
// pixel chain (all pixels on the Fast OR, one pixel masked). Then it is driven like
// the MCC drives it. The serial output is decoded, and each event is compared with
// words worked out by the tb:
//   A  three hits (one masked), trigger at the latency: two hit words + EoE
//   B  a hit with the trigger one clock late: EoE only
//   C  six hits in one column pair: 4 read out, EoE overflow bit set
//   D  self-trigger mode: an MCC trigger arms, the Fast OR fires the Lev1
//   E  after an event counter reset the event number starts at 0 again
// The EoE BCID is compared with a counter the tb resets with its own BCID reset.
module tb_fe_chip;
  import pix_pkg::*;
  localparam int NCP = 2, NPIX = 16, LAT = 20;
  logic clk = 1'b0;
  logic cck, cfg_dci, ld, lv1, bcr, ecr, cal_inj, dout, fast_or;
  logic [NCP*NPIX-1:0] disc;
  logic [7:0] tb_ts;
  logic [20:0] got[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tb_ts <= bcr ? 8'd0 : tb_ts + 8'd1;

  fe_chip #(.NUM_CP(NCP), .NPIX(NPIX), .EOC_DEPTH(4)) dut (
    .clk, .geo(4'd7), .cck, .dci(cfg_dci), .ld, .lv1, .bcr, .ecr, .cal_inj, .disc, .dout, .fast_or);

  `include "tb_fe_cfg_tasks.svh"

  bit rx_on = 0;
  initial forever begin
    @(posedge clk);
    if (rx_on && dout === 1'b1) begin
      automatic logic [20:0] w = '0;
      for (int i = 0; i < 21; i++) begin @(posedge clk); w = {w[19:0], dout}; end
      got.push_back(w);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [20:0] hitw(input int row, input int col, input int tot);
    return {8'(row), 5'(col), 8'(tot)};
  endfunction
  function automatic logic [20:0] eoew(input bit ov, input int l1, input logic [7:0] bc);
    return {3'b111, ov, 5'b0, 4'(l1), bc};
  endfunction

  task automatic expect_words(input string name, input logic [20:0] e[$]);
    check(got.size() == e.size(), $sformatf("%s: %0d words, got %0d", name, e.size(), got.size()));
    foreach (e[i]) if (i < got.size())
      check(got[i] == e[i], $sformatf("%s word %0d: %h expected %h", name, i, got[i], e[i]));
    got.delete();
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] e[$];
    logic [7:0] bc;
    cck = 0; cfg_dci = 0; ld = 0; lv1 = 0; bcr = 0; ecr = 0; cal_inj = 0; disc = '0;
    repeat (10) @(negedge clk);
    fe_cmd(1'b1, 4'd0, 5'b00001);                      // GlobalReset
    fe_write_global(fe_glob(8'(LAT), 1'b0, 8'd0));
    fe_cmd(1'b0, 4'd7, 5'b01000);                      // ClockPixel, by address
    for (int i = 0; i < NCP*NPIX*14; i++) begin
      // the first NPIX*14 bits end in the last column pair (cp 1), pixel 0 first
      automatic int p = i / 14, b = i % 14;
      fe_bit((b == 2) || (p == 3 && b == 1));          // mask cp 1 pixel 3
    end
    cck = 0;
    repeat (10) @(negedge clk);
    bcr = 1; @(negedge clk); bcr = 0;
    rx_on = 1;
    // event A
    disc[2] = 1; disc[NPIX + 5] = 1; disc[NPIX + 3] = 1;
    repeat (4) @(negedge clk);
    disc = '0;
    repeat (LAT - 4) @(negedge clk);
    bc = tb_ts; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (150) @(negedge clk);
    e = '{hitw(2, 0, 4), hitw(5, 1, 4), eoew(0, 0, bc)};
    expect_words("A", e);
    // event B: trigger one clock late
    disc[7] = 1; repeat (4) @(negedge clk); disc = '0;
    repeat (LAT - 3) @(negedge clk);
    bc = tb_ts; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (100) @(negedge clk);
    e = '{eoew(0, 1, bc)};
    expect_words("B", e);
    // event C: EoC overflow (4 slots, 6 hits)
    for (int p = 8; p < 14; p++) disc[p] = 1;
    repeat (2) @(negedge clk); disc = '0;
    repeat (LAT - 2) @(negedge clk);
    bc = tb_ts; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (200) @(negedge clk);
    e = '{hitw(8, 0, 2), hitw(9, 0, 2), hitw(10, 0, 2), hitw(11, 0, 2), eoew(1, 2, bc)};
    expect_words("C", e);
    // event D: self trigger
    fe_write_global(fe_glob(8'(LAT), 1'b1, 8'(LAT - 2)));
    got.delete();
    lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (30) @(negedge clk);
    check(got.size() == 0, "armed self trigger waits for the Fast OR");
    disc[NPIX + 1] = 1; repeat (4) @(negedge clk); disc = '0;
    bc = tb_ts + 8'(LAT - 4);
    repeat (150) @(negedge clk);
    e = '{hitw(1, 1, 4), eoew(0, 3, bc)};
    expect_words("D", e);
    // event E: event counter reset
    fe_write_global(fe_glob(8'(LAT), 1'b0, 8'd0));
    got.delete();
    ecr = 1; @(negedge clk); ecr = 0;
    repeat (5) @(negedge clk);
    bc = tb_ts; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (60) @(negedge clk);
    e = '{eoew(0, 0, bc)};
    expect_words("E", e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
