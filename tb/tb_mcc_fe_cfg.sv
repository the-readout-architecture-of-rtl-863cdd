// Self-checking test of mcc_fe_cfg. The tb samples DCI on every rising CCK edge, as
// an FE chip does, and notes the LD level. Checked: a 20-bit string with LD high
// and a 7-bit string with LD low arrive bit-exact. LD drops after the last bit. A
// bit takes 8 clocks (5 MHz) and busy lasts len*8+1 clocks. FEGRST sends the
// broadcast GlobalReset command word. A request while busy is refused and flagged.
module tb_mcc_fe_cfg;
  logic clk = 1'b0;
  logic rst, wrfe, ld_lvl, fegrst, cck, dci, ld, busy, err_busy, cck_q = 0;
  logic [5:0] len;
  logic [31:0] data;
  logic [31:0] rx;
  int nrx = 0, nld = 0, ld_fall = 0, busy_cyc = 0, rise_gap_bad = 0, last_rise = -1, cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mcc_fe_cfg #(.DIV(8)) dut (.clk, .rst, .wrfe, .ld_lvl, .len, .data, .fegrst, .cck, .dci, .ld,
                              .busy, .err_busy);

  logic ld_q = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cck_q <= cck; ld_q <= ld;
    if (busy) busy_cyc++;
    if (cck && !cck_q) begin
      rx = {rx[30:0], dci}; nrx++; if (ld) nld++;
      if (last_rise >= 0 && cyc - last_rise != 8) rise_gap_bad++;
      last_rise = cyc;
    end
    if (!ld && ld_q) ld_fall++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic clear();
    nrx = 0; nld = 0; ld_fall = 0; busy_cyc = 0; rise_gap_bad = 0; last_rise = -1; rx = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wrfe = 0; fegrst = 0; ld_lvl = 0; len = 0; data = 0;
    repeat (3) @(negedge clk); rst = 0;
    clear();
    wrfe = 1; ld_lvl = 1; len = 6'd20; data = 32'h000A_5C3E; @(negedge clk); wrfe = 0;
    repeat (200) @(negedge clk);
    check(nrx == 20 && rx[19:0] == 20'hA5C3E, $sformatf("20 bits, got %0d %h", nrx, rx[19:0]));
    check(nld == 20 && ld_fall == 1, "LD high during string, falls after");
    check(busy_cyc == 161, $sformatf("busy 161 clocks, got %0d", busy_cyc));
    check(rise_gap_bad == 0, "CCK period 8 clocks");
    clear();
    wrfe = 1; ld_lvl = 0; len = 6'd7; data = 32'h0000_0053; @(negedge clk); wrfe = 0;
    repeat (5) @(negedge clk);
    fegrst = 1; @(negedge clk); fegrst = 0;
    repeat (80) @(negedge clk);
    check(nrx == 7 && rx[6:0] == 7'h53 && nld == 0 && ld_fall == 0, "7 bits with LD low");
    check(err_busy, "request while busy flagged");
    clear();
    fegrst = 1; @(negedge clk); fegrst = 0;
    repeat (200) @(negedge clk);
    check(nrx == 20 && rx[19:0] == {1'b1, 4'd0, 10'd0, 5'b00001} && ld_fall == 1, "broadcast global reset word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
