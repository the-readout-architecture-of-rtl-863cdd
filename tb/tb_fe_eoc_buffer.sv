// Self-checking test of fe_eoc_buffer with 8 slots and a latency of 10 clocks.
// Checked: a hit whose age is exactly the latency when Lev1 comes is kept and tagged
// with the event number. A hit one clock younger is freed. Hits come out by event
// number with their row and TOT. A full buffer drops the next hit and raises the
// overflow flag, which the clear input resets. Stale hits free themselves.
module tb_fe_eoc_buffer;
  import pix_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0;
  logic rst, lv1, wr_valid, rd_avail, rd_pop, ovf, ovf_clr, full;
  logic [7:0] tsb, latency, wr_row, wr_le, wr_tot, rd_row, rd_tot;
  logic [3:0] lv1_id, rd_l1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tsb <= rst ? 8'd0 : tsb + 8'd1;

  fe_eoc_buffer #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .ts_bin(tsb), .latency, .lv1, .lv1_id, .wr_valid, .wr_row, .wr_le, .wr_tot,
    .rd_l1, .rd_avail, .rd_row, .rd_tot, .rd_pop, .ovf, .ovf_clr, .full
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input logic [7:0] row, input logic [7:0] le, input logic [7:0] tot);
    wr_valid = 1; wr_row = row; wr_le = le; wr_tot = tot;
    @(negedge clk);
    wr_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] le_a;
    rst = 1; lv1 = 0; wr_valid = 0; rd_pop = 0; ovf_clr = 0; latency = 8'd10;
    lv1_id = 4'd3; rd_l1 = 4'd3; wr_row = 0; wr_le = 0; wr_tot = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    le_a = tsb - 8'd2;
    put(8'd17, le_a, 8'd5);               // hit A
    put(8'd40, le_a + 8'd1, 8'd9);        // hit B, one clock younger
    while (8'(tsb - le_a) != 8'd10) @(negedge clk);
    lv1 = 1; @(negedge clk); lv1 = 0;     // trigger exactly at A's latency
    repeat (3) @(negedge clk);
    check(rd_avail, "hit A tagged for event 3");
    check(rd_row == 8'd17 && rd_tot == 8'd5, "hit A contents");
    rd_l1 = 4'd4;
    @(negedge clk);
    check(!rd_avail, "nothing for event 4");
    rd_l1 = 4'd3; rd_pop = 1; @(negedge clk); rd_pop = 0;
    @(negedge clk);
    check(!rd_avail, "hit B was not tagged and A popped");
    // all slots must be free again: fill exactly DEPTH without overflow
    latency = 8'd200;
    for (int i = 0; i < DEPTH; i++) put(8'(i), tsb, 8'd1);
    check(full && !ovf, "full without overflow");
    put(8'd99, tsb, 8'd1);
    check(ovf, "overflow flagged on extra hit");
    ovf_clr = 1; @(negedge clk); ovf_clr = 0;
    check(!ovf, "overflow cleared");
    // stale: drop latency below the hits' age -> all freed without a trigger
    latency = 8'd1;
    repeat (3) @(negedge clk);
    check(!full, "untriggered hits freed after latency");
    // hit arriving already older than the latency is freed at once
    latency = 8'd5;
    put(8'd7, tsb - 8'd20, 8'd1);
    @(negedge clk);
    lv1 = 1; @(negedge clk); lv1 = 0; @(negedge clk);
    check(!rd_avail, "late hit never tagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
