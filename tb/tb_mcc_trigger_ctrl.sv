// Self-checking test of mcc_trigger_ctrl. Checked: an accepted trigger reaches only
// the enabled FE chips, one clock later. The stored BCID equals a reference counter
// that the tb resets with the BCID reset strobe, as the FE chips do. Lev1 numbers
// count accepted triggers and restart after an event counter reset. At most 16
// events are pending. Extra triggers are dropped, and their number shows as the
// warning of the next accepted event.
module tb_mcc_trigger_ctrl;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic rst, trig, bcr, ecr, fe_bcr, fe_ecr, ev_valid, pop;
  logic [15:0] fe_en, fe_lv1, dropped_total;
  logic [3:0] ev_l1;
  logic [7:0] ev_bcid, fe_bc;
  logic [4:0] ev_skip, pending;
  int checks = 0, failures = 0;
  int n_lv1 = 0;
  logic [7:0] bc_at_lv1 [$];

  always #5 clk = ~clk;
  // model of an FE BCID counter driven by the MCC strobes
  always @(posedge clk) begin
    fe_bc <= fe_bcr ? 8'd0 : fe_bc + 8'd1;
    if (fe_lv1 != 0 && !rst) begin n_lv1++; bc_at_lv1.push_back(fe_bc); end
  end

  mcc_trigger_ctrl dut (.clk, .rst, .trig, .bcr, .ecr, .fe_en, .fe_lv1, .fe_bcr, .fe_ecr,
    .ev_valid, .ev_l1, .ev_bcid, .ev_skip, .pop, .pending, .dropped_total);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; trig = 0; bcr = 0; ecr = 0; pop = 0; fe_en = 16'h00F5;
    repeat (3) @(negedge clk); rst = 0;
    bcr = 1; @(negedge clk); bcr = 0;
    repeat (7) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;
    check(fe_lv1 == 16'h00F5, "trigger sent to enabled chips only");
    @(negedge clk);
    check(fe_lv1 == 0, "one-clock trigger pulse");
    check(ev_valid && ev_l1 == 0 && ev_bcid == bc_at_lv1[0], $sformatf("event 0 BCID %0d vs FE %0d", ev_bcid, bc_at_lv1[0]));
    // fill: 15 more then 3 dropped then one more after a pop
    for (int i = 0; i < 18; i++) begin trig = 1; @(negedge clk); trig = 0; @(negedge clk); end
    check(pending == 16, "16 pending");
    check(dropped_total == 3, "3 triggers dropped");
    check(n_lv1 == 16, "only accepted triggers reach the FE chips");
    pop = 1; @(negedge clk); pop = 0;
    trig = 1; @(negedge clk); trig = 0; @(negedge clk);
    // walk to the newest event and check its warning and Lev1 number
    for (int i = 0; i < 15; i++) begin
      if (i < 15) check(ev_l1 == 4'(i + 1) && ev_bcid == bc_at_lv1[i + 1], $sformatf("event %0d", i + 1));
      pop = 1; @(negedge clk); pop = 0;
    end
    check(ev_valid && ev_skip == 5'd3 && ev_l1 == 4'd0, $sformatf("warning 3 on event after drops (skip %0d l1 %0d)", ev_skip, ev_l1));
    pop = 1; @(negedge clk); pop = 0;
    ecr = 1; @(negedge clk); ecr = 0; @(negedge clk);
    trig = 1; @(negedge clk); trig = 0; @(negedge clk);
    check(ev_valid && ev_l1 == 0 && ev_skip == 0, "event counter reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
