// Self-checking test of fe_self_trigger. Checked: without arming, the Fast OR does
// nothing. Once armed, the first Fast OR rising edge gives exactly one Lev1, delay+2
// clocks after the edge is driven. The delay is tried at 0, 5 and 20. After the
// Lev1 the generator is idle again.
module tb_fe_self_trigger;
  logic clk = 1'b0;
  logic rst, arm, fast_or, lv1_out;
  logic [7:0] delay;
  int checks = 0, failures = 0;
  int cyc = 0, n_lv1 = 0, t_lv1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (lv1_out && !rst) begin n_lv1++; t_lv1 = cyc; end
  end

  fe_self_trigger #(.DLY_W(8)) dut (.clk, .rst, .arm, .fast_or, .delay, .lv1_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse_fo();
    fast_or = 1; repeat (3) @(negedge clk); fast_or = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rst = 1; arm = 0; fast_or = 0; delay = 0;
    repeat (3) @(negedge clk); rst = 0;
    pulse_fo(); repeat (40) @(negedge clk);
    check(n_lv1 == 0, "no Lev1 when not armed");
    for (int k = 0; k < 3; k++) begin
      automatic int d = (k == 0) ? 0 : (k == 1) ? 5 : 20;
      delay = 8'(d);
      n_lv1 = 0;
      arm = 1; @(negedge clk); arm = 0;
      repeat (5) @(negedge clk);
      t0 = cyc;
      pulse_fo();
      repeat (d + 10) @(negedge clk);
      pulse_fo();                       // second hit must not trigger again
      repeat (40) @(negedge clk);
      check(n_lv1 == 1, $sformatf("one Lev1 for delay %0d, got %0d", d, n_lv1));
      check(t_lv1 - t0 == d + 2, $sformatf("latency %0d for delay %0d", t_lv1 - t0, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
