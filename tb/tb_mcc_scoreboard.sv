// Self-checking test of mcc_scoreboard with 4 FE chips, chip 2 disabled. EoE strobes
// come in a random order that keeps each chip's events in sequence. `ready` is
// compared each clock with a count-based reference: the oldest event is ready when
// every enabled chip has delivered more EoEs than events built.
module tb_mcc_scoreboard;
  localparam int NF = 4;
  logic clk = 1'b0;
  logic rst, ready, done;
  logic [NF-1:0] eoe_wr, fe_en, head_row;
  int checks = 0, failures = 0, built = 0, n_ready = 0;
  int cnt [NF];

  always #5 clk = ~clk;
  mcc_scoreboard #(.NUM_FE(NF), .PEND(8)) dut (.clk, .rst, .eoe_wr, .fe_en, .ready, .done, .head_row);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit ref_ready();
    for (int f = 0; f < NF; f++) if (fe_en[f] && cnt[f] <= built) return 0;
    return 1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; eoe_wr = 0; done = 0; fe_en = 4'b1011;
    foreach (cnt[f]) cnt[f] = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 1500; t++) begin
      check(ready == ref_ready(), $sformatf("ready at t=%0d", t));
      if (ready) n_ready++;
      done = ready && ($urandom_range(0, 3) == 0);
      eoe_wr = '0;
      for (int f = 0; f < NF; f++)
        if (fe_en[f] && cnt[f] - built < 7 && $urandom_range(0, 4) == 0) eoe_wr[f] = 1;
      @(negedge clk);
      for (int f = 0; f < NF; f++) if (eoe_wr[f]) cnt[f]++;
      if (done) built++;
    end
    check(built > 50 && n_ready > 0, $sformatf("events built: %0d", built));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
