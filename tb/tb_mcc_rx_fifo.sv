// Self-checking test of mcc_rx_fifo with 16 words and a reserve of 4. The FIFO is
// compared with a reference queue. Checked: order is kept. Hits are refused once
// only 4 words are free. EoE words still get in, and the next EoE after a loss
// carries the overflow bit. An EoE is lost only when the FIFO is completely full.
// The EoE write strobe counts correctly.
module tb_mcc_rx_fifo;
  import pix_pkg::*;
  localparam int D = 16, R = 4;
  logic clk = 1'b0;
  logic rst, wr_valid, eoe_wr, rd_valid, rd_pop, lost_hits, eoe_lost;
  logic [20:0] wr_data, rd_data;
  logic [4:0] count;
  logic [20:0] model[$];
  int checks = 0, failures = 0, n_eoe = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (eoe_wr && !rst) n_eoe++;

  mcc_rx_fifo #(.DEPTH(D), .W(21), .EOE_RESERVE(R)) dut (
    .clk, .rst, .wr_valid, .wr_data, .eoe_wr, .rd_valid, .rd_data, .rd_pop, .count,
    .lost_hits, .eoe_lost);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [20:0] hit(input int i);
    return {8'(i % 160), 5'd3, 8'(i)};
  endfunction
  function automatic logic [20:0] eoe(input int l1, input bit ov);
    return {3'b111, ov, 5'b0, 4'(l1), 8'd77};
  endfunction

  task automatic push(input logic [20:0] w);
    wr_valid = 1; wr_data = w; @(negedge clk); wr_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_valid = 0; rd_pop = 0; wr_data = 0;
    repeat (3) @(negedge clk); rst = 0;
    // event 0: 3 hits + EoE, no loss
    for (int i = 0; i < 3; i++) begin push(hit(i)); model.push_back(hit(i)); end
    push(eoe(0, 0)); model.push_back(eoe(0, 0));
    // event 1: 14 hits; only D-R-4 = 8 fit
    for (int i = 0; i < 14; i++) begin
      push(hit(100 + i));
      if (model.size() < D - R) model.push_back(hit(100 + i));
    end
    check(lost_hits, "hit loss recorded");
    push(eoe(1, 0)); model.push_back(eoe(1, 1));
    check(!lost_hits, "loss flag moved into the EoE");
    // three more EoE fill the FIFO to 16; a fifth is lost
    for (int i = 2; i < 5; i++) begin push(eoe(i, 0)); model.push_back(eoe(i, 0)); end
    check(count == 5'(D) && !eoe_lost, "full with EoE words, none lost");
    push(eoe(5, 0));
    check(eoe_lost, "EoE lost only when completely full");
    check(n_eoe == 5, $sformatf("5 EoE strobes, got %0d", n_eoe));
    // drain and compare
    while (rd_valid) begin
      automatic logic [20:0] e = model.pop_front();
      check(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
      rd_pop = 1; @(negedge clk); rd_pop = 0;
    end
    check(model.size() == 0 && count == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
