// Self-checking test of mcc_rx: random 21-bit words are sent with a start bit and
// random idle gaps, including none, and must come out unchanged and in order.
module tb_mcc_rx;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic rst, din, valid;
  logic [20:0] word;
  logic [20:0] sent[$];
  int checks = 0, failures = 0, nrx = 0;

  always #5 clk = ~clk;
  mcc_rx dut (.clk, .rst, .din, .valid, .word);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (valid && !rst) begin
    nrx++;
    if (sent.size() == 0) check(0, "unexpected word");
    else begin
      automatic logic [20:0] e = sent.pop_front();
      check(word == e, $sformatf("word %h vs %h", word, e));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; din = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int n = 0; n < 200; n++) begin
      automatic logic [20:0] w = 21'($urandom());
      sent.push_back(w);
      din = 1; @(negedge clk);
      for (int i = 20; i >= 0; i--) begin din = w[i]; @(negedge clk); end
      din = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(nrx == 200 && sent.size() == 0, $sformatf("200 words received, got %0d", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
