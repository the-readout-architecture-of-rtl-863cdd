// Self-checking test of gray_timestamp: the binary count must advance by one per
// clock and wrap at 256. Consecutive Gray values must differ in exactly one bit, and
// the Gray value must decode back to the binary count. Reset must restart at 0.
module tb_gray_timestamp;
  logic clk = 1'b0;
  logic rst;
  logic [7:0] gray, bin;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gray_timestamp #(.W(8)) dut (.clk, .rst, .gray, .bin);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] decode(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev_g;
    rst = 1'b1;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    check(bin == 8'd0 && gray == 8'd0, "reset value");
    prev_g = gray;
    for (int i = 1; i < 600; i++) begin
      @(negedge clk);
      check(bin == 8'(i), $sformatf("count %0d got %0d", i, bin));
      check($countones(gray ^ prev_g) == 1, "one bit changes");
      check(decode(gray) == bin, "gray decodes to bin");
      prev_g = gray;
    end
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(bin == 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
