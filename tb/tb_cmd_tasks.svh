// Tasks that drive the MCC serial command line, for testbenches. They expect the
// including module to declare `clk` and `dci`. Each bit is driven at a falling edge
// and so is sampled at the next rising edge. The codes match mcc_cmd_decoder.
task automatic cmd_bits(input logic [63:0] v, input int n);
  for (int i = n - 1; i >= 0; i--) begin dci = v[i]; @(negedge clk); end
  dci = 1'b0;
endtask
task automatic cmd_idle(input int n);
  dci = 1'b0; repeat (n) @(negedge clk);
endtask
task automatic cmd_trigger(input logic [4:0] flip = 5'b0);
  cmd_bits(64'(5'b11101 ^ flip), 5);
endtask
task automatic cmd_fast(input logic [3:0] f);
  cmd_bits(64'({5'b10110, f}), 9);
endtask
task automatic cmd_slow(input logic [3:0] op, input logic [3:0] addr);
  cmd_bits(64'({5'b10110, 4'b1011, op, addr}), 17);
endtask
task automatic cmd_wrreg(input logic [3:0] addr, input logic [15:0] d);
  cmd_bits(64'({5'b10110, 4'b1011, 4'd0, addr, d}), 33);
endtask
task automatic cmd_wrfifo(input logic [3:0] fe, input logic [20:0] d);
  cmd_bits(64'({5'b10110, 4'b1011, 4'd6, fe, d}), 38);
endtask
task automatic cmd_wrfe(input logic ldl, input int len, input logic [31:0] d);
  cmd_bits(64'({5'b10110, 4'b1011, 4'd5, ldl, 3'b0, 5'(len - 1)}), 22);
  cmd_bits(64'(d), len);
endtask
