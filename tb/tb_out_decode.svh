// Decoder of the MCC output lines for testbenches. Each clock it takes the bits of
// the current output mode in the documented order, finds the frames (start bit '1'
// and 24 word bits) and appends the words to `out_words`. The including module
// declares `clk`, `dto_r`, `dto_f`, `out_mode` (0..3) and `out_on`.
logic [23:0] out_words[$];
int          od_cnt = -1;
logic [23:0] od_w;
task automatic od_take(input logic b);
  if (od_cnt < 0) begin
    if (b) begin od_cnt = 0; od_w = '0; end
  end else begin
    od_w = {od_w[22:0], b}; od_cnt++;
    if (od_cnt == 24) begin out_words.push_back(od_w); od_cnt = -1; end
  end
endtask
always @(posedge clk) if (out_on) begin
  unique case (out_mode)
    2'd0: od_take(dto_r[0]);
    2'd1: begin od_take(dto_r[0]); od_take(dto_r[1]); end
    2'd2: begin od_take(dto_r[0]); od_take(dto_f[0]); end
    default: begin od_take(dto_r[0]); od_take(dto_f[0]); od_take(dto_r[1]); od_take(dto_f[1]); end
  endcase
end
