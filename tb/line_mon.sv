// line_mon: testbench line monitor. Samples a serial line in the middle of each
// bit, assembles four-character ring frames and queues them in frames[];
// count is the number of frames seen, bad the number of characters with a
// wrong stop bit. A frame whose characters are more than two character times
// apart restarts the frame assembly.
module line_mon
  import brain_pkg::*;
#(
  parameter int CPB = 5
) (
  input logic clk,
  input logic line
);
  frame_t frames[$];
  int     count = 0;
  int     bad = 0;
  logic [7:0] bytes [4];
  int     pos = 0;
  int     idle_clks = 0;

  always @(negedge clk) begin
    if (pos != 0 && line) begin
      idle_clks++;
      if (idle_clks > 20 * CPB) pos = 0;
    end
  end

  initial forever begin
    @(negedge clk);
    if (line == 1'b0) begin
      logic [9:0] bits;
      repeat (CPB / 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        bits[i] = line;
        if (i < 9) repeat (CPB) @(negedge clk);
      end
      idle_clks = 0;
      if (!bits[9] || bits[0]) bad++;
      else begin
        for (int i = 0; i < 8; i++) bytes[pos][7-i] = bits[1+i];
        pos++;
        if (pos == 4) begin
          frame_t f;
          f.ident = ident_t'(bytes[0]);
          f.data  = {bytes[1], bytes[2]};
          f.flag  = bytes[3][0];
          frames.push_back(f);
          count++;
          pos = 0;
        end
      end
      repeat (CPB - CPB / 2 - 1) @(negedge clk);
    end
  end
endmodule
