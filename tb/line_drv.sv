// line_drv: testbench line driver. send() puts one four-byte ring frame on the
// line as four 10-bit characters (start 0, data bit 7 first, stop 1) at CPB
// clocks per bit; the line idles at 1. Written from the frame layout, without
// the design's own converters, so the checks do not depend on them.
module line_drv
  import brain_pkg::*;
#(
  parameter int CPB = 5
) (
  input  logic clk,
  output logic line
);
  initial line = 1'b1;

  task automatic send(input frame_t f);
    logic [7:0] bytes [4];
    bytes[0] = f.ident;
    bytes[1] = f.data[15:8];
    bytes[2] = f.data[7:0];
    bytes[3] = {7'd0, f.flag};
    for (int b = 0; b < 4; b++) begin
      logic [9:0] bits;
      bits[0] = 1'b0;
      for (int i = 0; i < 8; i++) bits[1+i] = bytes[b][7-i];
      bits[9] = 1'b1;
      for (int i = 0; i < 10; i++) begin
        line = bits[i];
        repeat (CPB) @(negedge clk);
      end
    end
    line = 1'b1;
  endtask
endmodule
