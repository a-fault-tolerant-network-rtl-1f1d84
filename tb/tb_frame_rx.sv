// tb_frame_rx: self-checking test of the frame receiver.
// A bit-level driver sends four-character frames: fixed and random frames,
// back to back and with gaps, each of which must come out once with the right
// identifier, data word and flag about one clock after its last character;
// a frame cut off after two characters, which must be dropped and must not
// shift the next frame (stall realignment); and a frame cut by clear.
module tb_frame_rx;
  import brain_pkg::*;
  localparam int CPB = 5;
  localparam int CHAR = 10 * CPB;
  logic clk = 1'b0, rst_n, rxd, clear, frame_valid;
  frame_t frame;
  int checks = 0, failures = 0;
  frame_t expq[$];
  int cyc = 0, t_last = 0, t_end = 0;

  frame_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .clear, .frame_valid, .frame);
  line_drv #(.CPB(CPB)) drv (.clk, .line(rxd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && frame_valid) begin
    checks++;
    t_last = cyc;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected frame %h", frame); end
    else begin
      frame_t e;
      e = expq.pop_front();
      if (frame !== e) begin failures++; $display("FAIL got %h expected %h", frame, e); end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic frame_t mk(input logic [7:0] id, input logic [15:0] data, input logic flag);
    mk.ident = ident_t'(id); mk.data = data; mk.flag = flag;
  endfunction

  // raw characters on the line, for cut-off frames
  task automatic send_chars(input int n, input logic [7:0] b0);
    for (int c = 0; c < n; c++) begin
      logic [9:0] bits;
      bits = {1'b1, b0[0], b0[1], b0[2], b0[3], b0[4], b0[5], b0[6], b0[7], 1'b0};
      for (int i = 0; i < 10; i++) begin
        drv.line = bits[i];
        repeat (CPB) @(negedge clk);
      end
    end
    drv.line = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    expq.push_back(mk(8'h51, 16'h00ff, 1'b1)); drv.send(mk(8'h51, 16'h00ff, 1'b1));
    t_end = cyc;
    repeat (20) @(negedge clk);
    checks++;
    if (t_last - t_end > 6 || t_last < t_end) begin failures++; $display("FAIL latency %0d", t_last - t_end); end
    expq.push_back(mk(8'h62, 16'hff00, 1'b0)); drv.send(mk(8'h62, 16'hff00, 1'b0));
    for (int i = 0; i < 100; i++) begin
      frame_t f;
      f = mk(8'($urandom), 16'($urandom), 1'($urandom));
      expq.push_back(f); drv.send(f);
      if (i % 3 == 0) repeat ($urandom % 200) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    // cut-off frame: two characters then silence; next frame must be intact
    send_chars(2, 8'h77);
    repeat (3 * CHAR) @(negedge clk);
    expq.push_back(mk(8'h31, 16'h1234, 1'b1)); drv.send(mk(8'h31, 16'h1234, 1'b1));
    repeat (20) @(negedge clk);
    // clear in the middle of a frame
    send_chars(3, 8'h44);
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    expq.push_back(mk(8'h52, 16'h5678, 1'b1)); drv.send(mk(8'h52, 16'h5678, 1'b1));
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d frames missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
