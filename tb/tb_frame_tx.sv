// tb_frame_tx: self-checking test of the frame transmitter.
// Frames are offered with valid/ready, singly and back to back; a bit-level
// monitor decodes the line. Every frame must appear once and intact, a frame
// must last 40 bit times, and back-to-back frames must follow each other
// without idle time (one frame every 40 bit times).
module tb_frame_tx;
  import brain_pkg::*;
  localparam int CPB = 5;
  localparam int FRAMEC = 40 * CPB;
  logic clk = 1'b0, rst_n, valid, ready, txd;
  frame_t frame;
  int checks = 0, failures = 0;
  frame_t sent[$];
  int cyc = 0;
  int t_first_start = -1, t_done = 0;

  frame_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .valid, .ready, .frame, .txd);
  line_mon #(.CPB(CPB)) mon (.clk, .line(txd));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && !txd && t_first_start < 0) t_first_start = cyc;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic frame_t mk(input logic [7:0] id, input logic [15:0] data, input logic flag);
    mk.ident = ident_t'(id); mk.data = data; mk.flag = flag;
  endfunction

  task automatic offer(input frame_t f);
    @(negedge clk);
    valid = 1'b1; frame = f;
    @(posedge clk);
    while (!ready) @(posedge clk);
    sent.push_back(f);
    @(negedge clk);
    valid = 1'b0;
  endtask

  initial begin
    int n;
    rst_n = 1'b0; valid = 1'b0; frame = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    offer(mk(8'h51, 16'h00ff, 1'b1));
    repeat (FRAMEC + 20) @(negedge clk);
    checks++;
    if (mon.count != 1 || mon.frames[0] != mk(8'h51, 16'h00ff, 1'b1)) begin
      failures++; $display("FAIL single frame");
    end
    // back to back: 20 frames must take 20 frame times
    mon.frames.delete(); mon.count = 0; sent.delete();
    t_first_start = -1;
    for (int i = 0; i < 20; i++) offer(mk(8'($urandom), 16'($urandom), 1'($urandom)));
    wait (mon.count == 20);
    t_done = cyc;
    checks++;
    // last stop bit sampled mid-bit: 20 frames less half a bit after the first start
    if (t_done - t_first_start < 20 * FRAMEC - CPB || t_done - t_first_start > 20 * FRAMEC + 5) begin
      failures++; $display("FAIL 20 frames took %0d clocks", t_done - t_first_start);
    end
    repeat (FRAMEC) @(negedge clk);
    n = mon.frames.size();
    checks++;
    if (n != 20) begin failures++; $display("FAIL %0d frames", n); end
    for (int i = 0; i < n && i < sent.size(); i++) begin
      checks++;
      if (mon.frames[i] != sent[i]) begin failures++; $display("FAIL frame %0d", i); end
    end
    checks++;
    if (mon.bad != 0) begin failures++; $display("FAIL malformed characters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
