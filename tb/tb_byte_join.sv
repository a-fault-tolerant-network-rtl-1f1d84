// tb_byte_join: self-checking test of the 8-to-16-bit conversion.
// Repeats the published stimulus: 0xab, 0xcd, 0x56, 0x78 on consecutive cycles
// (expect 0xabcd, 0x5678), then 0x11 and 0x22 with idle cycles between and
// between which the input holds its value with the flag low (expect exactly one
// 0x1122). Then random bytes with random gaps against a reference queue, and
// clear dropping a stored first byte. Each word must appear one clock after its
// second byte.
module tb_byte_join;
  logic        clk = 1'b0, rst_n, clear, in_valid, out_valid;
  logic [7:0]  in_data;
  logic [15:0] out_data;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];
  int   n_out = 0;

  byte_join dut (.clk, .rst_n, .clear, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    n_out++;
    checks++;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected word %h", out_data);
    end else begin
      logic [15:0] e;
      e = expq.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL got %h expected %h", out_data, e); end
    end
  end

  logic [7:0] first; logic have_first = 1'b0;
  task automatic put(input logic [7:0] d);
    @(negedge clk); in_valid = 1'b1; in_data = d;
    if (have_first) begin expq.push_back({first, d}); have_first = 1'b0; end
    else begin first = d; have_first = 1'b1; end
  endtask
  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); in_valid = 1'b0; end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    put(8'hab); put(8'hcd); put(8'h56); put(8'h78);
    // latency: word after the second byte's edge
    @(negedge clk); in_valid = 1'b0;
    checks++;
    if (!(out_valid && out_data == 16'h5678)) begin failures++; $display("FAIL latency"); end
    idle(3);
    put(8'h11); idle(4); put(8'h22); idle(4);
    checks++;
    if (n_out != 3) begin failures++; $display("FAIL count %0d", n_out); end
    // clear drops a lone first byte
    put(8'h99); expq.delete(); have_first = 1'b0;
    @(negedge clk); in_valid = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    put(8'h12); put(8'h34); idle(2);
    for (int i = 0; i < 3000; i++) begin
      put(8'($urandom));
      if ($urandom % 2 != 0) idle($urandom % 4);
    end
    if (have_first) begin put(8'h00); end
    idle(4);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
