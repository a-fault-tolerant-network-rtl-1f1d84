// tb_word_split: self-checking test of the 16-to-8-bit conversion.
// Repeats the published stimulus: 0xabcd then 0x5678 on consecutive cycles
// (expect 0xab, 0xcd, 0x56, 0x78 on four consecutive cycles), then 0xa5b5 and
// 0x5a5b with idle cycles between (expect 0xa5, 0xb5, 0x5a, 0x5b). Then random
// words at random times, offered only when in_ready, against a reference queue.
module tb_word_split;
  logic        clk = 1'b0, rst_n, in_valid, in_ready, out_valid;
  logic [15:0] in_data;
  logic [7:0]  out_data;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int   cyc = 0;
  int   first_out = -1, last_out = -1, n_out = 0;

  word_split dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    n_out++;
    if (first_out < 0) first_out = cyc;
    last_out = cyc;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected byte %h", out_data);
    end else begin
      logic [7:0] e;
      e = expq.pop_front();
      if (out_data !== e) begin failures++; $display("FAIL got %h expected %h", out_data, e); end
    end
  end

  task automatic put(input logic [15:0] d);
    @(negedge clk);
    while (!in_ready) begin in_valid = 1'b0; @(negedge clk); end
    in_valid = 1'b1; in_data = d;
    expq.push_back(d[15:8]); expq.push_back(d[7:0]);
  endtask
  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); in_valid = 1'b0; end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    put(16'habcd); put(16'h5678); idle(6);
    // four bytes on four consecutive cycles
    checks++;
    if (n_out != 4 || last_out - first_out != 3) begin
      failures++; $display("FAIL consecutive split n=%0d span=%0d", n_out, last_out - first_out);
    end
    put(16'ha5b5); idle(3); put(16'h5a5b); idle(4);
    for (int i = 0; i < 2000; i++) begin
      put(16'($urandom));
      if ($urandom % 2 != 0) idle($urandom % 4);
    end
    idle(6);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d bytes missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
