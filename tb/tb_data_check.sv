// tb_data_check: self-checking test of the 16-bit equality check.
// Drives the waveform values of the published behavioural simulation (0000 vs
// ffff, 00ff vs 00ff, ff00 vs 00ff), every single-bit difference, and random
// pairs, and checks that aeqb reports the comparison of the inputs present at
// the previous rising edge (one cycle of latency).
module tb_data_check;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] a, b;
  logic        aeqb;
  int checks = 0, failures = 0;

  data_check dut (.clk, .rst_n, .a, .b, .aeqb);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] va, input logic [15:0] vb);
    @(negedge clk);
    a = va; b = vb;
    @(negedge clk);            // one rising edge later
    checks++;
    if (aeqb !== (va == vb)) begin
      failures++;
      $display("FAIL a=%h b=%h aeqb=%b", va, vb, aeqb);
    end
  endtask

  initial begin
    rst_n = 1'b0; a = '0; b = '1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (aeqb !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    apply(16'h0000, 16'hffff);
    apply(16'h00ff, 16'h00ff);
    apply(16'hff00, 16'h00ff);
    for (int i = 0; i < 16; i++) apply(16'h5a3c, 16'h5a3c ^ (16'h1 << i));
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] r;
      r = 16'($urandom);
      if (i % 3 == 0) apply(r, r);
      else            apply(r, 16'($urandom));
    end
    // latency: a change is seen after exactly one rising edge
    @(negedge clk); a = 16'h1234; b = 16'h1234;
    @(negedge clk); a = 16'h1234; b = 16'h4321;
    checks++;
    if (aeqb !== 1'b1) begin failures++; $display("FAIL latency 1"); end
    @(negedge clk);
    checks++;
    if (aeqb !== 1'b0) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
