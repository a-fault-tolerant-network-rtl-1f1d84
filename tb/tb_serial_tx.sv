// tb_serial_tx: self-checking test of the parallel-to-serial conversion.
// Loads the bytes of the published simulation (11010011, 10011010, 10101010)
// and random bytes back to back. A line monitor samples both serial outputs in
// the middle of every bit and checks start bit, data bits (txd_msb bit 7 first,
// txd_lsb bit 0 first) and stop bit. It also checks that back-to-back
// characters start exactly 10 bit times apart and that the line idles at 1.
module tb_serial_tx;
  localparam int CPB = 5;
  logic       clk = 1'b0, rst_n, load, ready, txd_msb, txd_lsb;
  logic [7:0] data;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int cyc = 0, n_chars = 0, last_start = -1, n_spacing_bad = 0;

  serial_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .load, .data, .ready,
                                       .txd_msb, .txd_lsb);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: start bit detected on a falling edge of txd_msb, then mid-bit samples
  initial begin
    @(posedge rst_n);
    forever begin
      logic [9:0] m, l;
      int start;
      @(negedge clk);
      if (txd_msb == 1'b0) begin
        start = cyc;
        if (last_start >= 0 && start - last_start != 10 * CPB && start - last_start < 12 * CPB)
          n_spacing_bad++;
        last_start = start;
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 10; i++) begin
          m[i] = txd_msb; l[i] = txd_lsb;
          if (i < 9) repeat (CPB) @(negedge clk);
        end
        n_chars++;
        checks++;
        if (expq.size() == 0) begin failures++; $display("FAIL unexpected char"); end
        else begin
          logic [7:0] e, em;
          e = expq.pop_front();
          for (int k = 0; k < 8; k++) em[k] = e[7-k];
          if (m !== {1'b1, em, 1'b0} || l !== {1'b1, e, 1'b0}) begin
            failures++;
            $display("FAIL msb=%b lsb=%b for %b", m, l, e);
          end
        end
        // finish the stop bit
        repeat (CPB - CPB / 2 - 1) @(negedge clk);
      end
    end
  end

  task automatic send(input logic [7:0] d);
    @(negedge clk);
    while (!ready) @(negedge clk);
    load = 1'b1; data = d; expq.push_back(d);
    @(negedge clk);
    load = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; data = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    checks++;
    if (txd_msb !== 1'b1 || txd_lsb !== 1'b1 || !ready) begin failures++; $display("FAIL idle"); end
    send(8'b1101_0011); send(8'b1001_1010); send(8'b1010_1010);
    // back to back: keep load high, change data when taken
    for (int i = 0; i < 200; i++) begin
      logic [7:0] r;
      r = 8'($urandom);
      load = 1'b1; data = r;
      @(posedge clk);
      while (!ready) @(posedge clk);
      expq.push_back(r);
      @(negedge clk);
    end
    load = 1'b0;
    repeat (20 * CPB) @(negedge clk);
    checks++;
    if (n_spacing_bad != 0) begin failures++; $display("FAIL %0d bad spacings", n_spacing_bad); end
    checks++;
    if (expq.size() != 0 || n_chars != 203) begin failures++; $display("FAIL chars=%0d left=%0d", n_chars, expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
