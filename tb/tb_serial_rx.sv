// tb_serial_rx: self-checking test of the serial-to-parallel conversion.
// A bit-level line model sends 10-bit characters (start 0, 8 data bits, stop
// 1) at CLKS_PER_BIT clocks per bit. First the two characters of the published
// simulation, data bits 1101_0011 and 0110_1010 in line order (expect data_msb
// 11010011 / 01101010 and data_lsb 11001011 / 01010110), then random bytes sent
// back to back, where valid must come once every 10 bit times, then a character
// with a bad stop bit, which must raise frame_err and no valid.
module tb_serial_rx;
  localparam int CPB = 5;
  logic       clk = 1'b0, rst_n, rxd, valid, frame_err;
  logic [7:0] data_msb, data_lsb;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int cyc = 0, last_valid = -1, n_spacing_bad = 0, n_valid = 0, n_err = 0;

  serial_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .valid, .data_msb,
                                       .data_lsb, .frame_err);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rev(input logic [7:0] x);
    for (int i = 0; i < 8; i++) rev[i] = x[7-i];
  endfunction

  always @(posedge clk) begin
    if (rst_n && frame_err) n_err++;
    if (rst_n && valid) begin
      n_valid++;
      if (last_valid >= 0 && cyc - last_valid != 10 * CPB) n_spacing_bad++;
      last_valid = cyc;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected %h", data_msb); end
      else begin
        logic [7:0] e;
        e = expq.pop_front();
        if (data_msb !== e || data_lsb !== rev(e)) begin
          failures++;
          $display("FAIL msb=%b lsb=%b expected %b", data_msb, data_lsb, e);
        end
      end
    end
  end

  // first data bit on the line is bit 7 of d
  task automatic send_char(input logic [7:0] d, input logic stop = 1'b1);
    logic [9:0] bits;
    bits = {stop, rev(d), 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = bits[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; rxd = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    expq.push_back(8'b1101_0011); send_char(8'b1101_0011);
    expq.push_back(8'b0110_1010); send_char(8'b0110_1010);
    repeat (20) @(negedge clk);
    last_valid = -1; n_spacing_bad = 0;
    for (int i = 0; i < 300; i++) begin
      logic [7:0] r;
      r = 8'($urandom);
      expq.push_back(r);
      send_char(r);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_spacing_bad != 0) begin failures++; $display("FAIL %0d bad spacings", n_spacing_bad); end
    n_valid = 0;
    send_char(8'h5a, 1'b0);
    rxd = 1'b1;
    repeat (40) @(negedge clk);
    checks++;
    if (n_err != 1 || n_valid != 0) begin failures++; $display("FAIL framing err=%0d valid=%0d", n_err, n_valid); end
    expq.push_back(8'hc3); send_char(8'hc3);
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
