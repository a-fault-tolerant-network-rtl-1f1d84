// serial_tx: parallel-to-serial conversion for one ring link.
//
// A byte offered with load while ready is high is captured at the start of a
// conversion period into a 10-bit shift register together with a start bit (0)
// and a stop bit (1). The shift register then moves one bit to the line every
// CLKS_PER_BIT clocks (the baud timing) until all 10 bits are out, after which
// ready returns. txd_msb sends data bit 7 first (the ordering the ring links
// use), txd_lsb sends the same byte bit 0 first. Both lines idle at 1.
//
// Interface: load/data in (taken when ready), ready out, txd_msb/txd_lsb serial
// out. Timing: the start bit appears one clock after load; a character occupies
// exactly 10*CLKS_PER_BIT clocks; ready is already high in the last clock of
// the stop bit, so a byte loaded then follows with no gap, so a stream runs at one byte per 10 bit times (1 us at
// 10 Mbit/s with the defaults).
// The load at the start of the conversion period, the bit-by-bit shift under the
// baud timing and the two serial outputs follow the published design; the
// ready/load handshake is this design's choice.
module serial_tx #(
  parameter int unsigned CLKS_PER_BIT = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd_msb,
  output logic       txd_lsb
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [CW-1:0] LAST = CW'(CLKS_PER_BIT - 1);

  function automatic logic [7:0] reverse8(input logic [7:0] x);
    for (int i = 0; i < 8; i++) reverse8[i] = x[7-i];
  endfunction

  logic [9:0]  sh_msb, sh_lsb;  // bit [0] is on the line
  logic [3:0]  nleft;           // bits still to send, including the current one
  logic [CW-1:0] cnt;

  // ready also in the last clock of a stop bit, so characters can follow
  // one another without an idle clock between them
  assign ready   = (nleft == 4'd0) || (nleft == 4'd1 && cnt == LAST);
  assign txd_msb = (nleft == 4'd0) ? 1'b1 : sh_msb[0];
  assign txd_lsb = (nleft == 4'd0) ? 1'b1 : sh_lsb[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh_msb <= '1;
      sh_lsb <= '1;
      nleft  <= '0;
      cnt    <= '0;
    end else if (ready && load) begin
      sh_msb <= {1'b1, reverse8(data), 1'b0};
      sh_lsb <= {1'b1, data, 1'b0};
      nleft  <= 4'd10;
      cnt    <= '0;
    end else if (nleft != 4'd0) begin
      if (cnt == LAST) begin
        cnt    <= '0;
        sh_msb <= {1'b1, sh_msb[9:1]};
        sh_lsb <= {1'b1, sh_lsb[9:1]};
        nleft  <= nleft - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
