// frame_rx: receives one four-byte ring frame from a serial link.
//
// serial_rx turns the line into bytes. Byte 0 is the mode selection identifier,
// bytes 1 and 2 are passed through byte_join to form the 16-bit data word, byte 3
// is the integrity flag (its bit 0). When byte 3 arrives the whole frame is
// presented with a one-cycle frame_valid. The byte position is reset by clear
// (the start of a slot), by a framing error, or when a frame stalls for more than
// two character times, so a frame cut off by a failing neighbour cannot shift
// the next one.
//
// Interface: rxd (serial in), clear, frame_valid/frame (brain_pkg::frame_t).
// Timing: frame_valid about one clock after the last character's valid, that is
// about 40 bit times after the first start bit.
// The frame layout is this design's choice (see brain_pkg).
module frame_rx
  import brain_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rxd,
  input  logic   clear,
  output logic   frame_valid,
  output frame_t frame
);

  localparam int unsigned GAP_CLKS = 2 * BITS_PER_CHAR * CLKS_PER_BIT;
  localparam int unsigned GW = $clog2(GAP_CLKS + 1);

  logic        b_valid, b_err;
  logic [7:0]  b_msb, b_lsb;
  logic [1:0]  pos;         // byte position within the frame
  logic [GW-1:0] gap;       // clocks since the last byte, mid-frame
  logic        j_valid;
  logic [15:0] j_data;
  logic        realign;
  ident_t      ident_q;
  logic [15:0] data_q;

  serial_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd,
    .valid(b_valid), .data_msb(b_msb), .data_lsb(b_lsb), .frame_err(b_err)
  );

  assign realign = clear || b_err || (pos != 2'd0 && gap == GW'(GAP_CLKS));

  byte_join u_join (
    .clk, .rst_n,
    .clear(realign),
    .in_valid(b_valid && !realign && (pos == 2'd1 || pos == 2'd2)),
    .in_data(b_msb),
    .out_valid(j_valid),
    .out_data(j_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos         <= '0;
      gap         <= '0;
      ident_q     <= '0;
      data_q      <= '0;
      frame_valid <= 1'b0;
      frame       <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (j_valid) data_q <= j_data;
      if (realign) begin
        pos <= '0;
        gap <= '0;
      end else if (b_valid) begin
        gap <= '0;
        pos <= pos + 1'b1;
        if (pos == 2'd0) ident_q <= ident_t'(b_msb);
        if (pos == 2'd3) begin
          frame_valid <= 1'b1;
          frame.ident <= ident_q;
          frame.data  <= data_q;
          frame.flag  <= b_msb[0];
        end
      end else if (pos != 2'd0) begin
        gap <= gap + 1'b1;
      end
    end
  end

endmodule
