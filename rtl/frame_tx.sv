// frame_tx: sends one four-byte ring frame on a serial line.
//
// A frame accepted with valid/ready is written into a four-byte buffer: the
// identifier into byte 0 and the flag into byte 3 at once, the data word through
// word_split, which delivers its high byte and then its low byte into bytes 1
// and 2 over the next two clocks. The buffer is then handed byte by byte to
// serial_tx, which shifts each out as a 10-bit character. The splitting finishes
// long before the identifier character has left, so characters follow without
// gaps.
//
// Interface: valid/ready/frame in (brain_pkg::frame_t), txd serial out (data bit
// 7 first). Timing: 4 characters, 40 bit times, the first start bit one clock
// after acceptance; ready returns once the last character has been handed to
// serial_tx, so a following frame queues behind it without a gap.
// The frame layout and handshake are this design's choice (see brain_pkg).
module frame_tx
  import brain_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  output logic   ready,
  input  frame_t frame,
  output logic   txd
);

  logic [7:0] buffer [FRAME_BYTES];
  logic [FRAME_BYTES-1:0] have;   // buffer byte is filled
  logic [1:0] idx;                // next byte to send
  logic [1:0] sidx;               // next buffer slot for a split byte
  logic       busy;
  logic       s_valid;
  logic [7:0] s_data;
  logic       s_in_ready;
  logic       t_ready, t_load;
  logic       txd_lsb_unused;

  assign ready  = !busy;
  assign t_load = busy && have[idx];

  word_split u_split (
    .clk, .rst_n,
    .in_valid(valid && ready),
    .in_data(frame.data),
    .in_ready(s_in_ready),
    .out_valid(s_valid),
    .out_data(s_data)
  );

  serial_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n,
    .load(t_load),
    .data(buffer[idx]),
    .ready(t_ready),
    .txd_msb(txd),
    .txd_lsb(txd_lsb_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      have <= '0;
      idx  <= '0;
      sidx <= 2'd1;
      for (int i = 0; i < FRAME_BYTES; i++) buffer[i] <= '0;
    end else begin
      if (valid && ready) begin
        busy      <= 1'b1;
        buffer[0] <= frame.ident;
        buffer[3] <= {7'd0, frame.flag};
        have      <= 4'b1001;
        idx       <= '0;
        sidx      <= 2'd1;
      end else begin
        if (s_valid) begin
          buffer[sidx] <= s_data;
          have[sidx]   <= 1'b1;
          sidx         <= sidx + 1'b1;
        end
        if (t_load && t_ready) begin
          idx <= idx + 1'b1;
          if (idx == 2'd3) begin
            busy <= 1'b0;
            have <= '0;
          end
        end
      end
    end
  end

  // the splitter is idle whenever a new frame is taken
  a_split_free: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && ready) |-> s_in_ready);

endmodule
