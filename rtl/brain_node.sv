// brain_node: the checking-and-relaying logic of one smart node in a braided ring.
//
// The node has four serial inputs, the direct and skip links of each ring
// direction (clockwise: from the nodes one and two positions before it;
// counter-clockwise: from the nodes one and two positions after it), and one
// serial output per direction, which the ring wires to both the next node and
// the one after it. Each input has a frame_rx. Each direction has a relay_channel
// that checks and relays frames of that direction and a frame_tx that sends them;
// rx_combine merges the two directions' results when this node is the receiver.
//
// Sending: the slot schedule is external. If send_req is high at slot_start, the
// node sends {send_dst, relaying number 1, send_data, flag 1} in both directions
// at once and its own channels sit out the slot. err_inject makes the node
// transmit every data word inverted, modelling a node that sends erroneous data.
//
// Interface: slot_start, send_req/send_dst/send_data, err_inject, the four rxd_*
// inputs, txd_cw/txd_ccw, rx_valid/rx_data/rx_flag (final received word and
// integrity flag), and ev_* decision reports per direction (index 0 clockwise).
// Timing: 40 bit times per frame and per hop plus a few clocks, a checking node
// waits up to WAIT_CLKS for a missing copy; everything in a slot must settle
// before the next slot_start.
// The node's functions follow the published design; the slot interface, the
// fault-injection input and the wiring of the blocks are this design's own.
module brain_node
  import brain_pkg::*;
#(
  parameter logic [ID_W-1:0] OWN_ID       = 4'h5,
  parameter int unsigned     CLKS_PER_BIT = 5,
  parameter int unsigned     WAIT_CLKS    = 2 * FRAME_BYTES * BITS_PER_CHAR * CLKS_PER_BIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_start,
  input  logic              send_req,
  input  logic [ID_W-1:0]   send_dst,
  input  logic [DATA_W-1:0] send_data,
  input  logic              err_inject,
  input  logic              rxd_cw_d,
  input  logic              rxd_cw_s,
  input  logic              rxd_ccw_d,
  input  logic              rxd_ccw_s,
  output logic              txd_cw,
  output logic              txd_ccw,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_flag,
  output logic [1:0]        ev_valid,
  output mode_e [1:0]       ev_mode,
  output logic [1:0][1:0]   ev_copies,
  output logic [1:0]        ev_match
);

  localparam int unsigned NDIR = 2;   // 0 clockwise, 1 counter-clockwise

  logic   [NDIR-1:0] d_valid, s_valid, fwd_valid, fwd_ready, dlv_valid;
  frame_t [NDIR-1:0] d_frame, s_frame, fwd_frame, dlv_frame;
  logic   [NDIR-1:0] rxd_d, rxd_s, txd;
  logic   [NDIR-1:0] tx_valid, tx_ready;
  frame_t [NDIR-1:0] tx_frame;
  logic              send_go;
  frame_t            send_frame;
  frame_t            send_q;
  logic              send_pend;

  assign rxd_d   = {rxd_ccw_d, rxd_cw_d};
  assign rxd_s   = {rxd_ccw_s, rxd_cw_s};
  assign txd_cw  = txd[0];
  assign txd_ccw = txd[1];

  assign send_go = slot_start && send_req;
  always_comb begin
    send_frame.ident.dst   = send_dst;
    send_frame.ident.relay = RELAY_SENDER;
    send_frame.data        = send_data;
    send_frame.flag        = 1'b1;
  end

  // the sender's frame waits in send_q until both transmitters are free
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      send_pend <= 1'b0;
      send_q    <= '0;
    end else if (send_go) begin
      send_pend <= 1'b1;
      send_q    <= send_frame;
    end else if (send_pend && &tx_ready) begin
      send_pend <= 1'b0;
    end
  end

  for (genvar g = 0; g < NDIR; g++) begin : g_dir
    frame_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx_d (
      .clk, .rst_n, .rxd(rxd_d[g]), .clear(slot_start),
      .frame_valid(d_valid[g]), .frame(d_frame[g])
    );
    frame_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx_s (
      .clk, .rst_n, .rxd(rxd_s[g]), .clear(slot_start),
      .frame_valid(s_valid[g]), .frame(s_frame[g])
    );

    relay_channel #(.OWN_ID(OWN_ID), .WAIT_CLKS(WAIT_CLKS)) u_chan (
      .clk, .rst_n, .slot_start, .inhibit(send_req),
      .d_valid(d_valid[g]), .d_frame(d_frame[g]),
      .s_valid(s_valid[g]), .s_frame(s_frame[g]),
      .fwd_valid(fwd_valid[g]), .fwd_ready(fwd_ready[g]), .fwd_frame(fwd_frame[g]),
      .dlv_valid(dlv_valid[g]), .dlv_frame(dlv_frame[g]),
      .ev_valid(ev_valid[g]), .ev_mode(ev_mode[g]),
      .ev_copies(ev_copies[g]), .ev_match(ev_match[g])
    );

    // the sender's frame has priority over relaying
    always_comb begin
      tx_valid[g]  = send_pend ? &tx_ready : fwd_valid[g];
      tx_frame[g]  = send_pend ? send_q : fwd_frame[g];
      if (err_inject) tx_frame[g].data = ~tx_frame[g].data;
      fwd_ready[g] = tx_ready[g] && !send_pend;
    end

    frame_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
      .clk, .rst_n,
      .valid(tx_valid[g]), .ready(tx_ready[g]), .frame(tx_frame[g]),
      .txd(txd[g])
    );
  end

  rx_combine u_comb (
    .clk, .rst_n, .slot_start,
    .a_valid(dlv_valid[0]), .a_frame(dlv_frame[0]),
    .b_valid(dlv_valid[1]), .b_frame(dlv_frame[1]),
    .out_valid(rx_valid), .out_data(rx_data), .out_flag(rx_flag)
  );

endmodule
