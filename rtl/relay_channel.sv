// relay_channel: checking and relaying for one ring direction of a smart node.
//
// In a braided ring every node hears each direction twice: on the direct link
// from its neighbour and on the skip link from the node before that. The channel
// collects at most one frame from each link per slot. It decides as soon as both
// copies are in, or when a copy came straight from the sending node on the direct
// link, or WAIT_CLKS after the first copy arrived if the other never comes (a
// halted node or a cut link). The identifier of the direct copy (the skip copy if
// it is the only one) goes through mode_select:
//   primary relaying (relaying number 1): the sender's frame is forwarded as
//     received, relaying number incremented;
//   checking-relaying: the direct copy is forwarded with relaying number
//     incremented; if both copies are present its integrity flag becomes the AND
//     of both flags and of their equality (data_check); a lone copy, the only
//     path left, is forwarded with its own flag;
//   receiving: the same checked result is delivered to the node instead of being
//     forwarded.
// After deciding the channel ignores the link until the next slot_start, so a
// frame relayed once around the ring does not come back through it.
//
// Interface: slot_start, inhibit (the node is the sender in this slot: ignore
// the slot), d_valid/d_frame and s_valid/s_frame from the two frame receivers,
// fwd_valid/fwd_ready/fwd_frame to the frame transmitter (held until accepted),
// dlv_valid/dlv_frame to the receive combiner (one cycle), and ev_* reporting
// each decision for observation.
// Timing: the decision is made two clocks after its trigger (one for data_check).
// The modes, the relaying-number rule and the comparison of the copies from the
// two paths follow the published design; the per-slot collection, the timeout,
// the AND of flags and the choice of the direct copy are this design's reading.
module relay_channel
  import brain_pkg::*;
#(
  parameter logic [ID_W-1:0] OWN_ID    = 4'h5,
  parameter int unsigned     WAIT_CLKS = 400
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   slot_start,
  input  logic   inhibit,
  input  logic   d_valid,
  input  frame_t d_frame,
  input  logic   s_valid,
  input  frame_t s_frame,
  output logic   fwd_valid,
  input  logic   fwd_ready,
  output frame_t fwd_frame,
  output logic   dlv_valid,
  output frame_t dlv_frame,
  output logic   ev_valid,     // one cycle per decision
  output mode_e  ev_mode,
  output logic [1:0] ev_copies, // {direct present, skip present}
  output logic   ev_match      // both present and equal
);

  localparam int unsigned TW = $clog2(WAIT_CLKS + 1);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_CMP, S_DECIDE, S_FWD, S_DONE} state_e;

  state_e  state;
  logic    dv, sv;
  frame_t  dq, sq;
  logic [TW-1:0] timer;
  logic    aeqb;
  logic    m1, m2, m3;
  mode_e   mode;
  ident_t  ident_fwd;
  logic    primary_now;

  data_check #(.WIDTH(DATA_W)) u_check (
    .clk, .rst_n, .a(dq.data), .b(sq.data), .aeqb
  );

  mode_select #(.OWN_ID(OWN_ID)) u_mode (
    .ident_valid(dv || sv),
    .ident(dv ? dq.ident : sq.ident),
    .mode1(m1), .mode2(m2), .mode3(m3),
    .mode, .ident_fwd
  );

  // a frame straight from the sender on the direct link needs no second copy
  assign primary_now = dv && m1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dv        <= 1'b0;
      sv        <= 1'b0;
      dq        <= '0;
      sq        <= '0;
      timer     <= '0;
      fwd_valid <= 1'b0;
      fwd_frame <= '0;
      dlv_valid <= 1'b0;
      dlv_frame <= '0;
      ev_valid  <= 1'b0;
      ev_mode   <= MODE_NONE;
      ev_copies <= '0;
      ev_match  <= 1'b0;
    end else if (slot_start) begin
      state     <= inhibit ? S_DONE : S_IDLE;
      dv        <= 1'b0;
      sv        <= 1'b0;
      timer     <= '0;
      fwd_valid <= 1'b0;
      dlv_valid <= 1'b0;
      ev_valid  <= 1'b0;
    end else begin
      dlv_valid <= 1'b0;
      ev_valid  <= 1'b0;
      if (state == S_IDLE || state == S_WAIT) begin
        if (d_valid && !dv) begin dv <= 1'b1; dq <= d_frame; end
        if (s_valid && !sv) begin sv <= 1'b1; sq <= s_frame; end
      end
      unique case (state)
        S_IDLE: begin
          timer <= '0;
          if (d_valid || s_valid) state <= S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if ((dv && sv) || primary_now || timer == TW'(WAIT_CLKS))
            state <= S_CMP;
        end
        S_CMP:   state <= S_DECIDE;   // data_check result settles
        S_DECIDE: begin
          frame_t res;
          res.ident = ident_fwd;
          if (dv) begin
            res.data = dq.data;
            res.flag = (sv && !m1) ? (dq.flag & sq.flag & aeqb) : dq.flag;
          end else begin
            res.data = sq.data;
            res.flag = sq.flag;
          end
          ev_valid  <= 1'b1;
          ev_mode   <= mode;
          ev_copies <= {dv, sv};
          ev_match  <= dv && sv && aeqb;
          if (m3) begin
            dlv_valid <= 1'b1;
            dlv_frame <= res;
            state     <= S_DONE;
          end else begin
            fwd_valid <= 1'b1;
            fwd_frame <= res;
            state     <= S_FWD;
          end
        end
        S_FWD: begin
          if (fwd_ready) begin
            fwd_valid <= 1'b0;
            state     <= S_DONE;
          end
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a forward request stays up until the transmitter takes it
  a_fwd_hold: assert property (@(posedge clk) disable iff (!rst_n || slot_start)
    (fwd_valid && !fwd_ready) |=> fwd_valid);

endmodule
