// brain_ring: a braided-ring availability and integrity network of smart nodes.
//
// N_NODES brain_node instances (node IDs 1..N_NODES, array index = ID-1) form a
// ring. Each node's clockwise output drives the direct link to the next node
// and the skip link to the node after that; its counter-clockwise output does the
// same the other way round. Every node therefore hears each direction twice,
// which lets it check a relayed frame against the copy from one node further
// back (self-checking relaying) and lets traffic bypass a failed node or link
// (path reconstruction).
//
// Fault injection, per node: node_halt holds a node in reset with its outputs at
// the idle level (a powered-down node); node_err makes it send inverted data.
// Per link: cut_cw_d[i]/cut_cw_s[i] break the clockwise direct/skip link leaving
// node i, cut_ccw_d[i]/cut_ccw_s[i] the counter-clockwise ones.
//
// Interface: slot_start marks the start of a communication slot for all nodes;
// send_req/send_dst/send_data per node (the node that sends in the slot);
// rx_valid/rx_data/rx_flag per node (final word and integrity flag at the
// addressed node); ev_* per node and direction report relay decisions.
// Timing: see brain_node; a frame is 40 bit times long.
// Eight nodes and the braided wiring follow the published network; the slot
// interface and fault-injection ports are this design's own.
module brain_ring
  import brain_pkg::*;
#(
  parameter int unsigned N_NODES      = 8,
  parameter int unsigned CLKS_PER_BIT = 5
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             slot_start,
  input  logic [N_NODES-1:0]               send_req,
  input  logic [N_NODES-1:0][ID_W-1:0]     send_dst,
  input  logic [N_NODES-1:0][DATA_W-1:0]   send_data,
  input  logic [N_NODES-1:0]               node_halt,
  input  logic [N_NODES-1:0]               node_err,
  input  logic [N_NODES-1:0]               cut_cw_d,
  input  logic [N_NODES-1:0]               cut_cw_s,
  input  logic [N_NODES-1:0]               cut_ccw_d,
  input  logic [N_NODES-1:0]               cut_ccw_s,
  output logic [N_NODES-1:0]               rx_valid,
  output logic [N_NODES-1:0][DATA_W-1:0]   rx_data,
  output logic [N_NODES-1:0]               rx_flag,
  output logic [N_NODES-1:0][1:0]          ev_valid,
  output mode_e [N_NODES-1:0][1:0]         ev_mode,
  output logic [N_NODES-1:0][1:0][1:0]     ev_copies,
  output logic [N_NODES-1:0][1:0]          ev_match
);

  logic [N_NODES-1:0] txd_cw, txd_ccw, line_cw, line_ccw;

  // a halted node leaves its lines at the idle level
  assign line_cw  = txd_cw  | node_halt;
  assign line_ccw = txd_ccw | node_halt;

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam int unsigned PREV1 = (i + N_NODES - 1) % N_NODES;
    localparam int unsigned PREV2 = (i + N_NODES - 2) % N_NODES;
    localparam int unsigned NEXT1 = (i + 1) % N_NODES;
    localparam int unsigned NEXT2 = (i + 2) % N_NODES;

    brain_node #(
      .OWN_ID(ID_W'(i + 1)),
      .CLKS_PER_BIT(CLKS_PER_BIT)
    ) u_node (
      .clk,
      .rst_n(rst_n && !node_halt[i]),
      .slot_start,
      .send_req(send_req[i]),
      .send_dst(send_dst[i]),
      .send_data(send_data[i]),
      .err_inject(node_err[i]),
      .rxd_cw_d (line_cw[PREV1]  | cut_cw_d[PREV1]),
      .rxd_cw_s (line_cw[PREV2]  | cut_cw_s[PREV2]),
      .rxd_ccw_d(line_ccw[NEXT1] | cut_ccw_d[NEXT1]),
      .rxd_ccw_s(line_ccw[NEXT2] | cut_ccw_s[NEXT2]),
      .txd_cw(txd_cw[i]),
      .txd_ccw(txd_ccw[i]),
      .rx_valid(rx_valid[i]),
      .rx_data(rx_data[i]),
      .rx_flag(rx_flag[i]),
      .ev_valid(ev_valid[i]),
      .ev_mode(ev_mode[i]),
      .ev_copies(ev_copies[i]),
      .ev_match(ev_match[i])
    );
  end

endmodule
