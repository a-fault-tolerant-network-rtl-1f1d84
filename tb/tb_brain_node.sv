// tb_brain_node: self-checking test of one smart node (node ID 4).
// Bit-level drivers feed its four serial inputs and monitors decode its two
// serial outputs. One case per slot:
//   primary relaying of a sender frame (and its hop latency),
//   checking-relaying with matching copies, with different copies, with a copy
//   flagged invalid, and with a lone copy forwarded after the wait,
//   a repeated frame in the same slot being ignored,
//   receiving from both directions (agreeing, disagreeing, one side only),
//   sending, and relaying with data-error injection.
module tb_brain_node;
  import brain_pkg::*;
  localparam int CPB   = 5;
  localparam int FRAME = 40 * CPB;          // clocks per frame on a line
  localparam int WAIT  = 2 * FRAME;         // node's default wait for a copy
  localparam int SLOT  = 3000;

  logic clk = 1'b0, rst_n, slot_start, send_req, err_inject;
  logic [3:0]  send_dst;
  logic [15:0] send_data;
  logic cw_d, cw_s, ccw_d, ccw_s, txd_cw, txd_ccw;
  logic rx_valid, rx_flag;
  logic [15:0] rx_data;
  logic [1:0] ev_valid, ev_match;
  mode_e [1:0] ev_mode;
  logic [1:0][1:0] ev_copies;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_rx = 0; logic [15:0] last_rx_data; logic last_rx_flag;

  brain_node #(.OWN_ID(4'h4), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .slot_start, .send_req, .send_dst, .send_data, .err_inject,
    .rxd_cw_d(cw_d), .rxd_cw_s(cw_s), .rxd_ccw_d(ccw_d), .rxd_ccw_s(ccw_s),
    .txd_cw, .txd_ccw, .rx_valid, .rx_data, .rx_flag,
    .ev_valid, .ev_mode, .ev_copies, .ev_match
  );

  line_drv #(.CPB(CPB)) d_cw_d  (.clk, .line(cw_d));
  line_drv #(.CPB(CPB)) d_cw_s  (.clk, .line(cw_s));
  line_drv #(.CPB(CPB)) d_ccw_d (.clk, .line(ccw_d));
  line_drv #(.CPB(CPB)) d_ccw_s (.clk, .line(ccw_s));
  line_mon #(.CPB(CPB)) m_cw    (.clk, .line(txd_cw));
  line_mon #(.CPB(CPB)) m_ccw   (.clk, .line(txd_ccw));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && rx_valid) begin
    n_rx++; last_rx_data = rx_data; last_rx_flag = rx_flag;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic frame_t mk(input logic [3:0] dst, input logic [3:0] relay,
                                input logic [15:0] data, input logic flag);
    mk.ident.dst = dst; mk.ident.relay = relay; mk.data = data; mk.flag = flag;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // start a slot: clear monitors, pulse slot_start
  task automatic new_slot(input logic req = 1'b0);
    @(negedge clk);
    m_cw.frames.delete(); m_ccw.frames.delete();
    send_req = req; slot_start = 1'b1;
    @(negedge clk);
    slot_start = 1'b0; send_req = 1'b0;
  endtask

  task automatic expect_out(input int which, input frame_t f, input string what);
    frame_t q[$];
    q = (which == 0) ? m_cw.frames : m_ccw.frames;
    check(q.size() == 1 && q[0] == f, what);
    if (q.size() >= 1)
      $display("  %s: %0d frame(s), first %h (expected %h)", what, q.size(), q[0], f);
  endtask

  task automatic expect_none(input int which, input string what);
    check(((which == 0) ? m_cw.frames.size() : m_ccw.frames.size()) == 0, what);
  endtask

  initial begin
    int t0, t1;
    rst_n = 1'b0; slot_start = 1'b0; send_req = 1'b0; err_inject = 1'b0;
    send_dst = '0; send_data = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // 1: primary relaying, with hop latency
    new_slot();
    t0 = cyc;
    d_cw_d.send(mk(4'h5, 4'h1, 16'h00ff, 1'b1));
    wait (m_cw.count > 0 && m_cw.frames.size() > 0);
    t1 = cyc;
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h5, 4'h2, 16'h00ff, 1'b1), "primary relay");
    expect_none(1, "primary relay other direction");
    // received frame FRAME clocks, relayed frame FRAME clocks, plus a few clocks
    check(t1 - t0 >= 2 * FRAME && t1 - t0 <= 2 * FRAME + 20, $sformatf("hop latency %0d", t1 - t0));

    // 2: checking-relaying, copies agree
    new_slot();
    d_cw_s.send(mk(4'h5, 4'h1, 16'h1234, 1'b1));
    d_cw_d.send(mk(4'h5, 4'h2, 16'h1234, 1'b1));
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h5, 4'h3, 16'h1234, 1'b1), "check match");

    // 3: checking-relaying, copies differ
    new_slot();
    fork
      d_cw_s.send(mk(4'h5, 4'h2, 16'h1234, 1'b1));
      begin repeat (FRAME / 2) @(negedge clk); d_cw_d.send(mk(4'h5, 4'h3, 16'h4321, 1'b1)); end
    join
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h5, 4'h4, 16'h4321, 1'b0), "check mismatch");

    // 4: checking-relaying, agreeing copies but the direct one flagged invalid
    new_slot();
    fork
      d_ccw_s.send(mk(4'h5, 4'h2, 16'hbeef, 1'b1));
      d_ccw_d.send(mk(4'h5, 4'h3, 16'hbeef, 1'b0));
    join
    repeat (SLOT) @(negedge clk);
    expect_out(1, mk(4'h5, 4'h4, 16'hbeef, 1'b0), "check flag propagation");
    expect_none(0, "check flag other direction");

    // 5: lone copy, forwarded after the wait
    new_slot();
    t0 = cyc;
    d_ccw_s.send(mk(4'h5, 4'h3, 16'habcd, 1'b1));
    wait (m_ccw.frames.size() > 0);
    t1 = cyc;
    repeat (SLOT) @(negedge clk);
    expect_out(1, mk(4'h5, 4'h4, 16'habcd, 1'b1), "lone copy");
    check(t1 - t0 >= 2 * FRAME + WAIT, $sformatf("lone copy waited (%0d)", t1 - t0));

    // 6: a second frame in the same slot is not relayed again
    new_slot();
    d_cw_d.send(mk(4'h5, 4'h1, 16'h0f0f, 1'b1));
    repeat (FRAME) @(negedge clk);
    d_cw_d.send(mk(4'h5, 4'h1, 16'hf0f0, 1'b1));
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h5, 4'h2, 16'h0f0f, 1'b1), "relay once per slot");

    // 7: receiving, both directions agree
    new_slot();
    n_rx = 0;
    fork
      d_cw_s.send(mk(4'h4, 4'h2, 16'h00ff, 1'b1));
      d_cw_d.send(mk(4'h4, 4'h3, 16'h00ff, 1'b1));
      d_ccw_s.send(mk(4'h4, 4'h2, 16'h00ff, 1'b1));
      d_ccw_d.send(mk(4'h4, 4'h3, 16'h00ff, 1'b1));
    join
    repeat (SLOT) @(negedge clk);
    check(n_rx == 1 && last_rx_data == 16'h00ff && last_rx_flag == 1'b1, "receive agree");
    expect_none(0, "receiver does not relay cw");
    expect_none(1, "receiver does not relay ccw");

    // 8: receiving, directions disagree
    new_slot();
    n_rx = 0;
    fork
      d_cw_d.send(mk(4'h4, 4'h3, 16'h00ff, 1'b1));
      d_ccw_d.send(mk(4'h4, 4'h3, 16'hff00, 1'b1));
    join
    repeat (SLOT) @(negedge clk);
    check(n_rx == 1 && last_rx_flag == 1'b0, "receive disagree");

    // 9: receiving from one direction only: reported at the slot end, invalid
    new_slot();
    n_rx = 0;
    d_cw_d.send(mk(4'h4, 4'h3, 16'h5555, 1'b1));
    repeat (SLOT) @(negedge clk);
    check(n_rx == 0, "one direction not reported before slot end");
    new_slot();
    repeat (5) @(negedge clk);
    check(n_rx == 1 && last_rx_data == 16'h5555 && last_rx_flag == 1'b0, "one direction");

    // 10: sending, both directions; own channels ignore the slot
    send_dst = 4'h7; send_data = 16'h00ff;
    new_slot(1'b1);
    d_cw_d.send(mk(4'h7, 4'h1, 16'h1111, 1'b1));
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h7, 4'h1, 16'h00ff, 1'b1), "send cw");
    expect_out(1, mk(4'h7, 4'h1, 16'h00ff, 1'b1), "send ccw");

    // 11: data-error injection inverts what the node relays
    err_inject = 1'b1;
    new_slot();
    d_cw_d.send(mk(4'h5, 4'h1, 16'h00ff, 1'b1));
    repeat (SLOT) @(negedge clk);
    expect_out(0, mk(4'h5, 4'h2, 16'hff00, 1'b1), "error injection");
    err_inject = 1'b0;

    check(m_cw.bad == 0 && m_ccw.bad == 0, "no malformed characters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
