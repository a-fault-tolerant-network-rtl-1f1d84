// tb_brain_ring: end-to-end test of the eight-node braided ring at its default
// parameters. In every scenario node 1 sends 0x00FF to node 5 in one slot; a
// second, empty slot follows so that a lone-direction result is reported too.
// Scenarios:
//   fault-free operation (node 5 must get 0x00FF with the integrity flag set,
//   within the expected latency), a second sender/receiver pair,
//   all 24 halted-node combinations of the published fault-injection table with
//   its published outcomes (T: 0x00FF with flag 1; F: no result with flag 1),
//   relaying nodes sending erroneous data (flag must be 0),
//   cut links that leave both directions reachable (flag 1).
// It also counts how often each mechanism acted (primary relaying, checking
// with agreeing and with differing copies, a lone copy relayed after the wait,
// receiving, halted nodes, data errors, cut links) and fails if one never did.
module tb_brain_ring;
  import brain_pkg::*;
  localparam int N     = 8;
  localparam int CPB   = 5;
  localparam int FRAME = 40 * CPB;
  localparam int SLOT  = 8000;

  logic clk = 1'b0, rst_n, slot_start;
  logic [N-1:0] send_req, node_halt, node_err, cut_cw_d, cut_cw_s, cut_ccw_d, cut_ccw_s;
  logic [N-1:0][3:0]  send_dst;
  logic [N-1:0][15:0] send_data;
  logic [N-1:0] rx_valid, rx_flag;
  logic [N-1:0][15:0] rx_data;
  logic [N-1:0][1:0] ev_valid, ev_match;
  mode_e [N-1:0][1:0] ev_mode;
  logic [N-1:0][1:0][1:0] ev_copies;
  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_primary = 0, n_check_match = 0, n_check_mismatch = 0, n_lone = 0, n_receive = 0;
  int n_halt = 0, n_err = 0, n_cut = 0, n_ok = 0, n_fail = 0;

  // results at the nodes
  int rx_count [N];
  logic [15:0] rx_last_data [N];
  logic rx_last_flag [N];
  int rx_time [N];

  brain_ring dut (
    .clk, .rst_n, .slot_start, .send_req, .send_dst, .send_data,
    .node_halt, .node_err, .cut_cw_d, .cut_cw_s, .cut_ccw_d, .cut_ccw_s,
    .rx_valid, .rx_data, .rx_flag, .ev_valid, .ev_mode, .ev_copies, .ev_match
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (rx_valid[i]) begin
        rx_count[i]++;
        rx_last_data[i] = rx_data[i];
        rx_last_flag[i] = rx_flag[i];
        rx_time[i] = cyc;
      end
      for (int d = 0; d < 2; d++) if (ev_valid[i][d]) begin
        case (ev_mode[i][d])
          MODE_PRIMARY: n_primary++;
          MODE_RECEIVE: n_receive++;
          default: ;
        endcase
        if (ev_mode[i][d] == MODE_CHECK && ev_copies[i][d] == 2'b11) begin
          if (ev_match[i][d]) n_check_match++; else n_check_mismatch++;
        end
        if (ev_mode[i][d] != MODE_PRIMARY && ev_copies[i][d] != 2'b11) n_lone++;
      end
    end
  end

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] mask(input int a, input int b = 0, input int c = 0,
                                        input int d = 0);
    mask = '0;
    if (a != 0) mask[a-1] = 1'b1;
    if (b != 0) mask[b-1] = 1'b1;
    if (c != 0) mask[c-1] = 1'b1;
    if (d != 0) mask[d-1] = 1'b1;
  endfunction

  // one transfer: src sends data to dst, then an empty slot; returns the
  // destination's result
  task automatic transfer(input int src, input int dst, input logic [15:0] data,
                          output int cnt, output logic [15:0] got, output logic flag,
                          output int latency, output int others);
    int t0;
    for (int i = 0; i < N; i++) rx_count[i] = 0;
    @(negedge clk);
    send_req = '0; send_req[src-1] = 1'b1;
    send_dst[src-1] = 4'(dst); send_data[src-1] = data;
    slot_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    slot_start = 1'b0; send_req = '0;
    repeat (SLOT) @(negedge clk);
    latency = rx_time[dst-1] - t0;
    slot_start = 1'b1;
    @(negedge clk);
    slot_start = 1'b0;
    repeat (10) @(negedge clk);
    cnt = rx_count[dst-1];
    got = rx_last_data[dst-1];
    flag = rx_last_flag[dst-1];
    others = 0;
    for (int i = 0; i < N; i++) if (i != dst - 1) others += rx_count[i];
  endtask

  task automatic scenario(input string name, input logic [N-1:0] halt,
                          input logic [N-1:0] err, input logic [N-1:0] cut,
                          input bit expect_ok, input int src = 1, input int dst = 5);
    int cnt, lat, others;
    logic [15:0] got;
    logic flag;
    bit ok;
    node_halt = halt; node_err = err; cut_cw_d = cut; cut_ccw_s = cut;
    if (halt != 0) n_halt++;
    if (err != 0)  n_err++;
    if (cut != 0)  n_cut++;
    repeat (5) @(negedge clk);
    transfer(src, dst, 16'h00ff, cnt, got, flag, lat, others);
    ok = (cnt == 1) && flag && (got == 16'h00ff);
    if (ok) n_ok++; else n_fail++;
    $display("%-28s rx=%0d data=%h flag=%b -> %s (expected %s)", name, cnt, got, flag,
             ok ? "T" : "F", expect_ok ? "T" : "F");
    check(ok == expect_ok, {name, " outcome"});
    check(others == 0, {name, " no other node receives"});
    check(cnt <= 1, {name, " one result"});
    if (!expect_ok && err != 0) check(cnt == 1 && !flag, {name, " error flagged"});
    node_halt = '0; node_err = '0; cut_cw_d = '0; cut_ccw_s = '0;
  endtask

  initial begin
    int cnt, lat, others;
    logic [15:0] got;
    logic flag;
    rst_n = 1'b0; slot_start = 1'b0; send_req = '0; send_dst = '0; send_data = '0;
    node_halt = '0; node_err = '0; cut_cw_d = '0; cut_cw_s = '0; cut_ccw_d = '0; cut_ccw_s = '0;
    for (int i = 0; i < N; i++) begin
      rx_count[i] = 0; rx_last_data[i] = '0; rx_last_flag[i] = 1'b0; rx_time[i] = 0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // fault-free, with latency: four hops each way, the last checking node
    // waits for its direct copy, about 4 frames plus a few clocks per hop
    transfer(1, 5, 16'h00ff, cnt, got, flag, lat, others);
    $display("fault-free: rx=%0d data=%h flag=%b latency=%0d clocks", cnt, got, flag, lat);
    check(cnt == 1 && got == 16'h00ff && flag, "fault-free transfer");
    check(others == 0, "fault-free: only node 5 receives");
    check(lat >= 4 * FRAME && lat <= 4 * FRAME + 80, $sformatf("fault-free latency %0d", lat));
    transfer(3, 8, 16'h00ff, cnt, got, flag, lat, others);
    check(cnt == 1 && got == 16'h00ff && flag, "node 3 to node 8");

    // published fault-injection table: halted nodes
    scenario("halt 2",        mask(2), '0, '0, 1);
    scenario("halt 3",        mask(3), '0, '0, 1);
    scenario("halt 4",        mask(4), '0, '0, 1);
    scenario("halt 6",        mask(6), '0, '0, 1);
    scenario("halt 7",        mask(7), '0, '0, 1);
    scenario("halt 8",        mask(8), '0, '0, 1);
    scenario("halt 2/8",      mask(2, 8), '0, '0, 1);
    scenario("halt 2/7",      mask(2, 7), '0, '0, 1);
    scenario("halt 2/6",      mask(2, 6), '0, '0, 1);
    scenario("halt 3/7",      mask(3, 7), '0, '0, 1);
    scenario("halt 3/6",      mask(3, 6), '0, '0, 1);
    scenario("halt 4/6",      mask(4, 6), '0, '0, 1);
    scenario("halt 2/6/7",    mask(2, 6, 7), '0, '0, 0);
    scenario("halt 2/6/8",    mask(2, 6, 8), '0, '0, 1);
    scenario("halt 2/7/8",    mask(2, 7, 8), '0, '0, 0);
    scenario("halt 3/6/7",    mask(3, 6, 7), '0, '0, 0);
    scenario("halt 3/6/8",    mask(3, 6, 8), '0, '0, 1);
    scenario("halt 3/7/8",    mask(3, 7, 8), '0, '0, 0);
    scenario("halt 2/3/6/7",  mask(2, 3, 6, 7), '0, '0, 0);
    scenario("halt 2/3/6/8",  mask(2, 3, 6, 8), '0, '0, 0);
    scenario("halt 2/3/7/8",  mask(2, 3, 7, 8), '0, '0, 0);
    scenario("halt 2/4/6/7",  mask(2, 4, 6, 7), '0, '0, 0);
    scenario("halt 2/4/6/8",  mask(2, 4, 6, 8), '0, '0, 1);
    scenario("halt 3/4/6/7",  mask(3, 4, 6, 7), '0, '0, 0);

    // erroneous data from a relaying node is detected, not passed as valid
    scenario("error 2",       '0, mask(2), '0, 0);
    scenario("error 6",       '0, mask(6), '0, 0);
    scenario("error 4",       '0, mask(4), '0, 0);

    // link interruptions: links leaving node 1 (cw direct to 2, ccw skip to 7)
    // and leaving node 3 (cw direct to 4, ccw skip to 1)
    scenario("cut links at 1",  '0, '0, mask(1), 1);
    scenario("cut links at 3",  '0, '0, mask(3), 1);
    scenario("cut links at 1/3/7", '0, '0, mask(1, 3, 7), 1);

    $display("mechanisms: primary=%0d check_match=%0d check_mismatch=%0d lone_copy=%0d receive=%0d halt=%0d err=%0d cut=%0d ok=%0d fail=%0d",
             n_primary, n_check_match, n_check_mismatch, n_lone, n_receive,
             n_halt, n_err, n_cut, n_ok, n_fail);
    check(n_primary > 0, "primary relaying happened");
    check(n_check_match > 0, "checking with agreeing copies happened");
    check(n_check_mismatch > 0, "checking with differing copies happened");
    check(n_lone > 0, "lone-copy relaying happened");
    check(n_receive > 0, "receiving happened");
    check(n_halt > 0 && n_err > 0 && n_cut > 0, "all fault kinds injected");
    check(n_ok > 0 && n_fail > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
