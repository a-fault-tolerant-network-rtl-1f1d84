// tb_relay_channel: self-checking test of one checking-and-relaying channel
// (own node ID 4, wait shortened to 50 clocks). Frames are applied directly as
// one-cycle pulses on the direct and skip inputs. Checks: primary relaying
// decided two clocks after a sender frame on the direct link; checking with
// agreeing, differing and invalid-flagged copies; a sender frame on the skip
// link waiting for the direct copy; a lone copy forwarded exactly after the
// wait; delivery instead of forwarding for the own ID; one decision per slot;
// inhibit; the forward request held until the transmitter is ready.
module tb_relay_channel;
  import brain_pkg::*;
  localparam int WAITC = 50;
  logic clk = 1'b0, rst_n, slot_start, inhibit;
  logic d_valid, s_valid, fwd_valid, fwd_ready, dlv_valid, ev_valid, ev_match;
  frame_t d_frame, s_frame, fwd_frame, dlv_frame;
  mode_e ev_mode;
  logic [1:0] ev_copies;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_fwd = 0, n_dlv = 0, t_fwd = 0, t_dlv = 0;
  frame_t last_fwd, last_dlv;

  relay_channel #(.OWN_ID(4'h4), .WAIT_CLKS(WAITC)) dut (
    .clk, .rst_n, .slot_start, .inhibit, .d_valid, .d_frame, .s_valid, .s_frame,
    .fwd_valid, .fwd_ready, .fwd_frame, .dlv_valid, .dlv_frame,
    .ev_valid, .ev_mode, .ev_copies, .ev_match
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  // transmitter model: takes a forward request when ready
  always @(posedge clk) if (rst_n) begin
    if (fwd_valid && fwd_ready) begin n_fwd++; last_fwd = fwd_frame; t_fwd = cyc; end
    if (dlv_valid) begin n_dlv++; last_dlv = dlv_frame; t_dlv = cyc; end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic new_slot(input logic inh = 1'b0);
    @(negedge clk); slot_start = 1'b1; inhibit = inh;
    @(negedge clk); slot_start = 1'b0; inhibit = 1'b0;
    n_fwd = 0; n_dlv = 0;
  endtask

  task automatic pulse(input bit on_d, input frame_t f, output int t);
    @(negedge clk);
    if (on_d) begin d_valid = 1'b1; d_frame = f; end
    else      begin s_valid = 1'b1; s_frame = f; end
    t = cyc;  // edge at which it is taken is the next one, cyc+1
    @(negedge clk);
    d_valid = 1'b0; s_valid = 1'b0;
  endtask

  initial begin
    int t;
    rst_n = 1'b0; slot_start = 1'b0; inhibit = 1'b0; d_valid = 1'b0; s_valid = 1'b0;
    d_frame = '0; s_frame = '0; fwd_ready = 1'b1;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // primary relaying: relaying number 1 on the direct link
    new_slot();
    pulse(1, mk(4'h5, 4'h1, 16'h00ff, 1'b1), t);
    repeat (10) @(negedge clk);
    check(n_fwd == 1 && last_fwd == mk(4'h5, 4'h2, 16'h00ff, 1'b1), "primary relay");
    check(t_fwd - (t + 1) <= 4, $sformatf("primary decided promptly (%0d)", t_fwd - t - 1));

    // checking, agreeing copies (skip first, sender's copy: waits for direct)
    new_slot();
    pulse(0, mk(4'h5, 4'h1, 16'h1234, 1'b1), t);
    repeat (20) @(negedge clk);
    check(n_fwd == 0, "sender copy on skip link waits for the direct copy");
    pulse(1, mk(4'h5, 4'h2, 16'h1234, 1'b1), t);
    repeat (10) @(negedge clk);
    check(n_fwd == 1 && last_fwd == mk(4'h5, 4'h3, 16'h1234, 1'b1), "check agree");

    // checking, differing copies
    new_slot();
    pulse(1, mk(4'h5, 4'h3, 16'h4321, 1'b1), t);
    pulse(0, mk(4'h5, 4'h2, 16'h1234, 1'b1), t);
    repeat (10) @(negedge clk);
    check(n_fwd == 1 && last_fwd == mk(4'h5, 4'h4, 16'h4321, 1'b0), "check differ");

    // checking, skip copy flagged invalid
    new_slot();
    pulse(1, mk(4'h5, 4'h3, 16'h7777, 1'b1), t);
    pulse(0, mk(4'h5, 4'h2, 16'h7777, 1'b0), t);
    repeat (10) @(negedge clk);
    check(n_fwd == 1 && last_fwd.flag == 1'b0, "check invalid skip flag");

    // lone copy, forwarded after the wait
    new_slot();
    pulse(0, mk(4'h5, 4'h3, 16'habcd, 1'b1), t);
    repeat (WAITC - 5) @(negedge clk);
    check(n_fwd == 0, "lone copy not before the wait");
    repeat (20) @(negedge clk);
    check(n_fwd == 1 && last_fwd == mk(4'h5, 4'h4, 16'habcd, 1'b1), "lone copy forwarded");
    check(t_fwd - (t + 1) >= WAITC && t_fwd - (t + 1) <= WAITC + 5,
          $sformatf("lone copy wait %0d", t_fwd - t - 1));

    // receiving: delivered, not forwarded; checked against the skip copy
    new_slot();
    pulse(0, mk(4'h4, 4'h2, 16'h00ff, 1'b1), t);
    pulse(1, mk(4'h4, 4'h3, 16'h00ff, 1'b1), t);
    repeat (10) @(negedge clk);
    check(n_fwd == 0 && n_dlv == 1 && last_dlv.data == 16'h00ff && last_dlv.flag, "receive");
    new_slot();
    pulse(0, mk(4'h4, 4'h2, 16'h00ff, 1'b1), t);
    pulse(1, mk(4'h4, 4'h3, 16'hff00, 1'b1), t);
    repeat (10) @(negedge clk);
    check(n_dlv == 1 && !last_dlv.flag, "receive differing copies");

    // one decision per slot
    new_slot();
    pulse(1, mk(4'h5, 4'h1, 16'h0001, 1'b1), t);
    repeat (10) @(negedge clk);
    pulse(1, mk(4'h5, 4'h1, 16'h0002, 1'b1), t);
    pulse(0, mk(4'h5, 4'h2, 16'h0002, 1'b1), t);
    repeat (WAITC + 20) @(negedge clk);
    check(n_fwd == 1 && last_fwd.data == 16'h0001, "one decision per slot");

    // inhibited slot
    new_slot(1'b1);
    pulse(1, mk(4'h5, 4'h1, 16'h0003, 1'b1), t);
    repeat (WAITC + 20) @(negedge clk);
    check(n_fwd == 0 && n_dlv == 0, "inhibit");

    // forward held until ready
    new_slot();
    fwd_ready = 1'b0;
    pulse(1, mk(4'h5, 4'h1, 16'h0004, 1'b1), t);
    repeat (30) @(negedge clk);
    check(n_fwd == 0 && fwd_valid, "forward held");
    fwd_ready = 1'b1;
    repeat (3) @(negedge clk);
    check(n_fwd == 1 && !fwd_valid && last_fwd.data == 16'h0004, "forward taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
