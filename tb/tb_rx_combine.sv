// tb_rx_combine: self-checking test of the receiver's final data selection.
// Results of the two directions are applied as one-cycle pulses. Checks: both
// valid and equal gives flag 1 on the third clock edge after the second is
// presented; different
// words, or a direction flagged invalid, give flag 0 with the valid direction's
// word; one direction only is reported at slot_start with flag 0; no result
// at all reports nothing; a second result in the same slot is ignored.
module tb_rx_combine;
  import brain_pkg::*;
  logic clk = 1'b0, rst_n, slot_start, a_valid, b_valid, out_valid, out_flag;
  frame_t a_frame, b_frame;
  logic [15:0] out_data;
  int checks = 0, failures = 0;
  int cyc = 0, n_out = 0, t_out = 0;
  logic [15:0] got; logic gflag;

  rx_combine dut (.clk, .rst_n, .slot_start, .a_valid, .a_frame, .b_valid, .b_frame,
                  .out_valid, .out_data, .out_flag);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && out_valid) begin
    n_out++; got = out_data; gflag = out_flag; t_out = cyc;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic frame_t mk(input logic [15:0] data, input logic flag);
    mk.ident = 8'h53; mk.data = data; mk.flag = flag;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic new_slot();
    @(negedge clk); slot_start = 1'b1; n_out = 0;
    @(negedge clk); slot_start = 1'b0;
  endtask

  task automatic give(input bit which_b, input frame_t f, output int t);
    @(negedge clk);
    if (which_b) begin b_valid = 1'b1; b_frame = f; end
    else         begin a_valid = 1'b1; a_frame = f; end
    t = cyc;
    @(negedge clk);
    a_valid = 1'b0; b_valid = 1'b0;
  endtask

  initial begin
    int t;
    rst_n = 1'b0; slot_start = 1'b0; a_valid = 1'b0; b_valid = 1'b0;
    a_frame = '0; b_frame = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    new_slot();
    give(0, mk(16'h00ff, 1'b1), t);
    repeat (5) @(negedge clk);
    check(n_out == 0, "waits for the second direction");
    give(1, mk(16'h00ff, 1'b1), t);
    repeat (5) @(negedge clk);
    check(n_out == 1 && got == 16'h00ff && gflag, "both agree");
    check(t_out - t == 3, $sformatf("latency %0d", t_out - t));
    give(1, mk(16'h1111, 1'b1), t);
    repeat (5) @(negedge clk);
    check(n_out == 1, "second result ignored");

    new_slot();
    give(0, mk(16'h00ff, 1'b1), t);
    give(1, mk(16'hff00, 1'b1), t);
    repeat (5) @(negedge clk);
    check(n_out == 1 && !gflag, "directions disagree");

    new_slot();
    give(0, mk(16'hff00, 1'b0), t);
    give(1, mk(16'h00ff, 1'b1), t);
    repeat (5) @(negedge clk);
    check(n_out == 1 && !gflag && got == 16'h00ff, "invalid direction, valid word chosen");

    new_slot();
    give(1, mk(16'h2222, 1'b1), t);
    repeat (20) @(negedge clk);
    check(n_out == 0, "lone direction not reported before slot end");
    new_slot();
    repeat (3) @(negedge clk);
    check(n_out == 1 && got == 16'h2222 && !gflag, "lone direction at slot end");

    new_slot();
    repeat (20) @(negedge clk);
    new_slot();
    repeat (3) @(negedge clk);
    check(n_out == 0, "nothing received, nothing reported");

    for (int i = 0; i < 200; i++) begin
      logic [15:0] x, y; logic fa, fb; bit odd;
      odd = (i % 2 != 0);
      x = 16'($urandom); y = ($urandom % 2 != 0) ? x : 16'($urandom);
      fa = 1'($urandom); fb = 1'($urandom);
      new_slot();
      give(odd, mk(x, fa), t);
      give(!odd, mk(y, fb), t);
      repeat (4) @(negedge clk);
      // a is the clockwise result, b the other one
      begin
        logic [15:0] av, bv; logic af, bf;
        av = odd ? y : x; af = odd ? fb : fa;
        bv = odd ? x : y; bf = odd ? fa : fb;
        check(n_out == 1 && gflag == (af && bf && av == bv) &&
              got == ((af || !bf) ? av : bv), $sformatf("random %0d", i));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
