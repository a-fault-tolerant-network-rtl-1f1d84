// rx_combine: final data selection at the receiving node.
//
// The receiving node gets one checked result from each ring direction (from its
// two relay_channels). When both have arrived their data words are compared
// (data_check) and the node outputs the final word with an integrity flag that is
// 1 only if both directions delivered, both carry a set integrity flag and the two
// words agree. The final word is that of a direction whose flag is set, the
// clockwise one when both or neither are. If a slot ends (slot_start) with only
// one direction delivered, that word is output with the flag cleared.
//
// Interface: slot_start, a_valid/a_frame and b_valid/b_frame (the two directions,
// one cycle each), out_valid (one cycle) with out_data and out_flag.
// Timing: out_valid is set on the third clock edge after the second direction's
// valid is presented (capture, compare, output), or on the slot_start edge for a
// lone direction.
// Collecting all copies and keeping the consistent one with the highest integrity
// follows the published design. Requiring both directions for a set flag is this
// design's reading of the published fault-injection results, in which every
// fault set that leaves the receiver reachable from one side only fails.
module rx_combine
  import brain_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_start,
  input  logic              a_valid,
  input  frame_t            a_frame,
  input  logic              b_valid,
  input  frame_t            b_frame,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_flag
);

  logic   av, bv, done, cmp;
  frame_t aq, bq;
  logic   aeqb;

  data_check #(.WIDTH(DATA_W)) u_check (
    .clk, .rst_n, .a(aq.data), .b(bq.data), .aeqb
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      av <= 1'b0; bv <= 1'b0; done <= 1'b0; cmp <= 1'b0;
      aq <= '0;   bq <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_flag  <= 1'b0;
    end else if (slot_start) begin
      // a lone direction is reported, flagged invalid
      out_valid <= !done && (av ^ bv);
      out_data  <= av ? aq.data : bq.data;
      out_flag  <= 1'b0;
      av <= 1'b0; bv <= 1'b0; done <= 1'b0; cmp <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (a_valid && !av) begin av <= 1'b1; aq <= a_frame; end
      if (b_valid && !bv) begin bv <= 1'b1; bq <= b_frame; end
      if (av && bv && !done) begin
        cmp <= 1'b1;          // aeqb is valid one clock after both are held
        if (cmp) begin
          done      <= 1'b1;
          out_valid <= 1'b1;
          out_flag  <= aq.flag && bq.flag && aeqb;
          out_data  <= (aq.flag || !bq.flag) ? aq.data : bq.data;
        end
      end
    end
  end

endmodule
