// word_split: bit-width conversion from 16-bit to 8-bit parallel data.
//
// A valid 16-bit word is latched and its high byte is output; the machine moves
// to state 1, outputs the low byte in the next cycle and returns to state 0. A
// word that arrives while a split is in progress is kept in a one-word holding
// register and split next, so back-to-back words come out as an unbroken byte
// stream and a word being split is never overwritten.
//
// Interface: in_valid/in_data (16 bits) with in_ready (low only when the
// holding register is full during state 1), out_valid/out_data (8 bits).
// Timing: the high byte appears one clock after in_valid, the low byte one clock
// later; one word every two clocks is sustained.
// The latch-then-split behaviour, high byte first, and the two states follow
// the published design; the holding register depth of one and in_ready are this
// design's choice.
module word_split (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [7:0]  out_data
);

  typedef enum logic {S_HIGH = 1'b0, S_LOW = 1'b1} state_e;

  state_e      state;
  logic [7:0]  low;     // low byte of the word being split
  logic [15:0] pend;    // holding register
  logic        pend_v;

  assign in_ready = !(pend_v && state == S_LOW);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_HIGH;
      low       <= '0;
      pend      <= '0;
      pend_v    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      unique case (state)
        S_HIGH: begin
          if (pend_v) begin
            low       <= pend[7:0];
            out_data  <= pend[15:8];
            out_valid <= 1'b1;
            state     <= S_LOW;
            pend_v    <= in_valid;
            if (in_valid) pend <= in_data;
          end else if (in_valid) begin
            low       <= in_data[7:0];
            out_data  <= in_data[15:8];
            out_valid <= 1'b1;
            state     <= S_LOW;
          end else begin
            out_valid <= 1'b0;
          end
        end
        S_LOW: begin
          out_data  <= low;
          out_valid <= 1'b1;
          state     <= S_HIGH;
          if (in_valid && in_ready) begin
            pend   <= in_data;
            pend_v <= 1'b1;
          end
        end
      endcase
    end
  end

endmodule
