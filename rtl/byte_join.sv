// byte_join: bit-width conversion from 8-bit to 16-bit parallel data.
//
// A two-state machine. In state 0 a valid byte is stored in the first-byte
// register and the machine moves to state 1. In state 1 the next valid byte is
// concatenated below the stored one, {first, second}, presented as a 16-bit word
// with a one-cycle out_valid, and the machine returns to state 0. Bytes are taken
// only in cycles where in_valid is high, so a byte that stays on the input is
// not sampled twice and the two bytes need not arrive in consecutive cycles.
//
// Interface: in_valid/in_data (8 bits), out_valid/out_data (16 bits), clear
// (synchronous, returns to state 0 and drops a stored first byte).
// Timing: out_valid one clock after the second byte's in_valid.
// The two states, the first-byte register and the flag-qualified sampling follow
// the published design; clear is this design's addition, used to realign at
// frame boundaries.
module byte_join (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        out_valid,
  output logic [15:0] out_data
);

  typedef enum logic {S_FIRST = 1'b0, S_SECOND = 1'b1} state_e;

  state_e     state;
  logic [7:0] firstbyte;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_FIRST;
      firstbyte <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        state <= S_FIRST;
      end else if (in_valid) begin
        unique case (state)
          S_FIRST: begin
            firstbyte <= in_data;
            state     <= S_SECOND;
          end
          S_SECOND: begin
            out_data  <= {firstbyte, in_data};
            out_valid <= 1'b1;
            state     <= S_FIRST;
          end
        endcase
      end
    end
  end

endmodule
