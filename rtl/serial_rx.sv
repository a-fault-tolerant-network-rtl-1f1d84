// serial_rx: serial-to-parallel conversion for one ring link.
//
// The line idles at 1. Each character is 10 bit times: a start bit (0), eight
// data bits, first-sent bit first, and a stop bit (1). The falling edge of the
// start bit starts the bit (baud) timing: a counter of CLKS_PER_BIT system clocks
// per bit, aligned so that every bit is sampled in its middle. Sampled bits are
// shifted into the register one by one; at the end of the 10-bit conversion
// period the eight data bits are presented in parallel with a one-cycle valid.
// Two orderings are given: data_msb takes the first data bit as bit 7 (the
// ordering the ring links use), data_lsb takes it as bit 0.
//
// Interface: rxd (serial in, asynchronous, synchronised here by two flip-flops),
// valid (1 cycle, with data_msb/data_lsb), frame_err (1 cycle, stop bit was 0 and
// the character is dropped). Timing: valid rises about 9.5 bit times plus 3
// clocks after the start edge; at the default 5 clocks per bit and a 50 MHz clock
// a bit lasts 100 ns (10 Mbit/s) and a character 1 us.
// The 10-bit conversion period, the start-bit triggered timing, the bit-serial
// shift and the two parallel outputs follow the published design; the system
// clock, mid-bit sampling, the synchroniser and the framing check are this
// design's choice.
module serial_rx #(
  parameter int unsigned CLKS_PER_BIT = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data_msb,
  output logic [7:0] data_lsb,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [CW-1:0] LAST = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] HALF = CW'((CLKS_PER_BIT - 1) / 2);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  function automatic logic [7:0] reverse8(input logic [7:0] x);
    for (int i = 0; i < 8; i++) reverse8[i] = x[7-i];
  endfunction

  state_e      state;
  logic [CW-1:0] cnt;     // clocks within the current bit
  logic [2:0]  nbit;      // data bit index
  logic [7:0]  shreg;     // first bit ends up in [7]
  logic [1:0]  sync;
  logic        rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      nbit      <= '0;
      shreg     <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
      data_msb  <= '0;
      data_lsb  <= '0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= S_START;   // start-bit edge
        end
        S_START: begin
          if (cnt == HALF) begin
            cnt  <= '0;
            nbit <= '0;
            state <= rx_s ? S_IDLE : S_DATA;  // glitch: back to idle
          end else cnt <= cnt + 1'b1;
        end
        S_DATA: begin
          if (cnt == LAST) begin
            cnt   <= '0;
            shreg <= {shreg[6:0], rx_s};
            if (nbit == 3'd7) state <= S_STOP;
            nbit  <= nbit + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == LAST) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_s) begin
              valid    <= 1'b1;
              data_msb <= shreg;
              data_lsb <= reverse8(shreg);
            end else begin
              frame_err <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

endmodule
