// uart_rx: receiving UART of the sorter test system.
//
// Receives 8-bit words on rxd in the common 8N1 frame (start bit 0, eight data bits
// LSB first, stop bit 1) and splits each word by its MSB into a data packet (MSB = 0)
// or a command (MSB = 1); the remaining 7 bits are the payload. The MSB tag follows
// the original description; its polarity, the frame format, the bit timing and the
// two-flop input synchronizer are this design's choices. Each bit is sampled in its middle, CLKS_PER_BIT clocks apart.
//
// Interface: data_valid or cmd_valid pulses for one clock, with payload, shortly after
// the middle of the stop bit. A word whose stop bit is 0 is dropped and frame_err
// pulses instead; the receiver then waits for the line to return high before it
// looks for the next start bit.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434   // 50 MHz clock, 115200 baud
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       data_valid,
  output logic       cmd_valid,
  output logic [6:0] payload,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_STOP, S_WAIT_HIGH} state_e;

  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync       <= 2'b11;
      state      <= S_IDLE;
      cnt        <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      payload    <= '0;
      data_valid <= 1'b0;
      cmd_valid  <= 1'b0;
      frame_err  <= 1'b0;
    end else begin
      sync       <= {sync[0], rxd};
      data_valid <= 1'b0;
      cmd_valid  <= 1'b0;
      frame_err  <= 1'b0;
      case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx) state <= S_START;
        end
        S_START: begin                      // wait to the middle of the start bit
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx ? S_IDLE : S_BITS; // a glitch, not a start bit
          end else cnt <= cnt + 1'b1;
        end
        S_BITS: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= rx ? S_IDLE : S_WAIT_HIGH;
            if (rx) begin
              payload    <= shreg[6:0];
              data_valid <= !shreg[7];
              cmd_valid  <= shreg[7];
            end else begin
              frame_err  <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_WAIT_HIGH: begin                  // line held low: wait until it idles again
          if (rx) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
