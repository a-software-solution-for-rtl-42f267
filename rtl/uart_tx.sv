// uart_tx: delivery UART of the sorter test system.
//
// Sends one 8-bit word at a time on txd in the 8N1 frame (start bit 0, eight data bits
// LSB first, stop bit 1), each bit lasting CLKS_PER_BIT clocks. The original description names this
// module and fixes the word width at 8 bits; frame and bit timing are this design's.
//
// Interface: valid/ready handshake on in_byte; a word is taken in a clock where both
// are high. ready is high only while the line is idle, so the next word can be taken
// in the clock after the stop bit ends. txd idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_byte,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy;
  logic [9:0]    frame;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  assign in_ready = !busy;
  assign txd      = busy ? frame[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy      <= 1'b1;
        frame     <= {1'b1, in_byte, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt       <= '0;
      frame     <= {1'b1, frame[9:1]};
      bits_left <= bits_left - 1'b1;
      if (bits_left == 4'd1) busy <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
