// cmd_module: command module of the sorter test system.
//
// Interprets the command packets (serial words with MSB = 1) that the host sends to
// set up the system and to steer the communication. The original description leaves the command
// set open; this design uses (7-bit codes, see sort_pkg):
//   CMD_CONNECT  connection request        -> connect pulse (answered with MSG_ACK)
//   CMD_CLEAR    restart with an empty window -> clear pulse
//   CMD_HALT     stop feeding the sorter and sending results -> halt = 1
//   CMD_RUN      resume                    -> halt = 0
//   CMD_MODE|m   result returned per data word: min, max, median or chosen position
//   CMD_POS|p    chosen position p (6 bits, so arrays up to 64 long)
// Any other code pulses bad_cmd.
//
// Interface: cmd_valid/cmd from uart_rx. Pulses appear, and settings change, one clock
// after the command. After reset: running, result = minimum, position 0.
module cmd_module
  import sort_pkg::*;
#(
  parameter int unsigned N = 25,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cmd_valid,
  input  logic [6:0]      cmd,
  output logic            connect,
  output logic            clear,
  output logic            halt,
  output out_mode_e       mode,
  output logic [PW-1:0]   pos,
  output logic            bad_cmd
);

  always_ff @(posedge clk) begin
    if (rst) begin
      connect <= 1'b0;
      clear   <= 1'b0;
      bad_cmd <= 1'b0;
      halt    <= 1'b0;
      mode    <= OUT_MIN;
      pos     <= '0;
    end else begin
      connect <= 1'b0;
      clear   <= 1'b0;
      bad_cmd <= 1'b0;
      if (cmd_valid) begin
        if (cmd[6] == CMD_POS[6]) begin
          pos <= PW'(cmd[5:0]);
        end else if (cmd[6:2] == CMD_MODE[6:2]) begin
          mode <= out_mode_e'(cmd[1:0]);
        end else begin
          case (cmd)
            CMD_CONNECT: connect <= 1'b1;
            CMD_CLEAR:   clear   <= 1'b1;
            CMD_HALT:    halt    <= 1'b1;
            CMD_RUN:     halt    <= 1'b0;
            default:     bad_cmd <= 1'b1;
          endcase
        end
      end
    end
  end

endmodule
