// input_adapter: module for adapting input data in the sorter test system.
//
// Each serial word carries 7 payload bits, so a W-bit data word arrives as
// NPK = ceil(W/7) data packets (W = 24 needs 4, as in the original description). This module
// collects NPK packets, most significant payload first (this design's choice), and
// presents the assembled word to the sorter. The leading packet's unused upper bits
// are ignored.
//
// Interface: pkt_valid/pkt deliver one packet. The assembled word waits in a holding
// register, word_valid high, until word_ready (set by the control module) takes it,
// while the next word is already being collected. If a word is completed while the
// holding register is still full, the new word is dropped and overflow pulses for one
// clock. clear (synchronous) empties both the collection and the holding register.
module input_adapter
  import sort_pkg::*;
#(
  parameter int unsigned W = 8,
  localparam int unsigned NPK = packets_for(W),
  localparam int unsigned AW  = NPK * PAYLOAD_W,
  localparam int unsigned CW  = (NPK > 1) ? $clog2(NPK) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          pkt_valid,
  input  logic [6:0]    pkt,
  output logic          word_valid,
  input  logic          word_ready,
  output logic [W-1:0]  word,
  output logic          overflow
);

  logic [AW-1:0] acc;
  logic [AW-1:0] acc_next;
  logic [CW-1:0] cnt;
  logic          done;

  always_comb begin
    acc_next = (acc << PAYLOAD_W) | AW'(pkt);
    done = pkt_valid && (cnt == CW'(NPK - 1));
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc        <= '0;
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
      overflow   <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (word_valid && word_ready) word_valid <= 1'b0;
      if (pkt_valid) begin
        acc <= acc_next;
        cnt <= done ? '0 : cnt + 1'b1;
      end
      if (done) begin
        if (!word_valid || word_ready) begin
          word       <= acc_next[W-1:0];
          word_valid <= 1'b1;
        end else begin
          overflow   <= 1'b1;
        end
      end
    end
  end

endmodule
