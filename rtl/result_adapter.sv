// result_adapter: module for adapting the results in the sorter test system.
//
// Takes one W-bit result and sends it as NPK = ceil(W/7) serial words, each a data
// packet (MSB = 0) with 7 payload bits, most significant payload first (the same
// packing as input_adapter; the order is this design's choice).
//
// Interface: in_valid/in_ready take a result when the adapter is empty (one-entry
// buffer). out_valid/out_ready hand the words on one per handshake; in_ready rises
// again in the clock after the last word is taken.
module result_adapter
  import sort_pkg::*;
#(
  parameter int unsigned W = 8,
  localparam int unsigned NPK = packets_for(W),
  localparam int unsigned AW  = NPK * PAYLOAD_W,
  localparam int unsigned CW  = $clog2(NPK + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_word,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [7:0]    out_byte
);

  logic [AW-1:0] shreg;
  logic [CW-1:0] left;     // packets still to send

  assign in_ready  = (left == '0);
  assign out_valid = (left != '0);
  assign out_byte  = {1'b0, shreg[AW-1 -: PAYLOAD_W]};

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '0;
      left  <= '0;
    end else if (in_valid && in_ready) begin
      shreg <= AW'(in_word);
      left  <= CW'(NPK);
    end else if (out_valid && out_ready) begin
      shreg <= shreg << PAYLOAD_W;
      left  <= left - 1'b1;
    end
  end

endmodule
