// sort_test_system: the serial sorter inside its UART test system, ready for an FPGA.
//
// A host PC sends 8-bit serial words: data packets (MSB = 0) and commands (MSB = 1).
// uart_rx splits them; input_adapter assembles the data packets into W-bit items;
// control_module feeds each item to serial_sorter, which keeps the last N items sorted.
// After each item one value of the sorted array (minimum, maximum, median or a chosen
// position, picked by command) goes through result_adapter and uart_tx back to the
// host, split into data packets in the same way. cmd_module decodes the commands and
// control_module stalls, halts and reports overflows and errors as messages. This
// arrangement follows the original description; the command set and message codes are this
// design's own (see sort_pkg).
//
// Ports: clk, rst (synchronous, active high), rxd/txd (8N1, CLKS_PER_BIT clocks per bit;
// the default suits a 50 MHz clock at 115200 baud), warn and err status flags, and
// the full sorted array for observation.
module sort_test_system
  import sort_pkg::*;
#(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter bit          ASCENDING = 1'b1,
  parameter int unsigned CLKS_PER_BIT = 434,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                rxd,
  output logic                txd,
  output logic                warn,
  output logic                err,
  output logic                halted,
  output logic [N-1:0][W-1:0] sorted
);

  logic            data_valid, cmd_valid, frame_err;
  logic [6:0]      payload;
  logic            connect, clear, halt, bad_cmd;
  out_mode_e       mode;
  logic [PW-1:0]   pos;
  logic            word_valid, word_ready, overflow;
  logic [W-1:0]    word;
  logic            sort_en, res_valid;
  logic [W-1:0]    min_v, max_v, med_v, pos_v, result;
  logic            res_in_ready, res_out_valid, res_out_ready;
  logic [7:0]      res_out_byte;
  logic            tx_valid, tx_ready;
  logic [7:0]      tx_byte;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd, .data_valid, .cmd_valid, .payload, .frame_err
  );

  cmd_module #(.N(N)) u_cmd (
    .clk, .rst, .cmd_valid, .cmd(payload), .connect, .clear, .halt, .mode, .pos, .bad_cmd
  );

  input_adapter #(.W(W)) u_in (
    .clk, .rst, .clear, .pkt_valid(data_valid), .pkt(payload),
    .word_valid, .word_ready, .word, .overflow
  );

  serial_sorter #(.N(N), .W(W), .ASCENDING(ASCENDING)) u_sorter (
    .clk, .rst, .clear,
    .in_valid (sort_en),
    .in_data  (word),
    .pos,
    .sorted,
    .min_o    (min_v),
    .max_o    (max_v),
    .median_o (med_v),
    .pos_o    (pos_v),
    .res_valid
  );

  always_comb begin
    unique case (mode)
      OUT_MIN:    result = min_v;
      OUT_MAX:    result = max_v;
      OUT_MEDIAN: result = med_v;
      default:    result = pos_v;
    endcase
  end

  result_adapter #(.W(W)) u_res (
    .clk, .rst,
    .in_valid  (res_valid),
    .in_ready  (res_in_ready),
    .in_word   (result),
    .out_valid (res_out_valid),
    .out_ready (res_out_ready),
    .out_byte  (res_out_byte)
  );

  control_module u_ctl (
    .clk, .rst, .clear, .halt,
    .word_valid, .word_ready, .overflow,
    .sort_en, .res_in_ready, .res_out_valid, .res_out_ready, .res_out_byte,
    .connect, .bad_cmd, .frame_err,
    .tx_valid, .tx_ready, .tx_byte,
    .warn, .err
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .in_valid(tx_valid), .in_ready(tx_ready), .in_byte(tx_byte), .txd
  );

  assign halted = halt;

endmodule
