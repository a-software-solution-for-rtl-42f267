// sort_pkg: constants and types shared by the serial sorter and its UART test system.
//
// Every 8-bit word on the serial link carries a one-bit tag in its MSB: 0 marks a
// data packet with 7 payload bits, 1 marks a command (host to system) or a message
// (system to host) with a 7-bit code. The tag follows the original description; the code values
// below and the packet order (most significant payload first) are this design's own.
package sort_pkg;

  // Payload bits per serial word: one of the eight bits is the data/command tag.
  localparam int unsigned PAYLOAD_W = 7;

  // Number of 7-bit packets needed to carry a W-bit data word.
  function automatic int unsigned packets_for(int unsigned w);
    return (w + PAYLOAD_W - 1) / PAYLOAD_W;
  endfunction

  // Host to system commands (7-bit code in a word with MSB = 1).
  localparam logic [6:0] CMD_CONNECT = 7'h01;  // connection request, answered by MSG_ACK
  localparam logic [6:0] CMD_CLEAR   = 7'h02;  // clear the sorter and the input assembly
  localparam logic [6:0] CMD_HALT    = 7'h03;  // stop feeding the sorter and sending results
  localparam logic [6:0] CMD_RUN     = 7'h04;  // resume after CMD_HALT
  localparam logic [6:0] CMD_MODE    = 7'h10;  // 7'b001_00mm: select result, mm = out_mode_e
  localparam logic [6:0] CMD_POS     = 7'h40;  // 7'b1pp_pppp: set the chosen position

  // System to host messages (7-bit code in a word with MSB = 1).
  localparam logic [6:0] MSG_ACK      = 7'h01;  // answer to CMD_CONNECT
  localparam logic [6:0] MSG_OVERFLOW = 7'h02;  // warning: an input word was lost
  localparam logic [6:0] MSG_BAD_CMD  = 7'h03;  // error: unknown command code
  localparam logic [6:0] MSG_FRAME    = 7'h04;  // error: a serial word had a bad stop bit

  // Which value of the sorted array is returned after each data word.
  typedef enum logic [1:0] {
    OUT_MIN    = 2'd0,
    OUT_MAX    = 2'd1,
    OUT_MEDIAN = 2'd2,
    OUT_POS    = 2'd3
  } out_mode_e;

endpackage
