// control_module: control module of the sorter test system.
//
// Supervises the data flow between the input adapter, the sorter, the result adapter
// and the delivery UART. The original description gives its duties: watch for conditions that
// could corrupt the data flow, stop individual modules synchronously, and send
// messages to the host. How it does so is this design's choice:
//  * Feed: a word waiting in the input adapter is handed to the sorter (sort_en) only
//    when the result adapter is empty, no result is in flight and the system is not
//    halted. Otherwise the word waits: the input side is stalled, never the sorter
//    mid-update, so every sorted result is delivered.
//  * Halt: while halt is set, nothing is fed to the sorter and result packets are held
//    back; messages still go out.
//  * Messages: a connect request queues MSG_ACK, a lost input word (overflow) queues
//    MSG_OVERFLOW, an unknown command MSG_BAD_CMD, a bad stop bit MSG_FRAME. Each kind
//    is one pending flag, so repeats of a kind not yet sent merge into one message.
//    Messages take the delivery UART ahead of result packets, between whole words.
//  * Status: warn (overflow seen) and err (bad command or frame) stay set until clear;
//    they correspond to the host's yellow and red indicators.
module control_module
  import sort_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       clear,
  input  logic       halt,
  // input adapter
  input  logic       word_valid,
  output logic       word_ready,
  input  logic       overflow,
  // sorter and result adapter
  output logic       sort_en,
  input  logic       res_in_ready,
  input  logic       res_out_valid,
  output logic       res_out_ready,
  input  logic [7:0] res_out_byte,
  // events
  input  logic       connect,
  input  logic       bad_cmd,
  input  logic       frame_err,
  // delivery UART
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic [7:0] tx_byte,
  // status
  output logic       warn,
  output logic       err
);

  logic in_flight;
  logic ack_p, ovf_p, bad_p, frm_p;
  logic msg_any;
  logic [6:0] msg_code;

  assign sort_en    = word_valid && res_in_ready && !in_flight && !halt && !clear;
  assign word_ready = sort_en;

  always_comb begin
    msg_any  = ack_p || bad_p || frm_p || ovf_p;
    if      (ack_p) msg_code = MSG_ACK;
    else if (bad_p) msg_code = MSG_BAD_CMD;
    else if (frm_p) msg_code = MSG_FRAME;
    else            msg_code = MSG_OVERFLOW;
    tx_valid      = msg_any || (res_out_valid && !halt);
    tx_byte       = msg_any ? {1'b1, msg_code} : res_out_byte;
    res_out_ready = tx_ready && !msg_any && !halt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_flight <= 1'b0;
      {ack_p, ovf_p, bad_p, frm_p} <= '0;
      warn <= 1'b0;
      err  <= 1'b0;
    end else begin
      in_flight <= sort_en;
      // a message leaves when the UART takes it; the highest-priority one goes first
      if (msg_any && tx_ready) begin
        if      (ack_p) ack_p <= 1'b0;
        else if (bad_p) bad_p <= 1'b0;
        else if (frm_p) frm_p <= 1'b0;
        else            ovf_p <= 1'b0;
      end
      if (connect)   ack_p <= 1'b1;
      if (bad_cmd)   bad_p <= 1'b1;
      if (frame_err) frm_p <= 1'b1;
      if (overflow)  ovf_p <= 1'b1;
      if (clear) begin
        warn <= 1'b0;
        err  <= 1'b0;
      end else begin
        if (overflow)             warn <= 1'b1;
        if (bad_cmd || frame_err) err  <= 1'b1;
      end
    end
  end

  // The sorter result of a fed word arrives one clock later; the result adapter must
  // still be empty then.
  a_flight_room: assert property (@(posedge clk) disable iff (rst)
    sort_en |=> res_in_ready);

endmodule
