// tb_control_module: directed checks of feeding, stalling, halting and messages.
//
// Drives the control module's inputs directly and checks: a waiting word is fed at
// once when the result side is free; it is held while the result adapter is busy, while
// a result is in flight and while halted; halt also holds result packets back; queued
// messages go out in the order ACK, BAD_CMD, FRAME, OVERFLOW ahead of result packets;
// warn and err are set by their events and cleared by clear.
module tb_control_module;
  import sort_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, halt = 0, word_valid = 0, overflow = 0;
  logic res_in_ready = 1, res_out_valid = 0;
  logic [7:0] res_out_byte = 8'h2A;
  logic connect = 0, bad_cmd = 0, frame_err = 0, tx_ready = 0;
  logic word_ready, sort_en, res_out_ready, tx_valid, warn, err;
  logic [7:0] tx_byte;

  control_module dut (.clk, .rst, .clear, .halt, .word_valid, .word_ready, .overflow,
    .sort_en, .res_in_ready, .res_out_valid, .res_out_ready, .res_out_byte,
    .connect, .bad_cmd, .frame_err, .tx_valid, .tx_ready, .tx_byte, .warn, .err);

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk("idle", !sort_en && !tx_valid && !warn && !err);
    // feed at once
    word_valid = 1; #1;
    chk("feed", sort_en && word_ready);
    @(negedge clk);
    chk("in flight blocks", !sort_en);
    @(negedge clk);
    res_in_ready = 0;                 // result adapter now busy
    #1;
    chk("stall on busy adapter", !sort_en);
    res_in_ready = 1; #1;
    chk("resume after adapter", sort_en);
    @(negedge clk);
    word_valid = 0;
    // halt
    @(negedge clk);
    halt = 1; word_valid = 1; res_out_valid = 1; tx_ready = 1; #1;
    chk("halt holds word", !sort_en);
    chk("halt holds results", !tx_valid && !res_out_ready);
    halt = 0; word_valid = 0; #1;
    chk("result passes", tx_valid && tx_byte == 8'h2A && res_out_ready);
    // messages ahead of results, in priority order
    tx_ready = 0;
    connect = 1; bad_cmd = 1; overflow = 1; frame_err = 1;
    @(negedge clk);
    connect = 0; bad_cmd = 0; overflow = 0; frame_err = 0;
    chk("warn set", warn);
    chk("err set", err);
    chk("message first", tx_valid && tx_byte == {1'b1, MSG_ACK} && !res_out_ready);
    tx_ready = 1;
    @(negedge clk);
    chk("bad second", tx_byte == {1'b1, MSG_BAD_CMD} && !res_out_ready);
    @(negedge clk);
    chk("frame third", tx_byte == {1'b1, MSG_FRAME});
    @(negedge clk);
    chk("overflow fourth", tx_byte == {1'b1, MSG_OVERFLOW});
    @(negedge clk);
    chk("results again", tx_byte == 8'h2A && res_out_ready);
    res_out_valid = 0; tx_ready = 0;
    // clear resets the status
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk("status cleared", !warn && !err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
