// uart_host: behavioural model of the host PC's serial port, for testbenches only.
//
// send_byte() drives one 8N1 word on rxd (to the system), send_bad_frame() one with a
// 0 stop bit. A receiver samples txd (from the system) in the middle of each bit and
// sorts the words it gets by their MSB into a queue of data packets and a queue of
// messages. The receiver uses CLKS_PER_BIT clocks per bit, the system's bit time; the
// sender uses TX_CLKS_PER_BIT, which may be a little shorter to model a host whose
// baud clock runs fast (a few percent is within what the system's receiver tolerates).
module uart_host #(
  parameter int unsigned CLKS_PER_BIT    = 16,
  parameter int unsigned TX_CLKS_PER_BIT = CLKS_PER_BIT
) (
  input  logic clk,
  output logic rxd,
  input  logic txd
);
  logic [7:0] data_q [$];
  logic [7:0] msg_q  [$];
  int         bad_frames = 0;

  initial rxd = 1'b1;

  task automatic send_frame(logic [7:0] b, logic stop);
    rxd = 1'b0; repeat (TX_CLKS_PER_BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (TX_CLKS_PER_BIT) @(posedge clk); end
    rxd = stop; repeat (TX_CLKS_PER_BIT) @(posedge clk);
    rxd = 1'b1;
  endtask

  task automatic send_byte(logic [7:0] b);
    send_frame(b, 1'b1);
  endtask

  task automatic send_bad_frame(logic [7:0] b);
    send_frame(b, 1'b0);
    repeat (2 * CLKS_PER_BIT) @(posedge clk);
  endtask

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (txd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin repeat (CLKS_PER_BIT) @(posedge clk); b[i] = txd; end
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (txd != 1'b1) bad_frames++;
        else if (b[7])   msg_q.push_back(b);
        else             data_q.push_back(b);
      end
    end
  end
endmodule
