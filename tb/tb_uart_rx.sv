// tb_uart_rx: checks the receiving UART and its data/command split.
//
// Sends random 8N1 words at 32 clocks per bit. A word with MSB 0 must come out as a
// data packet, one with MSB 1 as a command, with the low 7 bits as payload, within the
// stop bit. Words with a 0 stop bit must raise frame_err and nothing else. The sender's
// bit time is varied by +-1 clock (3 %) to check sampling tolerance.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst = 1, rxd = 1;
  logic data_valid, cmd_valid, frame_err;
  logic [6:0] payload;
  int checks = 0, failures = 0;
  int n_data = 0, n_cmd = 0, n_ferr = 0;
  logic [7:0] last_byte;
  logic       ev_seen;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .data_valid, .cmd_valid, .payload, .frame_err);

  always @(posedge clk) begin
    if (data_valid) begin n_data++; last_byte <= {1'b0, payload}; end
    if (cmd_valid)  begin n_cmd++;  last_byte <= {1'b1, payload}; end
    if (frame_err)  n_ferr++;
  end

  task automatic send(logic [7:0] b, bit stop, int cpb);
    rxd = 0; repeat (cpb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (cpb) @(posedge clk); end
    rxd = stop; repeat (cpb) @(posedge clk);
    rxd = 1; repeat (cpb) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      logic [7:0] b;
      int d0, c0, f0, cpb;
      bit good;
      b    = 8'($urandom);
      good = ($urandom_range(0, 9) != 0);
      cpb  = CPB + $urandom_range(0, 2) - 1;
      d0 = n_data; c0 = n_cmd; f0 = n_ferr;
      send(b, good, cpb);
      checks++;
      if (good) begin
        if (!((b[7] && n_cmd == c0 + 1 && n_data == d0) || (!b[7] && n_data == d0 + 1 && n_cmd == c0))
            || n_ferr != f0 || last_byte != b) begin
          failures++; $display("FAIL word %02h: got %02h", b, last_byte);
        end
      end else begin
        if (n_ferr != f0 + 1 || n_data != d0 || n_cmd != c0) begin
          failures++; $display("FAIL bad stop bit not flagged");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
