// tb_uart_tx: checks the delivery UART's frame, bit time and handshake.
//
// Offers random words, sometimes back to back. A monitor samples txd in the middle of
// each bit: start bit 0, eight data bits LSB first, stop bit 1, each exactly 16 clocks
// long (the start-to-start distance of back-to-back words must be 160 clocks).
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, in_valid = 0, in_ready, txd;
  logic [7:0] in_byte = '0;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  int last_start = -1000, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .in_valid, .in_ready, .in_byte, .txd);

  // monitor
  initial begin
    forever begin
      logic [7:0] b;
      logic [7:0] exp;
      @(negedge txd);
      if (last_start >= 0 && cyc - last_start < 10 * CPB) begin
        failures++; $display("FAIL frames too close: %0d", cyc - last_start);
      end
      last_start = cyc;
      repeat (CPB / 2) @(posedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      exp = sent.pop_front();
      checks++; if (b != exp) begin failures++; $display("FAIL got %02h exp %02h", b, exp); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      in_valid = 1; in_byte = 8'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      sent.push_back(in_byte);
      @(negedge clk);
      in_valid = 0;
      checks++; if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      if ($urandom_range(0, 1) != 0) repeat ($urandom_range(1, 300)) @(posedge clk);
    end
    repeat (12 * CPB) @(posedge clk);
    checks++; if (sent.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
