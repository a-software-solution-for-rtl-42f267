// tb_sort_test_system_full: the end-to-end scenario at the system's default size.
//
// The system is instantiated with all parameters at their defaults: a 25-item window
// of 8-bit values, ascending order, 434 clocks per serial bit (115200 baud from a
// 50 MHz clock). system_driver runs the same scenario as in tb_sort_test_system.
module tb_sort_test_system_full;
  localparam int N = 25, W = 8, CPB = 434;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz

  logic rxd, txd, warn, err, halted, done;
  logic [N-1:0][W-1:0] sorted;
  int checks, failures, stall_cycles = 0;

  sort_test_system dut (
    .clk, .rst, .rxd, .txd, .warn, .err, .halted, .sorted
  );

  system_driver #(.N(N), .W(W), .CLKS_PER_BIT(CPB), .ITEMS(45)) drv (
    .clk, .rst, .rxd, .txd, .warn, .err, .halted, .sorted, .stall_cycles, .done, .checks, .failures
  );

  always @(posedge clk)
    if (dut.word_valid && !dut.word_ready && !dut.halt) stall_cycles++;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
