// tb_sort_test_system: end-to-end test of the sorter test system over its UART.
//
// The 25 x 8-bit system runs at 32 clocks per serial bit to keep the run short;
// system_driver plays the host and checks every result and message. The testbench
// counts the clocks in which a finished input word had to wait for the result side
// (a stall) and hands the count to the driver.
module tb_sort_test_system;
  localparam int N = 25, W = 8, CPB = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rxd, txd, warn, err, halted, done;
  logic [N-1:0][W-1:0] sorted;
  int checks, failures, stall_cycles = 0;

  sort_test_system #(.N(N), .W(W), .CLKS_PER_BIT(CPB)) dut (
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
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
