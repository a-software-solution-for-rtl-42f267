// tb_serial_sorter: self-checking test of the serial sorter.
//
// Runs six sorters side by side against a software model (sorter_checker): the
// default 25 x 8-bit ascending sorter, the same sorter in descending order, the array
// lengths 9 and 35 (16-bit items), and the smallest and largest configurations a user
// may ask for: 3 items of 1 bit (descending) and 50 items of 32 bits. Each item must be sorted into place one clock
// after it arrives, even when items arrive on every clock.
module tb_serial_sorter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3, d4, d5;
  int   c0, c1, c2, c3, c4, c5, f0, f1, f2, f3, f4, f5;

  sorter_checker #(.N(25), .W(8),  .ASCENDING(1), .ITEMS(300)) u_asc (clk, rst, d0, c0, f0);
  sorter_checker #(.N(25), .W(8),  .ASCENDING(0), .ITEMS(300)) u_dsc (clk, rst, d1, c1, f1);
  sorter_checker #(.N(9),  .W(8),  .ASCENDING(1), .ITEMS(200)) u_n9  (clk, rst, d2, c2, f2);
  sorter_checker #(.N(35), .W(16), .ASCENDING(1), .ITEMS(300)) u_n35 (clk, rst, d3, c3, f3);
  sorter_checker #(.N(3),  .W(1),  .ASCENDING(0), .ITEMS(200)) u_n3  (clk, rst, d4, c4, f4);
  sorter_checker #(.N(50), .W(32), .ASCENDING(1), .ITEMS(300)) u_n50 (clk, rst, d5, c5, f5);

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d0 && d1 && d2 && d3 && d4 && d5);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5, f0 + f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end
endmodule
