// tb_sort_file: file-driven test of the serial sorter, organized as reader, sorter,
// reference checker and output formatter.
//
// item_file_reader supplies the items of tb/sort_items.mem (120 values, many of them
// close together so that equal values occur), one per clock, to the 25 x 8-bit sorter
// and to sort_reference_checker. The formatter prints, after each item, the minimum,
// median and maximum of the window as decimal numbers, one line per item.
module tb_sort_file;
  localparam int N = 25, W = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         next, valid, last, res_valid, clear = 0;
  logic [W-1:0] item, min_o, max_o, median_o, pos_o;
  logic [N-1:0][W-1:0] sorted;
  int count, checks, failures, lines = 0;

  item_file_reader #(.W(W)) reader (.clk, .next, .valid, .item, .last, .count);

  serial_sorter dut (
    .clk, .rst, .clear, .in_valid(next), .in_data(item), .pos(5'd0),
    .sorted, .min_o, .max_o, .median_o, .pos_o, .res_valid
  );

  sort_reference_checker #(.N(N), .W(W)) u_checker (
    .clk, .in_valid(next), .in_data(item), .res_valid(res_valid && !rst), .sorted, .checks, .failures
  );

  assign next = valid && !rst;

  // output formatter
  always @(posedge clk) if (res_valid && !rst) begin
    lines++;
    $display("%0d %0d %0d", min_o, median_o, max_o);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (!valid);
    repeat (3) @(posedge clk);
    if (lines != count) begin
      failures++;
      $display("FAIL %0d result lines for %0d items", lines, count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
