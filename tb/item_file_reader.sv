// item_file_reader: feeds test items from a text file, one item per clock request.
//
// The file holds one hexadecimal value per line and nothing else. Every value is
// checked against the item width: a value that does not fit stops the run with an
// error, as does an empty file. The number of values decides how long the run lasts;
// 'last' marks the final item. Testbench only.
module item_file_reader #(
  parameter int unsigned W        = 8,
  parameter int unsigned MAX_ITEMS = 1024,
  parameter string       FILE     = "tb/sort_items.mem"
) (
  input  logic         clk,
  input  logic         next,       // take the current item at this clock
  output logic         valid,
  output logic [W-1:0] item,
  output logic         last,
  output int           count
);
  localparam logic [15:0] END_MARK = 16'hFFFF;
  logic [15:0] mem [MAX_ITEMS];
  int idx;

  initial begin
    for (int i = 0; i < MAX_ITEMS; i++) mem[i] = END_MARK;
    $readmemh(FILE, mem);
    count = 0;
    while (count < MAX_ITEMS && mem[count] != END_MARK) begin
      if (mem[count] >= (1 << W)) begin
        $display("ERROR: line %0d of %s: value %0d does not fit in %0d bits", count + 1, FILE, mem[count], W);
        $display("TB_RESULT checks=0 failures=1");
        $finish;
      end
      count++;
    end
    if (count == 0) begin
      $display("ERROR: %s holds no values", FILE);
      $display("TB_RESULT checks=0 failures=1");
      $finish;
    end
    idx = 0;
  end

  assign valid = (idx < count);
  assign item  = W'(mem[idx]);
  assign last  = (idx == count - 1);

  always @(posedge clk) if (next && valid) idx <= idx + 1;
endmodule
