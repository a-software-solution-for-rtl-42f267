// tb_sort_regfile: checks the circular write order of the sorter's data registers.
//
// Writes random items with random gaps into the default 25-register file and compares
// all registers and the modulo-25 write counter with a model after every clock,
// through several wrap-arounds; then checks the synchronous clear.
module tb_sort_regfile;
  localparam int N = 25, W = 8;
  logic clk = 0, rst = 1, clear = 0, wr_en = 0;
  logic [W-1:0] wr_data = '0;
  logic [N-1:0][W-1:0] regs;
  logic [$clog2(N)-1:0] wr_ptr;
  int checks = 0, failures = 0;
  logic [W-1:0] model [N];
  int mp = 0;

  always #5 clk = ~clk;

  sort_regfile #(.N(N), .W(W)) dut (.clk, .rst, .clear, .wr_en, .wr_data, .regs, .wr_ptr);

  task automatic compare();
    checks++;
    if (wr_ptr != mp) begin failures++; $display("FAIL ptr %0d exp %0d", wr_ptr, mp); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (regs[i] != model[i]) begin failures++; $display("FAIL R%0d %0h exp %0h", i, regs[i], model[i]); end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    compare();
    for (int t = 0; t < 200; t++) begin
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_data = W'($urandom);
      @(negedge clk);
      if (wr_en) begin model[mp] = wr_data; mp = (mp + 1) % N; end
      compare();
    end
    wr_en = 0; clear = 1;
    @(negedge clk);
    clear = 0;
    for (int i = 0; i < N; i++) model[i] = '0;
    mp = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
