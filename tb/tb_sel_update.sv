// tb_sel_update: checks the selection-update rule on its own.
//
// The testbench keeps the data registers and does the comparisons itself (new >= value
// of each selected register), feeds the comparator pattern to sel_update, and after
// each update checks that: sel is a permutation of the register numbers; reading the
// registers through sel gives a non-decreasing list; and that list equals the sorted
// window of the last N items. Length 9 is tested; items arrive back to back
// and with gaps, with many equal values.
module tb_sel_update;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 9;
  localparam int IW = 4;
  logic clear = 0, upd = 0;
  logic [IW-1:0] wr_ptr = '0;
  logic [N-1:0] after;
  logic [N-1:0][IW-1:0] sel;
  logic [7:0] regs [N];
  logic [7:0] new_item;

  sel_update #(.N(N)) dut (.clk, .rst, .clear, .upd, .wr_ptr, .after, .sel);

  always_comb
    for (int k = 0; k < N; k++) after[k] = (new_item >= regs[sel[k]]);

  task automatic verify();
    logic [7:0] q [$];
    logic [N-1:0] seen;
    seen = '0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (sel[k] >= N || seen[sel[k]]) begin failures++; $display("FAIL sel not a permutation"); end
      else seen[sel[k]] = 1'b1;
    end
    for (int i = 0; i < N; i++) q.push_back(regs[i]);
    q.sort();
    for (int k = 0; k < N; k++) begin
      checks++;
      if (sel[k] < N && regs[sel[k]] != q[k]) begin
        failures++; $display("FAIL position %0d holds %0d expected %0d", k, regs[sel[k]], q[k]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) regs[i] = '0;
    new_item = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // after reset the selections are the identity
    for (int k = 0; k < N; k++) begin checks++; if (sel[k] != k) failures++; end
    for (int t = 0; t < 3000; t++) begin
      if ($urandom_range(0, 2) == 0) @(negedge clk);
      new_item = ($urandom_range(0, 1) != 0) ? 8'($urandom_range(0, 4)) : 8'($urandom);
      upd = 1;
      @(negedge clk);
      upd = 0;
      regs[wr_ptr] = new_item;           // the register the sorter writes at this edge
      wr_ptr = (wr_ptr == N - 1) ? '0 : wr_ptr + 1'b1;
      #1 verify();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
