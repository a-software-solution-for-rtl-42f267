// sort_reference_checker: behavioural model of the serial sorter that checks the real one.
//
// It sees every item given to the sorter, keeps its own window of the last N items
// (N zeros at the start), and one clock after each item compares the whole sorted
// array with a sorted copy of its window. A mismatch is reported at once with the item
// number, so a long run can be stopped early. Testbench only.
module sort_reference_checker #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                in_valid,
  input  logic [W-1:0]        in_data,
  input  logic                res_valid,
  input  logic [N-1:0][W-1:0] sorted,
  output int                  checks,
  output int                  failures
);
  logic [W-1:0] window [N];
  int wp = 0, items = 0;

  initial begin
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) window[i] = '0;
  end

  always @(posedge clk) begin
    if (res_valid) begin
      logic [W-1:0] q [$];
      q.delete();
      for (int i = 0; i < N; i++) q.push_back(window[i]);
      q.sort();
      for (int k = 0; k < N; k++) begin
        checks++;
        if (sorted[k] != q[k]) begin
          failures++;
          $display("WARNING: after item %0d, position %0d holds %0d, model says %0d", items, k, sorted[k], q[k]);
        end
      end
    end
    if (in_valid) begin
      window[wp] <= in_data;
      wp    <= (wp + 1) % N;
      items <= items + 1;
    end
  end
endmodule
