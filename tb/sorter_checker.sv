// sorter_checker: drives one serial_sorter with random items and checks every result.
//
// The reference is a plain model of the window: the last N items (N zeros after reset
// or clear), copied and sorted with the language's sort method. Items are sent with
// random gaps, often back to back; after each item the checker requires, one clock
// later, res_valid and the full sorted array, minimum, maximum, median and the element
// at a random position. Halfway through it clears the sorter and checks the empty window.
// Values are drawn from a narrow range half of the time so that equal items occur.
module sorter_checker #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter bit          ASCENDING = 1'b1,
  parameter int unsigned ITEMS = 200
) (
  input  logic     clk,
  input  logic     rst,
  output logic     done,
  output int       checks,
  output int       failures
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic                 clear, in_valid, res_valid;
  logic [W-1:0]         in_data, min_o, max_o, median_o, pos_o;
  logic [IW-1:0]        pos;
  logic [N-1:0][W-1:0]  sorted;

  serial_sorter #(.N(N), .W(W), .ASCENDING(ASCENDING)) dut (
    .clk, .rst, .clear, .in_valid, .in_data, .pos,
    .sorted, .min_o, .max_o, .median_o, .pos_o, .res_valid
  );

  logic [W-1:0] window [N];
  int           wp;

  task automatic reset_model();
    for (int i = 0; i < N; i++) window[i] = '0;
    wp = 0;
  endtask

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d %s: got %0h expected %0h", N, what, got, exp);
    end
  endtask

  task automatic check_all();
    logic [W-1:0] q [$];
    int           med;
    for (int i = 0; i < N; i++) q.push_back(window[i]);
    q.sort();                           // ascending reference
    med = (N - 1) / 2;
    for (int k = 0; k < N; k++)
      check($sformatf("sorted[%0d]", k), sorted[k], ASCENDING ? q[k] : q[N-1-k]);
    check("min", min_o, q[0]);
    check("max", max_o, q[N-1]);
    check("median", median_o, q[med]);
    check("pos", pos_o, ASCENDING ? q[pos] : q[N-1-pos]);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    clear = 0; in_valid = 0; in_data = '0; pos = '0;
    reset_model();
    @(negedge clk);
    while (rst) @(negedge clk);
    check_all();                        // empty window after reset
    for (int i = 0; i < ITEMS; i++) begin
      int gap;
      gap = $urandom_range(0, 3);
      if (gap == 3) gap = 0;            // mostly back to back
      repeat (gap) @(negedge clk);
      in_valid = 1;
      in_data  = ($urandom_range(0, 1) != 0) ? W'($urandom_range(0, 5)) : W'($urandom);
      pos      = IW'($urandom_range(0, N - 1));
      window[wp] = in_data;
      wp = (wp + 1) % N;
      @(negedge clk);                   // item taken at the posedge in between
      in_valid = 0;
      checks++;
      if (!res_valid) begin
        failures++;
        $display("FAIL N=%0d: res_valid missing one clock after item %0d", N, i);
      end
      check_all();
      if (i == ITEMS / 2) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        reset_model();
        check_all();
      end
    end
    done = 1;
  end
endmodule
