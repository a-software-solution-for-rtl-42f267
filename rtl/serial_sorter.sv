// serial_sorter: keeps the last N items of a serial data stream sorted at all times.
//
// Items arrive one at a time (in_valid/in_data). Each is written, unmoved, into one of
// N registers in circular order (sort_regfile), replacing the oldest item. N
// multiplexer-comparator pairs (mux_comparator) read the registers through the current
// selections, so pair k presents the k-th sorted element, and each compares its element
// with the arriving item. sel_update turns the comparator pattern into the selections
// for the next cycle. The array is therefore sorted again one clock after every arrival,
// and a new item can be accepted on every clock. This structure follows the original description.
//
// Outputs: sorted (the full array, element 0 first), plus minimum, maximum, median and
// the element at run-time position pos (sort_outputs). res_valid pulses in the cycle in
// which the outputs first reflect an item accepted one clock earlier.
// Reset and clear empty the window to N zeros (this design's choice): until N items have
// arrived, the array holds the arrived items together with the remaining zeros.
// An assertion checks in simulation that the outputs are in order on every clock.
module serial_sorter #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter bit          ASCENDING = 1'b1,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [W-1:0]         in_data,
  input  logic [IW-1:0]        pos,
  output logic [N-1:0][W-1:0]  sorted,
  output logic [W-1:0]         min_o,
  output logic [W-1:0]         max_o,
  output logic [W-1:0]         median_o,
  output logic [W-1:0]         pos_o,
  output logic                 res_valid
);

  logic [N-1:0][W-1:0]  regs;
  logic [IW-1:0]        wr_ptr;
  logic [N-1:0][IW-1:0] sel;
  logic [N-1:0]         after;

  sort_regfile #(.N(N), .W(W)) u_regs (
    .clk, .rst, .clear,
    .wr_en   (in_valid),
    .wr_data (in_data),
    .regs,
    .wr_ptr
  );

  for (genvar k = 0; k < N; k++) begin : g_pair
    mux_comparator #(.N(N), .W(W), .ASCENDING(ASCENDING)) u_mc (
      .regs,
      .sel      (sel[k]),
      .new_data (in_data),
      .value    (sorted[k]),
      .after    (after[k])
    );
  end

  sel_update #(.N(N)) u_sel (
    .clk, .rst, .clear,
    .upd    (in_valid),
    .wr_ptr,
    .after,
    .sel
  );

  sort_outputs #(.N(N), .W(W), .ASCENDING(ASCENDING)) u_out (
    .sorted, .pos, .min_o, .max_o, .median_o, .pos_o
  );

  always_ff @(posedge clk) begin
    if (rst || clear) res_valid <= 1'b0;
    else              res_valid <= in_valid;
  end

  // The multiplexer outputs are in order at every clock, not only after an update.
  for (genvar k = 1; k < N; k++) begin : g_order
    a_in_order: assert property (@(posedge clk) disable iff (rst)
      ASCENDING ? (sorted[k-1] <= sorted[k]) : (sorted[k-1] >= sorted[k]));
  end

endmodule
