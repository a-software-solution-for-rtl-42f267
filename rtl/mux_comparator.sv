// mux_comparator: one multiplexer-comparator pair of the serial sorter.
//
// The N-to-1 multiplexer picks the data register named by sel; with the selections
// kept by sel_update, the output of pair k is the k-th element of the sorted array.
// The comparator sets 'after' when the new input item belongs behind the selected
// item in the chosen order: new >= selected for ascending order, new <= selected for
// descending order. Placing a new item behind equal items is this design's choice.
//
// Purely combinational: value and after follow regs, sel and new_data in the same cycle.
module mux_comparator #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter bit          ASCENDING = 1'b1,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] regs,
  input  logic [IW-1:0]       sel,
  input  logic [W-1:0]        new_data,
  output logic [W-1:0]        value,
  output logic                after
);

  always_comb begin
    value = regs[sel];
    after = ASCENDING ? (new_data >= value) : (new_data <= value);
  end

endmodule
