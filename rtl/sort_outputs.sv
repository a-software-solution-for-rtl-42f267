// sort_outputs: the selectable outputs of the serial sorter.
//
// From the sorted array (element 0 first) it forwards the minimum, the maximum, the
// median and the element at a chosen position, as the original code generator lets the
// user pick any combination of these. Element 0 is the minimum in ascending order
// and the maximum in descending order; this block hides that difference. The median
// of an even-length array is taken as the lower middle element, position (N-1)/2 in
// ascending order (this design's choice). The chosen position is a run-time input
// here, so the test system can change it; an out-of-range position returns element N-1.
//
// Purely combinational.
module sort_outputs #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter bit          ASCENDING = 1'b1,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] sorted,
  input  logic [PW-1:0]       pos,
  output logic [W-1:0]        min_o,
  output logic [W-1:0]        max_o,
  output logic [W-1:0]        median_o,
  output logic [W-1:0]        pos_o
);

  localparam int unsigned MED_ASC = (N - 1) / 2;
  localparam int unsigned MED_IDX = ASCENDING ? MED_ASC : (N - 1 - MED_ASC);

  always_comb begin
    min_o    = ASCENDING ? sorted[0] : sorted[N-1];
    max_o    = ASCENDING ? sorted[N-1] : sorted[0];
    median_o = sorted[MED_IDX];
    pos_o    = (32'(pos) < N) ? sorted[pos] : sorted[N-1];
  end

endmodule
