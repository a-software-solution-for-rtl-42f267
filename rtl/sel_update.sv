// sel_update: computes and holds the multiplexer selections of the serial sorter.
//
// sel[k] names the data register that holds the k-th element of the sorted array.
// When a new item arrives it will overwrite register wr_ptr (the oldest item), so the
// old position of that register is dropped from the list and the new item is inserted
// where the comparator pattern switches from 'after' to 'not after' (with nine
// comparators, 0..5 high and 6..8 low means the new item goes to place 6). That idea
// follows the original description; the per-position rule below, including how the
// overwritten entry is dropped, is this design's own:
//
//   rm[k]  = 1 when the dropped entry sits at position k or below (prefix OR)
//   a'[k]  = comparator bit of the k-th surviving entry  (after[k] or after[k+1])
//   s'[k]  = selection of the k-th surviving entry        (sel[k]   or sel[k+1])
//   next[k] = a'[k]                 ? s'[k]
//           : (k == 0 || a'[k-1])   ? wr_ptr          (the new item's register)
//           :                         s'[k-1]
//
// Each position looks only at its own and neighbouring comparators, so the rule scales
// with N. The new selections are registered on upd and are valid from the next cycle,
// so the array is sorted again one clock after each arrival.
// Reset/clear set sel[k] = k, which is sorted because the registers clear to zero.
module sel_update #(
  parameter int unsigned N = 25,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 upd,
  input  logic [IW-1:0]        wr_ptr,
  input  logic [N-1:0]         after,
  output logic [N-1:0][IW-1:0] sel
);

  logic [N-1:0]         rm;       // dropped entry at or below position k
  logic [N-1:0]         a_s;      // comparator bits of the surviving entries
  logic [N-1:0][IW-1:0] s_s;      // selections of the surviving entries
  logic [N-1:0][IW-1:0] sel_next;

  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int k = 0; k < N; k++) begin
      seen  = seen | (sel[k] == wr_ptr);
      rm[k] = seen;
    end
    for (int k = 0; k < N; k++) begin
      if (k < N - 1) begin
        a_s[k] = rm[k] ? after[(k < N - 1) ? k + 1 : k] : after[k];
        s_s[k] = rm[k] ? sel[(k < N - 1) ? k + 1 : k]   : sel[k];
      end else begin
        a_s[k] = 1'b0;       // only N-1 entries survive
        s_s[k] = sel[k];     // never selected: a_s[N-1] = 0
      end
    end
    for (int k = 0; k < N; k++) begin
      if (a_s[k])
        sel_next[k] = s_s[k];
      else if (k == 0 || a_s[(k > 0) ? k - 1 : 0])
        sel_next[k] = wr_ptr;
      else
        sel_next[k] = s_s[(k > 0) ? k - 1 : 0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < N; k++) sel[k] <= IW'(k);
    end else if (upd) begin
      sel <= sel_next;
    end
  end

endmodule
