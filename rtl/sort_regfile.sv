// sort_regfile: the data registers R0..R(N-1) of the serial sorter.
//
// Incoming items are written in circular order: the first into R0, the next into
// R1, and after R(N-1) the writing wraps back to R0, so each new item overwrites the
// oldest one. A modulo-N counter (wr_ptr) names the register written next; items
// never move between registers once written. This follows the original description.
// Reset/clear behaviour (all registers to zero, counter to R0) is this design's choice.
//
// Interface: wr_en/wr_data write one item per clock into R[wr_ptr] and advance the
// counter. regs and wr_ptr are the register outputs; a write is visible on regs in
// the cycle after wr_en. clear is a synchronous clear with the same effect as rst.
module sort_regfile #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 wr_en,
  input  logic [W-1:0]         wr_data,
  output logic [N-1:0][W-1:0]  regs,
  output logic [IW-1:0]        wr_ptr
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      regs   <= '0;
      wr_ptr <= '0;
    end else if (wr_en) begin
      regs[wr_ptr] <= wr_data;
      wr_ptr       <= (wr_ptr == IW'(N - 1)) ? '0 : wr_ptr + 1'b1;
    end
  end

endmodule
