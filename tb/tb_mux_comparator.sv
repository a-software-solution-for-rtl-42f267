// tb_mux_comparator: checks one multiplexer-comparator pair in both sort orders.
//
// Random register contents, selections and new items; the selected value must equal
// the addressed register, and 'after' must be new >= value (ascending) or
// new <= value (descending). Equal values are forced regularly.
module tb_mux_comparator;
  localparam int N = 25, W = 8;
  logic [N-1:0][W-1:0] regs;
  logic [$clog2(N)-1:0] sel;
  logic [W-1:0] new_data, v_a, v_d;
  logic after_a, after_d;
  int checks = 0, failures = 0;

  mux_comparator #(.N(N), .W(W), .ASCENDING(1)) dut_a (.regs, .sel, .new_data, .value(v_a), .after(after_a));
  mux_comparator #(.N(N), .W(W), .ASCENDING(0)) dut_d (.regs, .sel, .new_data, .value(v_d), .after(after_d));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) regs[i] = W'($urandom);
      sel = 5'($urandom_range(0, N - 1));
      new_data = (t % 4 == 0) ? regs[sel] : W'($urandom);
      #1;
      checks += 4;
      if (v_a != regs[sel]) failures++;
      if (v_d != regs[sel]) failures++;
      if (after_a != (new_data >= regs[sel])) failures++;
      if (after_d != (new_data <= regs[sel])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
