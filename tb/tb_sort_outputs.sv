// tb_sort_outputs: checks minimum, maximum, median and chosen-position outputs.
//
// Random sorted arrays are presented in ascending and descending order, for an odd
// (25) and an even (8) array length; the median of an even length is the lower one.
module tb_sort_outputs;
  int checks = 0, failures = 0;

  logic [24:0][7:0] s25a, s25d;
  logic [7:0][7:0]  s8a;
  logic [4:0] p25;
  logic [2:0] p8;
  logic [7:0] mn[3], mx[3], md[3], po[3];

  sort_outputs #(.N(25), .W(8), .ASCENDING(1)) u0 (.sorted(s25a), .pos(p25), .min_o(mn[0]), .max_o(mx[0]), .median_o(md[0]), .pos_o(po[0]));
  sort_outputs #(.N(25), .W(8), .ASCENDING(0)) u1 (.sorted(s25d), .pos(p25), .min_o(mn[1]), .max_o(mx[1]), .median_o(md[1]), .pos_o(po[1]));
  sort_outputs #(.N(8),  .W(8), .ASCENDING(1)) u2 (.sorted(s8a),  .pos(p8),  .min_o(mn[2]), .max_o(mx[2]), .median_o(md[2]), .pos_o(po[2]));

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [7:0] q [$];
      for (int i = 0; i < 25; i++) q.push_back(8'($urandom));
      q.sort();
      for (int i = 0; i < 25; i++) begin s25a[i] = q[i]; s25d[i] = q[24 - i]; end
      for (int i = 0; i < 8; i++) s8a[i] = q[3 * i];
      p25 = 5'($urandom_range(0, 24));
      p8  = 3'($urandom);
      #1;
      chk(mn[0], q[0], "min a");   chk(mx[0], q[24], "max a"); chk(md[0], q[12], "med a");
      chk(po[0], q[p25], "pos a");
      chk(mn[1], q[0], "min d");   chk(mx[1], q[24], "max d"); chk(md[1], q[12], "med d");
      chk(po[1], q[24 - p25], "pos d");
      chk(mn[2], q[0], "min 8");   chk(mx[2], q[21], "max 8"); chk(md[2], q[9], "med 8");
      chk(po[2], q[3 * p8], "pos 8");
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
