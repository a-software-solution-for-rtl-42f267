// tb_result_adapter: checks the splitting of results into 7-bit data packets.
//
// W = 8 (2 packets) and W = 24 (4 packets). Each result must leave as packets with
// MSB 0, most significant payload first, while a random consumer stalls out_ready;
// in_ready must stay low until the last packet is taken.
module tb_result_adapter;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iv8 = 0, iv24 = 0, ir8, ir24, ov8, ov24;
  logic        or8, or24;
  logic [7:0]  i8 = '0, ob8, ob24;
  logic [23:0] i24 = '0;
  logic [7:0]  got8 [$], got24 [$];

  result_adapter #(.W(8))  d8  (.clk, .rst, .in_valid(iv8),  .in_ready(ir8),  .in_word(i8),  .out_valid(ov8),  .out_ready(or8),  .out_byte(ob8));
  result_adapter #(.W(24)) d24 (.clk, .rst, .in_valid(iv24), .in_ready(ir24), .in_word(i24), .out_valid(ov24), .out_ready(or24), .out_byte(ob24));

  always @(negedge clk) begin
    or8  <= ($urandom_range(0, 2) == 0);
    or24 <= ($urandom_range(0, 2) == 0);
  end
  always @(posedge clk) begin
    if (ov8 && or8)   got8.push_back(ob8);
    if (ov24 && or24) got24.push_back(ob24);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      logic [13:0] e8;
      logic [27:0] e24;
      e8 = 14'(8'($urandom)); e24 = 28'(24'($urandom));
      got8.delete(); got24.delete();
      @(negedge clk);
      checks += 2;
      if (!ir8 || !ir24) begin failures++; $display("FAIL not ready when empty"); end
      iv8 = 1; i8 = e8[7:0]; iv24 = 1; i24 = e24[23:0];
      @(negedge clk);
      iv8 = 0; iv24 = 0;
      while (got8.size() < 2 || got24.size() < 4) begin
        @(negedge clk);
        if ((got8.size() < 2 && ir8) || (got24.size() < 4 && ir24)) begin
          failures++; checks++; $display("FAIL ready before last packet");
        end
      end
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (got8[i] != {1'b0, e8[7*(1-i) +: 7]}) begin failures++; $display("FAIL p8[%0d] %0h", i, got8[i]); end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got24[i] != {1'b0, e24[7*(3-i) +: 7]}) begin failures++; $display("FAIL p24[%0d] %0h", i, got24[i]); end
      end
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
