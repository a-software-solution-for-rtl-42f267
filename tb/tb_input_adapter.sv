// tb_input_adapter: checks the assembly of 7-bit packets into data words.
//
// Two adapters: W = 8 (2 packets per word) and W = 24 (4 packets, as in the
// original description's example). Random words are split by the testbench, most significant
// packet first, and must come out whole. A word waits in the holding register while
// the next one is collected; a word completed while the holding register is still
// full must be lost with exactly one overflow pulse. clear must drop a partial word.
module tb_input_adapter;
  logic clk = 0, rst = 1, clear = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, overflows = 0;

  logic        pv8 = 0, pv24 = 0;
  logic [6:0]  pk8 = '0, pk24 = '0;
  logic        wv8, wv24, ov8, ov24;
  logic        wr8 = 0, wr24 = 0;
  logic [7:0]  w8;
  logic [23:0] w24;

  input_adapter #(.W(8))  d8  (.clk, .rst, .clear, .pkt_valid(pv8),  .pkt(pk8),  .word_valid(wv8),  .word_ready(wr8),  .word(w8),  .overflow(ov8));
  input_adapter #(.W(24)) d24 (.clk, .rst, .clear, .pkt_valid(pv24), .pkt(pk24), .word_valid(wv24), .word_ready(wr24), .word(w24), .overflow(ov24));

  always @(posedge clk) if (ov8 || ov24) overflows++;

  task automatic send8(logic [7:0] v, bit take_between = 0, logic [7:0] exp = '0);
    logic [13:0] p; p = 14'(v);
    for (int i = 1; i >= 0; i--) begin
      @(negedge clk); pv8 = 1; pk8 = p[7*i +: 7];
      @(negedge clk); pv8 = 0;
      if (take_between && i == 1) take8(exp);
    end
  endtask

  task automatic send24(logic [23:0] v);
    logic [27:0] p; p = 28'(v);
    for (int i = 3; i >= 0; i--) begin
      @(negedge clk); pv24 = 1; pk24 = p[7*i +: 7];
      @(negedge clk); pv24 = 0;
    end
  endtask

  task automatic take8(logic [7:0] exp);
    checks++;
    if (!wv8 || w8 != exp) begin failures++; $display("FAIL w8 %0h exp %0h v=%0b", w8, exp, wv8); end
    @(negedge clk); wr8 = 1; @(negedge clk); wr8 = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      logic [7:0]  a, b;
      logic [23:0] c;
      a = 8'($urandom); c = 24'($urandom);
      send8(a);
      send24(c);
      checks++;
      if (!wv24 || w24 != c) begin failures++; $display("FAIL w24 %0h exp %0h", w24, c); end
      @(negedge clk); wr24 = 1; @(negedge clk); wr24 = 0;
      // the next 8-bit word is being collected while the first still waits
      b = 8'($urandom);
      send8(b, 1, a);
      take8(b);
      checks++;
      if (wv8 || wv24) begin failures++; $display("FAIL word still valid after take"); end
    end
    // overflow: two words without taking any, the second is lost
    begin
      int ov0;
      ov0 = overflows;
      send8(8'h11); send8(8'h22);
      @(negedge clk);
      checks++;
      if (overflows != ov0 + 1) begin failures++; $display("FAIL overflow count %0d", overflows - ov0); end
      take8(8'h11);
    end
    // clear drops a partial word
    @(negedge clk); pv8 = 1; pk8 = 7'h01; @(negedge clk); pv8 = 0;
    clear = 1; @(negedge clk); clear = 0;
    send8(8'hA5);
    take8(8'hA5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
