// tb_cmd_module: checks the decoding of every host command.
//
// Each command is issued for one clock; the testbench checks the pulses (connect,
// clear, bad_cmd) and the settings (halt, result mode, chosen position) one clock
// later, and that other outputs did not change.
module tb_cmd_module;
  import sort_pkg::*;
  logic clk = 0, rst = 1, cmd_valid = 0;
  logic [6:0] cmd = '0;
  logic connect, clear, halt, bad_cmd;
  out_mode_e mode;
  logic [4:0] pos;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmd_module #(.N(25)) dut (.clk, .rst, .cmd_valid, .cmd, .connect, .clear, .halt, .mode, .pos, .bad_cmd);

  task automatic issue(logic [6:0] c);
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic expect_state(string what, bit e_conn, bit e_clr, bit e_bad, bit e_halt,
                              out_mode_e e_mode, logic [4:0] e_pos);
    checks++;
    if ({connect, clear, bad_cmd, halt} != {e_conn, e_clr, e_bad, e_halt} ||
        mode != e_mode || pos != e_pos) begin
      failures++;
      $display("FAIL %s: conn=%0b clr=%0b bad=%0b halt=%0b mode=%0d pos=%0d", what,
               connect, clear, bad_cmd, halt, mode, pos);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    expect_state("reset", 0, 0, 0, 0, OUT_MIN, 0);
    issue(CMD_CONNECT);  expect_state("connect", 1, 0, 0, 0, OUT_MIN, 0);
    @(negedge clk);      expect_state("pulse ends", 0, 0, 0, 0, OUT_MIN, 0);
    issue(CMD_HALT);     expect_state("halt", 0, 0, 0, 1, OUT_MIN, 0);
    issue(CMD_CLEAR);    expect_state("clear", 0, 1, 0, 1, OUT_MIN, 0);
    issue(CMD_RUN);      expect_state("run", 0, 0, 0, 0, OUT_MIN, 0);
    issue(CMD_MODE | 7'(OUT_MAX));    expect_state("mode max", 0, 0, 0, 0, OUT_MAX, 0);
    issue(CMD_MODE | 7'(OUT_MEDIAN)); expect_state("mode median", 0, 0, 0, 0, OUT_MEDIAN, 0);
    issue(CMD_POS | 7'd17);           expect_state("pos 17", 0, 0, 0, 0, OUT_MEDIAN, 17);
    issue(CMD_MODE | 7'(OUT_POS));    expect_state("mode pos", 0, 0, 0, 0, OUT_POS, 17);
    issue(7'h7F);                     expect_state("pos 31", 0, 0, 0, 0, OUT_POS, 31);
    issue(7'h00);                     expect_state("bad 00", 0, 0, 1, 0, OUT_POS, 31);
    issue(7'h25);                     expect_state("bad 25", 0, 0, 1, 0, OUT_POS, 31);
    issue(CMD_MODE | 7'(OUT_MIN));    expect_state("mode min", 0, 0, 0, 0, OUT_MIN, 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
