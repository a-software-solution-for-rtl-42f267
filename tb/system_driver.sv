// system_driver: end-to-end scenario for the sorter test system, for testbenches only.
//
// Plays the host over a uart_host and checks every reply against a window model:
//  1. connect            -> ACK message
//  2. data words sent back to back, the result mode moving through minimum, maximum,
//     median and a chosen position; every returned value is checked. The host sends
//     about 3 % faster than the system replies, so during the first run of FAST_ITEMS
//     words the results fall behind and finished input words must wait (stall) without
//     loss; ITEMS words follow, split over the other three modes
//  3. halt, three words  -> no results, the 2nd and 3rd words are lost with OVERFLOW
//                            messages and warn set; run -> the held word is sorted
//  4. unknown command    -> BAD_CMD message and err; broken frame -> FRAME message
//  5. clear              -> status cleared, window back to zeros
// It counts how often each mechanism occurred (stall cycles are counted by the
// testbench and passed in) and counts a failure for any that never did.
module system_driver #(
  parameter int unsigned N = 25,
  parameter int unsigned W = 8,
  parameter int unsigned CLKS_PER_BIT = 16,
  parameter int unsigned ITEMS = 36,
  parameter int unsigned FAST_ITEMS = 36
) (
  input  logic                clk,
  input  logic                rst,
  output logic                rxd,
  input  logic                txd,
  input  logic                warn,
  input  logic                err,
  input  logic                halted,
  input  logic [N-1:0][W-1:0] sorted,
  input  int                  stall_cycles,
  output logic                done,
  output int                  checks,
  output int                  failures
);
  import sort_pkg::*;
  localparam int unsigned NPK = packets_for(W);

  localparam int unsigned HOST_CPB = CLKS_PER_BIT - (CLKS_PER_BIT + 32) / 33;  // ~3 % fast

  uart_host #(.CLKS_PER_BIT(CLKS_PER_BIT), .TX_CLKS_PER_BIT(HOST_CPB)) host (.clk, .rxd, .txd);

  logic [W-1:0] window [N];
  int           wp;
  logic [W-1:0] exp_q [$];
  out_mode_e    mode;
  int           pos;
  int n_results = 0, n_ack = 0, n_overflow = 0, n_bad = 0, n_frame = 0, n_clear = 0,
      n_halt = 0, n_mode [4] = '{0, 0, 0, 0};

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic model_reset();
    for (int i = 0; i < N; i++) window[i] = '0;
    wp = 0;
  endtask

  function automatic logic [W-1:0] model_result();
    logic [W-1:0] q [$];
    for (int i = 0; i < N; i++) q.push_back(window[i]);
    q.sort();
    case (mode)
      OUT_MIN:    return q[0];
      OUT_MAX:    return q[N-1];
      OUT_MEDIAN: return q[(N-1)/2];
      default:    return q[pos];
    endcase
  endfunction

  task automatic send_word(logic [W-1:0] v, bit expect_result);
    logic [NPK*7-1:0] p;
    p = (NPK*7)'(v);
    for (int i = NPK - 1; i >= 0; i--) host.send_byte({1'b0, p[7*i +: 7]});
    if (expect_result) begin
      window[wp] = v;
      wp = (wp + 1) % N;
      exp_q.push_back(model_result());
      n_mode[mode]++;
    end
  endtask

  // wait until all expected results are back, then compare them in order
  task automatic drain();
    int limit;
    limit = (exp_q.size() * NPK + 4) * 10 * CLKS_PER_BIT + 100;
    while (host.data_q.size() < exp_q.size() * NPK && limit > 0) begin
      @(posedge clk); limit--;
    end
    repeat (20 * CLKS_PER_BIT) @(posedge clk);
    chk($sformatf("%0d data packets back, %0d expected", host.data_q.size(), exp_q.size() * NPK),
        host.data_q.size() == exp_q.size() * NPK);
    while (exp_q.size() > 0 && host.data_q.size() >= NPK) begin
      logic [NPK*7-1:0] v;
      logic [W-1:0]     e;
      v = '0;
      for (int i = 0; i < NPK; i++) v = (v << 7) | (NPK*7)'(host.data_q.pop_front() & 8'h7F);
      e = exp_q.pop_front();
      n_results++;
      chk($sformatf("result %0d: got %0d expected %0d", n_results, v[W-1:0], e), v[W-1:0] == e);
    end
    exp_q.delete();
    host.data_q.delete();
  endtask

  task automatic expect_msg(logic [6:0] code, string what);
    int limit;
    limit = 40 * CLKS_PER_BIT;
    while (host.msg_q.size() == 0 && limit > 0) begin @(posedge clk); limit--; end
    if (host.msg_q.size() == 0) chk({what, " message missing"}, 0);
    else begin
      logic [7:0] m;
      m = host.msg_q.pop_front();
      chk($sformatf("%s message: got %02h", what, m), m == {1'b1, code});
    end
  endtask

  task automatic command(logic [6:0] c);
    host.send_byte({1'b1, c});
    repeat (4) @(posedge clk);
  endtask

  task automatic set_mode(out_mode_e m);
    mode = m;
    command(CMD_MODE | 7'(m));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    mode = OUT_MIN; pos = 0;
    model_reset();
    @(posedge clk);
    while (rst) @(posedge clk);
    repeat (10) @(posedge clk);

    // 1. connection
    command(CMD_CONNECT);
    expect_msg(MSG_ACK, "ACK"); n_ack++;

    // 2. data words in all four result modes
    for (int seg = 0; seg < 4; seg++) begin
      if (seg == 3) begin
        pos = $urandom_range(0, N - 1);
        command(CMD_POS | 7'(pos));
      end
      set_mode(out_mode_e'(seg));
      for (int i = 0; i < ((seg == 0) ? FAST_ITEMS : ITEMS / 3); i++) send_word(W'($urandom), 1);
      drain();
    end

    // 3. halt: first word waits, the next two are lost
    command(CMD_HALT); n_halt++;
    chk("halted", halted);
    send_word(W'($urandom), 1);
    send_word(W'($urandom), 0);
    expect_msg(MSG_OVERFLOW, "OVERFLOW"); n_overflow++;
    send_word(W'($urandom), 0);
    expect_msg(MSG_OVERFLOW, "OVERFLOW"); n_overflow++;
    chk("no result while halted", host.data_q.size() == 0);
    chk("warn after overflow", warn);
    command(CMD_RUN);
    drain();

    // 4. errors
    command(7'h25);
    expect_msg(MSG_BAD_CMD, "BAD_CMD"); n_bad++;
    chk("err after bad command", err);
    host.send_bad_frame(8'h0F);
    expect_msg(MSG_FRAME, "FRAME"); n_frame++;
    chk("no bad frames from the system", host.bad_frames == 0);

    // 5. clear
    command(CMD_CLEAR); n_clear++;
    model_reset();
    chk("status cleared", !warn && !err);
    for (int k = 0; k < N; k++) chk("array cleared", sorted[k] == '0);
    set_mode(OUT_MAX);
    send_word(W'($urandom), 1);
    send_word(W'($urandom), 1);
    drain();
    for (int k = 1; k < N; k++) chk("array in order", sorted[k-1] <= sorted[k]);

    chk("no stray messages", host.msg_q.size() == 0);
    $display("mechanisms: results=%0d ack=%0d min=%0d max=%0d median=%0d pos=%0d halt=%0d overflow=%0d bad_cmd=%0d frame=%0d clear=%0d stall_cycles=%0d",
             n_results, n_ack, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_halt, n_overflow,
             n_bad, n_frame, n_clear, stall_cycles);
    chk("every mechanism occurred",
        n_results > 0 && n_ack > 0 && n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 &&
        n_mode[3] > 0 && n_halt > 0 && n_overflow > 0 && n_bad > 0 && n_frame > 0 &&
        n_clear > 0 && stall_cycles > 0);
    done = 1;
  end
endmodule
