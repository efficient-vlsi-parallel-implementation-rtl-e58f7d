// tb_control_unit: runs the controller against two stand-in engines that
// answer each start with done after a random 1..6 cycles, for two blocks.
// Every command issued is compared with the expected sequence: input, then
// initialisation on both ports, then for iterations 2..16 and dimensions
// 0..3 the three phases with their row ranges and the updating flag, then
// (for the second block) the output on port B before the input. It also
// checks the iteration number seen with each command, the first/last
// iteration flags, that block_done pulses once per block and that nothing
// is started while a port is still busy.
module tb_control_unit;
  import ldpc_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic a_start, b_start, a_done = 1'b0, b_done = 1'b0, upd, first_iter, last_iter, block_done;
  cmd_e a_cmd, b_cmd;
  logic [7:0] a_first, a_last, b_first, b_last;
  logic [1:0] dim;
  logic [4:0] iteration;

  control_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit   port;     // 0 = A, 1 = B
    cmd_e c;
    int   d, f, l, it;
    bit   u;
  } entry_t;

  entry_t got [$], want [$];

  function automatic entry_t mk(bit p, cmd_e c, int d, int f, int l, bit u, int it);
    entry_t e;
    e.port = p; e.c = c; e.d = d; e.f = f; e.l = l; e.u = u; e.it = it;
    return e;
  endfunction

  // stand-in engines
  int a_cnt = 0, b_cnt = 0, busy_start_err = 0;
  always @(posedge clk) begin
    a_done <= 1'b0;
    b_done <= 1'b0;
    if (a_cnt > 0) begin a_cnt <= a_cnt - 1; if (a_cnt == 1) a_done <= 1'b1; end
    if (b_cnt > 0) begin b_cnt <= b_cnt - 1; if (b_cnt == 1) b_done <= 1'b1; end
    if (!reset && a_start) begin
      if (a_cnt != 0) busy_start_err++;
      a_cnt <= $urandom_range(1, 6);
      got.push_back(mk(0, a_cmd, dim, a_first, a_last, upd, iteration));
    end
    if (!reset && b_start) begin
      if (b_cnt != 0) busy_start_err++;
      b_cnt <= $urandom_range(1, 6);
      got.push_back(mk(1, b_cmd, dim, b_first, b_last, upd, iteration));
    end
  end

  int n_done = 0, flag_err = 0;
  always @(posedge clk) if (!reset) begin
    if (block_done) n_done++;
    if (first_iter != (iteration == 1) || last_iter != (iteration == 16)) flag_err++;
  end

  function automatic bit same(entry_t x, entry_t y);
    if (x.port != y.port || x.c != y.c || x.f != y.f || x.l != y.l) return 0;
    if (x.c inside {CMD_HF, CMD_VF, CMD_VB, CMD_HB}) begin
      if (x.d != y.d || x.it != y.it) return 0;
      if (x.c == CMD_HF && x.u != y.u) return 0;
    end
    return 1;
  endfunction

  task automatic expect_block(bit with_output);
    if (with_output) want.push_back(mk(1, CMD_OUT, 0, 0, 255, 0, 1));
    want.push_back(mk(0, CMD_IN, 0, 0, 127, 0, 1));
    want.push_back(mk(0, CMD_INIT, 0, 0, 127, 0, 1));
    want.push_back(mk(1, CMD_INIT, 0, 128, 255, 0, 1));
    for (int it = 2; it <= 16; it++)
      for (int d = 0; d < 4; d++) begin
        want.push_back(mk(0, CMD_HF, d, 0, 127, !(it == 2 && d == 0), it));
        want.push_back(mk(1, CMD_HF, d, 128, 255, !(it == 2 && d == 0), it));
        want.push_back(mk(0, CMD_VB, d, 255, 0, 0, it));
        want.push_back(mk(1, CMD_VF, d, 0, 255, 0, it));
        want.push_back(mk(0, CMD_HB, d, 0, 127, 0, it));
        want.push_back(mk(1, CMD_HB, d, 128, 255, 0, it));
      end
  endtask

  initial begin
    expect_block(0);
    expect_block(1);
    repeat (3) @(negedge clk);
    reset = 1'b0;
    wait (n_done == 2);
    wait (got.size() >= want.size());
    for (int i = 0; i < want.size(); i++) begin
      checks++;
      if (i >= got.size() || !same(got[i], want[i])) begin
        failures++;
        if (failures < 10) begin
          if (i < got.size())
            $display("command %0d: port %0d %s dim %0d rows %0d..%0d upd %0d it %0d; expected port %0d %s dim %0d rows %0d..%0d upd %0d it %0d",
                     i, got[i].port, got[i].c.name(), got[i].d, got[i].f, got[i].l, got[i].u, got[i].it,
                     want[i].port, want[i].c.name(), want[i].d, want[i].f, want[i].l, want[i].u, want[i].it);
          else $display("command %0d missing", i);
        end
      end
    end
    // the third block begins with the output of the second one, then input
    wait (got.size() >= want.size() + 2);
    checks++;
    if (!same(got[want.size()], mk(1, CMD_OUT, 0, 0, 255, 0, 1)) ||
        !same(got[want.size() + 1], mk(0, CMD_IN, 0, 0, 127, 0, 1))) begin
      failures++;
      $display("third block does not start with output and input");
    end
    checks++;
    if (n_done != 2) begin failures++; $display("block_done %0d times", n_done); end
    checks++;
    if (flag_err != 0) begin failures++; $display("first/last iteration flags wrong %0d times", flag_err); end
    checks++;
    if (busy_start_err != 0) begin failures++; $display("started a busy port %0d times", busy_start_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
