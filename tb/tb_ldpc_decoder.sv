// tb_ldpc_decoder: end-to-end test of the decoder at its default size
// (16 iterations, 4 dimensions of 256 x 4).
//
// Encodes two random 1024-bit blocks with the zigzag-style parity chains of
// the four dimensions (interleaver formula re-derived here), sends noisy
// 5-bit soft values with some hard errors, lets the decoder run and compares
// the decoded bits that come out of the following input/output iteration
// with the information bits. It also checks the number of output values,
// the length of the decoding phase and of a block in cycles, and counts
// that every mechanism happened: input stalled by en low, output skipped
// after reset, updating step skipped and used, both ports busy together,
// clipping of extrinsic values, raw errors corrected, and the iteration
// counter wrapping from 16 to 1.
module tb_ldpc_decoder;

  localparam int N       = 1024;
  localparam int R       = 256;
  localparam int N_ITER  = 16;
  // expected cycles from the first horizontal forward step to the end of
  // the last iteration (see the decoder's documentation for the schedule)
  localparam int HF0     = 4 * 128 * 2 + 128 + 2;     // no updating step
  localparam int HF      = 1 + 128 * 21 + 2;
  localparam int VPH     = 768 + 2;
  localparam int HBPH    = 128 * 14 + 2;
  localparam int DIMC    = HF + VPH + HBPH + 1;
  localparam int DIM0    = HF0 + VPH + HBPH + 1;
  localparam int DECODE  = (DIM0 + 3 * DIMC + 1) + (N_ITER - 2) * (4 * DIMC + 1);
  // one block period with input offered every cycle: decoding, set
  // iteration, output (1 + 3 per bit), input (1 per value), initialisation
  localparam int PERIOD  = DECODE + 1 + (1 + 3 * N + 2) + (2 * N + 2) + (16 * 128 + 2);

  logic       clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic [4:0] di = '0;
  logic [4:0] dout;
  logic       valid, in_ready, block_done;
  logic [4:0] iteration;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ code model
  function automatic int mulc(int d);
    int m [4] = '{1, 77, 181, 333};
    return m[d];
  endfunction
  function automatic int addc(int d);
    int a [4] = '{0, 13, 101, 211};
    return a[d];
  endfunction
  function automatic int nat(int d, int col, int row);
    return (mulc(d) * (4 * row + col) + addc(d)) % N;
  endfunction

  bit info  [2][N];
  bit par   [2][4][R];
  logic [4:0] rx [2][2*N];
  int raw_err [2];

  function automatic logic [4:0] to_sm(int v);
    if (v > 15) v = 15;
    if (v < -15) v = -15;
    return (v < 0) ? {1'b1, 4'(-v)} : {1'b0, 4'(v)};
  endfunction

  task automatic make_block(int b);
    int v, s;
    bit x;
    for (int n = 0; n < N; n++) info[b][n] = 1'($urandom_range(0, 1));
    for (int d = 0; d < 4; d++) begin
      x = 0;
      for (int i = 0; i < R; i++) begin
        for (int j = 0; j < 4; j++) x ^= info[b][nat(d, j, i)];
        par[b][d][i] = x;
      end
    end
    raw_err[b] = 0;
    for (int k = 0; k < 2 * N; k++) begin
      bit bitv;
      bitv = (k < N) ? info[b][k] : par[b][(k - N) / R][(k - N) % R];
      s = bitv ? -1 : 1;
      v = s * 4 + $urandom_range(0, 8) - 4;
      if ($urandom_range(0, 99) < 3) v = -s * 2;      // hard error
      if ((v < 0) != bitv || v == 0) raw_err[b]++;
      rx[b][k] = to_sm(v);
    end
  endtask

  // ------------------------------------------------ monitors
  int n_out = 0, dec_err = 0, out_block = 0;
  int ev_stall = 0, ev_skip_out = 0, ev_upd0 = 0, ev_upd1 = 0, ev_dual = 0, ev_clip = 0, ev_wrap = 0;
  int t_hf = -1, t_end = -1, t_prev_end = -1;
  logic [4:0] prev_iter = '0;
  bit first_block_running = 1'b1;

  always @(posedge clk) if (!reset) begin
    if (valid) begin
      if (out_block >= 0 && n_out < N) begin
        if (dout[4] != info[out_block][n_out]) dec_err++;
      end
      n_out++;
    end
    if (dut.u_ctrl.state == dut.u_ctrl.S_HF && dut.u_ctrl.a_start) begin
      if (dut.u_ctrl.upd) ev_upd1++; else ev_upd0++;
    end
    if (in_ready && !en) ev_stall++;
    if (dut.u_eng_a.busy && dut.u_eng_b.busy) ev_dual++;
    if (dut.u_eng_a.clip_event || dut.u_eng_b.clip_event) ev_clip++;
    if (prev_iter == 5'(N_ITER) && iteration == 5'd1) ev_wrap++;
    if (prev_iter != 5'd2 && iteration == 5'd2) t_hf = cycle;
    if (block_done) begin
      t_prev_end = t_end;
      t_end = cycle;
    end
    prev_iter <= iteration;
  end

  // gaps: leave en low on about a quarter of the cycles the decoder waits
  task automatic send_block(int b, bit gaps);
    int k;
    k = 0;
    while (k < 2 * N) begin
      @(negedge clk);
      if (in_ready && gaps && $urandom_range(0, 3) == 0) en = 1'b0;
      else if (in_ready) begin
        en = 1'b1;
        di = rx[b][k];
        k++;
      end else en = 1'b0;
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    make_block(0);
    make_block(1);
    repeat (4) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // block 0: there is no previous block, so no output may appear
    send_block(0, 1);
    checks++;
    if (n_out != 0) begin failures++; $display("output after reset: %0d values", n_out); end
    else ev_skip_out++;
    @(posedge block_done);
    repeat (2) @(posedge clk);
    checks++;
    if (t_end - t_hf != DECODE) begin
      failures++;
      $display("decoding took %0d cycles, expected %0d", t_end - t_hf, DECODE);
    end

    // block 1 in, block 0 out
    out_block = 0;
    send_block(1, 0);
    checks++;
    if (n_out != N) begin failures++; $display("block 0: %0d outputs", n_out); end
    checks++;
    if (dec_err != 0) begin failures++; $display("block 0: %0d decoding errors (raw %0d)", dec_err, raw_err[0]); end
    $display("block 0: raw channel errors %0d, decoded errors %0d", raw_err[0], dec_err);
    @(posedge block_done);
    repeat (2) @(posedge clk);
    checks++;
    if (t_end - t_prev_end != PERIOD) begin
      failures++;
      $display("block period %0d cycles, expected %0d", t_end - t_prev_end, PERIOD);
    end
    $display("block period %0d cycles", t_end - t_prev_end);
    n_out = 0;
    dec_err = 0;
    out_block = 1;
    wait (in_ready);
    @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("block 1: %0d outputs", n_out); end
    checks++;
    if (dec_err != 0) begin failures++; $display("block 1: %0d decoding errors (raw %0d)", dec_err, raw_err[1]); end
    $display("block 1: raw channel errors %0d, decoded errors %0d", raw_err[1], dec_err);
    checks++;
    if (raw_err[0] == 0 || raw_err[1] == 0) begin failures++; $display("no channel errors to correct"); end

    checks++; if (ev_stall == 0)    begin failures++; $display("input never stalled"); end
    $display("events: input_stall=%0d skip_out=%0d upd_skipped=%0d upd_used=%0d dual_port_cycles=%0d clip=%0d wrap=%0d",
             ev_stall, ev_skip_out, ev_upd0, ev_upd1, ev_dual, ev_clip, ev_wrap);
    checks++; if (ev_skip_out == 0) begin failures++; $display("output skip never happened"); end
    checks++; if (ev_upd0 == 0)     begin failures++; $display("updating step never skipped"); end
    checks++; if (ev_upd1 == 0)     begin failures++; $display("updating step never used"); end
    checks++; if (ev_dual == 0)     begin failures++; $display("ports never busy together"); end
    checks++; if (ev_clip == 0)     begin failures++; $display("clipping never happened"); end
    checks++; if (ev_wrap == 0)     begin failures++; $display("iteration never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
