// tb_port_engine: one port engine on RAM port A with the real RAM, look-up
// ROM and interleaver ROM. The testbench owns RAM port B: it fills the RAM
// with random words, keeps a model of the RAM, runs every command (input,
// horizontal forward with and without the updating step, vertical forward,
// vertical backward, horizontal backward, output, initialisation), applies
// each command's effect to the model with its own arithmetic and finally
// reads the whole RAM back. It also checks the output stream, in_ready and
// each command's length in cycles.
module tb_port_engine;
  import ldpc_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic start = 1'b0, upd = 1'b0, busy, done;
  cmd_e cmd = CMD_HF;
  logic [1:0] dim = '0;
  logic [7:0] first = '0, last = '0;
  logic ram_en, ram_we;
  ram_addr_t ram_addr;
  sm_t ram_wdata, ram_rdata;
  logic ilv_en;
  pos_t ilv_addr, ilv_q, ilv_qb;
  rom_addr_t rom_addr;
  sm_t rom_q, rom_qb;
  logic in_valid = 1'b0, in_ready, out_valid, clip_event;
  sm_t in_data = '0, out_data;
  // testbench RAM port
  logic tb_en = 1'b0, tb_we = 1'b0;
  logic [13:0] tb_addr = '0;
  logic [4:0] tb_wdata = '0, tb_rdata;

  port_engine dut (.*);

  dp_ram u_ram (
    .clk,
    .a_en (ram_en), .a_we (ram_we), .a_addr (ram_addr), .a_wdata (ram_wdata), .a_rdata (ram_rdata),
    .b_en (tb_en), .b_we (tb_we), .b_addr (tb_addr), .b_wdata (tb_wdata), .b_rdata (tb_rdata)
  );
  lut_rom u_lut (.addr_a (rom_addr), .addr_b ('0), .q_a (rom_q), .q_b (rom_qb));
  ilv_rom u_ilv (.clk, .a_en (ilv_en), .a_addr (ilv_addr), .a_q (ilv_q),
                 .b_en (1'b0), .b_addr ('0), .b_q (ilv_qb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ reference arithmetic
  function automatic int v(logic [4:0] x);
    return x[4] ? -int'(x[3:0]) : int'(x[3:0]);
  endfunction
  function automatic logic [4:0] enc(int x, int lim);
    if (x > lim) x = lim;
    if (x < -lim) x = -lim;
    return (x < 0) ? {1'b1, 4'(-x)} : {1'b0, 4'(x)};
  endfunction
  function automatic logic [4:0] fadd(logic [4:0] a, logic [4:0] b); return enc(v(a) + v(b), 15); endfunction
  function automatic logic [4:0] fsub(logic [4:0] a, logic [4:0] b); return enc(v(a) - v(b), 15); endfunction
  function automatic logic [4:0] fclip(logic [4:0] a);              return enc(v(a), 7); endfunction
  function automatic logic [4:0] ff(logic [4:0] a, logic [4:0] b);
    logic [3:0] m;
    m = (a[3:0] < b[3:0]) ? a[3:0] : b[3:0];
    return (m == 0) ? 5'd0 : {a[4] ^ b[4], m};
  endfunction

  function automatic int mulc(int d);
    int m [4] = '{1, 77, 181, 333};
    return m[d];
  endfunction
  function automatic int addc(int d);
    int a [4] = '{0, 13, 101, 211};
    return a[d];
  endfunction
  int where [4][1024];

  // address helpers: var 0 q, 1 q~, 2 misc (col 0 q^, 1 p, 2 a, 3 b), 3 u
  function automatic int ad(int d, int vr, int c, int r);
    return d * 4096 + vr * 1024 + c * 256 + r;
  endfunction
  // previous-dimension address of (d, c, r) with variable vr
  function automatic int prev_ad(int d, int c, int r, int vr);
    int pd, l;
    pd = (d + 3) % 4;
    l = where[pd][(mulc(d) * (4 * r + c) + addc(d)) % 1024];
    return ad(pd, vr, l % 4, l / 4);
  endfunction

  logic [4:0] m [16384];
  logic [4:0] outs [$];

  always @(posedge clk) if (out_valid) outs.push_back(out_data);

  int in_ready_err = 0;
  cmd_e cur_cmd = CMD_HF;
  always @(posedge clk) if (!reset && in_ready != (busy && cur_cmd == CMD_IN)) in_ready_err++;

  task automatic run(cmd_e c, int d, int f, int l, bit u, int exp_cycles);
    int n;
    @(negedge clk);
    cmd = c; dim = 2'(d); first = 8'(f); last = 8'(l); upd = u; start = 1'b1;
    cur_cmd = c;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (!done) begin
      if (c == CMD_IN) begin
        in_valid = 1'($urandom_range(0, 3) != 0);
        in_data  = 5'($urandom);
      end
      @(negedge clk);
      n++;
    end
    in_valid = 1'b0;
    @(negedge clk);
    if (exp_cycles > 0) begin
      checks++;
      if (n != exp_cycles) begin
        failures++;
        $display("command %s took %0d cycles, expected %0d", c.name(), n, exp_cycles);
      end
    end
  endtask

  // record the stream written by CMD_IN into the model
  int kin = 0;
  always @(posedge clk) if (in_valid && in_ready) begin
    if (kin < 1024) m[ad(0, 0, kin % 4, kin / 4)] <= in_data;
    else m[ad((kin - 1024) / 256, 2, 1, (kin - 1024) % 256)] <= in_data;
    kin <= kin + 1;
  end

  initial begin
    logic [4:0] acc, e, bacc, a_prev, b_cur, q;
    int l;
    for (int d = 0; d < 4; d++)
      for (int x = 0; x < 1024; x++) where[d][(mulc(d) * x + addc(d)) % 1024] = x;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // fill the RAM
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      tb_en = 1; tb_we = 1; tb_addr = 14'(i); tb_wdata = 5'($urandom);
      m[i] = tb_wdata;
    end
    @(negedge clk);
    tb_en = 0; tb_we = 0;

    // input
    run(CMD_IN, 0, 0, 0, 0, 0);
    checks++;
    if (kin != 2048) begin failures++; $display("input took %0d values", kin); end

    // horizontal forward without updating step, dimension 0, rows 3..6
    run(CMD_HF, 0, 3, 6, 0, 4 * 9);
    for (int r = 3; r <= 6; r++) begin
      for (int c = 0; c < 4; c++) begin
        q = m[ad(0, 0, c, r)];
        acc = (c == 0) ? q : ff(acc, q);
        m[ad(0, 1, c, r)] = acc;
      end
      m[ad(0, 2, 0, r)] = acc;
    end

    // horizontal forward with updating step: dimension 1 rows 0..2 and
    // dimension 0 rows 250..255 (which reads dimension 3)
    for (int t = 0; t < 2; t++) begin
      int d, f, la;
      d = (t == 0) ? 1 : 0; f = (t == 0) ? 0 : 250; la = (t == 0) ? 2 : 255;
      run(CMD_HF, d, f, la, 1, 1 + 21 * (la - f + 1));
      for (int r = f; r <= la; r++) begin
        for (int c = 0; c < 4; c++) begin
          q = fsub(fadd(m[prev_ad(d, c, r, 0)], m[prev_ad(d, c, r, 3)]), m[ad(d, 3, c, r)]);
          m[ad(d, 0, c, r)] = q;
          acc = (c == 0) ? q : ff(acc, q);
          m[ad(d, 1, c, r)] = acc;
        end
        m[ad(d, 2, 0, r)] = acc;
      end
    end

    // vertical forward and backward, dimension 2
    run(CMD_VF, 2, 0, 255, 1, 3 * 256);
    acc = 5'b01111;
    for (int r = 0; r < 256; r++) begin
      acc = fadd(m[ad(2, 2, 1, r)], ff(acc, m[ad(2, 2, 0, r)]));
      m[ad(2, 2, 2, r)] = acc;
    end
    run(CMD_VB, 2, 255, 0, 1, 1 + 3 * 255);
    b_cur = 5'd0;
    m[ad(2, 2, 3, 255)] = b_cur;
    for (int r = 255; r > 0; r--) begin
      b_cur = ff(m[ad(2, 2, 0, r)], fadd(m[ad(2, 2, 1, r)], b_cur));
      m[ad(2, 2, 3, r - 1)] = b_cur;
    end

    // horizontal backward with extrinsic calculation, dimension 2
    for (int t = 0; t < 2; t++) begin
      int f, la;
      f = (t == 0) ? 0 : 200; la = (t == 0) ? 4 : 203;
      run(CMD_HB, 2, f, la, 1, 14 * (la - f + 1));
      for (int r = f; r <= la; r++) begin
        a_prev = (r == 0) ? 5'b01111 : m[ad(2, 2, 2, r - 1)];
        e = ff(a_prev, fadd(m[ad(2, 2, 1, r)], m[ad(2, 2, 3, r)]));
        bacc = 5'b01111;
        for (int c = 3; c >= 0; c--) begin
          acc = (c > 0) ? m[ad(2, 1, c - 1, r)] : 5'b01111;
          m[ad(2, 3, c, r)] = fclip(ff(e, ff(acc, bacc)));
          bacc = ff(bacc, m[ad(2, 0, c, r)]);
        end
      end
    end

    // output of natural bits 0..15
    outs.delete();
    run(CMD_OUT, 0, 0, 3, 1, 1 + 3 * 16);
    checks++;
    if (outs.size() != 16) begin failures++; $display("%0d outputs", outs.size()); end
    else for (int n = 0; n < 16; n++) begin
      l = where[3][n];
      checks++;
      if (outs[n] !== fadd(m[ad(3, 0, l % 4, l / 4)], m[ad(3, 3, l % 4, l / 4)])) begin
        failures++;
        $display("output %0d: %b", n, outs[n]);
      end
    end

    // initialisation of rows 7..9
    run(CMD_INIT, 0, 7, 9, 1, 3 * 16);
    for (int r = 7; r <= 9; r++)
      for (int d = 0; d < 4; d++)
        for (int c = 0; c < 4; c++) m[ad(d, 3, c, r)] = 5'd0;

    // read the whole RAM back
    for (int i = 0; i <= 16384; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (tb_rdata !== m[i - 1]) begin
          failures++;
          if (failures < 20) $display("RAM %h: %b expected %b", i - 1, tb_rdata, m[i - 1]);
        end
      end
      tb_en = (i < 16384); tb_we = 0; tb_addr = 14'(i);
    end
    checks++;
    if (in_ready_err != 0) begin failures++; $display("in_ready wrong in %0d cycles", in_ready_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
