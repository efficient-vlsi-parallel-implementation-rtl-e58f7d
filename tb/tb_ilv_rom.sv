// tb_ilv_rom: reads all 4096 interleaver ROM words through both ports and
// compares them with the permutation formula n = (M_d*(4*row+col) + A_d)
// mod 1024 re-derived here: the word at position (d, col, row) must be the
// position in dimension d-1 (3 for d = 0) that holds the same bit n. It also
// checks that every dimension's 1024 words form a permutation and that the
// data appears exactly one clock after the enable.
module tb_ilv_rom;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  logic a_en, b_en;
  pos_t a_addr, b_addr, a_q, b_q;
  int checks = 0, failures = 0;

  ilv_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mulc(int d);
    int m [4] = '{1, 77, 181, 333};
    return m[d];
  endfunction
  function automatic int addc(int d);
    int a [4] = '{0, 13, 101, 211};
    return a[d];
  endfunction
  function automatic int nat(int d, int l);
    return (mulc(d) * l + addc(d)) % 1024;
  endfunction

  int where [4][1024];  // where[d][n] = linear position 4*row+col of bit n
  bit seen [4][1024];

  function automatic logic [11:0] expect_word(int addr);
    int d, col, row, pd, l;
    d = addr / 1024; col = (addr / 256) % 4; row = addr % 256;
    pd = (d + 3) % 4;
    l = where[pd][nat(d, 4 * row + col)];
    return {2'(pd), 2'(l % 4), 8'(l / 4)};
  endfunction

  initial begin
    for (int d = 0; d < 4; d++)
      for (int l = 0; l < 1024; l++) where[d][nat(d, l)] = l;
    a_en = 0; b_en = 0; a_addr = '0; b_addr = '0;
    for (int i = 0; i <= 4096; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (a_q !== expect_word(i - 1)) begin
          failures++;
          if (failures < 10) $display("A %h: %h expected %h", i - 1, a_q, expect_word(i - 1));
        end
        checks++;
        if (b_q !== expect_word(4096 - i)) begin
          failures++;
          if (failures < 10) $display("B %h: %h expected %h", 4096 - i, b_q, expect_word(4096 - i));
        end
        if (seen[a_q.dim][{a_q.row, a_q.col}]) begin
          failures++;
          if (failures < 10) $display("position %h hit twice", a_q);
        end
        seen[a_q.dim][{a_q.row, a_q.col}] = 1'b1;
      end
      if (i < 4096) begin
        a_en = 1; a_addr = pos_t'(i);
        b_en = 1; b_addr = pos_t'(4095 - i);
      end
    end
    // enable low: outputs hold
    @(negedge clk);
    a_en = 0; a_addr = pos_t'(5);
    @(negedge clk);
    checks++;
    if (a_q !== expect_word(4095)) begin failures++; $display("output did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
