// tb_lut_rom: reads every word of the look-up ROM through both ports
// (port B walks the addresses in reverse) and compares it with the four
// operations computed from integers: f-function, saturating addition,
// clipped addition (clip level 7) and saturating subtraction.
module tb_lut_rom;
  import ldpc_pkg::*;
  rom_addr_t addr_a, addr_b;
  sm_t q_a, q_b;
  int checks = 0, failures = 0;

  lut_rom dut (.addr_a, .addr_b, .q_a, .q_b);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(int x);
    return (x >= 16) ? -(x - 16) : x;
  endfunction
  function automatic logic [4:0] enc(int v, int lim);
    if (v > lim) v = lim;
    if (v < -lim) v = -lim;
    return (v < 0) ? {1'b1, 4'(-v)} : {1'b0, 4'(v)};
  endfunction
  function automatic logic [4:0] ref_word(int addr);
    int op, a, b, m;
    op = addr / 1024;
    a  = (addr / 32) % 32;
    b  = addr % 32;
    case (op)
      0: begin
        m = ((a % 16) < (b % 16)) ? a % 16 : b % 16;
        return (m == 0) ? 5'd0 : {1'((a / 16) ^ (b / 16)), 4'(m)};
      end
      1: return enc(val(a) + val(b), 15);
      2: return enc(val(a) + val(b), 7);
      default: return enc(val(a) - val(b), 15);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) begin
      addr_a = rom_addr_t'(i);
      addr_b = rom_addr_t'(4095 - i);
      #1;
      checks++;
      if (q_a !== ref_word(i)) begin
        failures++;
        if (failures < 10) $display("A %h: %b expected %b", i, q_a, ref_word(i));
      end
      checks++;
      if (q_b !== ref_word(4095 - i)) begin
        failures++;
        if (failures < 10) $display("B %h: %b expected %b", 4095 - i, q_b, ref_word(4095 - i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
