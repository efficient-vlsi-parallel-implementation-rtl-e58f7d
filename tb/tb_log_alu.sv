// tb_log_alu: random test of the operation multiplexer. The ROM word is a
// random value driven by the testbench; the unit must present {op, a, b} as
// the ROM address and return the f-function result for opcode 00 and the
// ROM word for the other opcodes.
module tb_log_alu;
  import ldpc_pkg::*;
  lut_op_e   op;
  sm_t       a, b, rom_q, y;
  rom_addr_t rom_addr;
  int checks = 0, failures = 0;

  log_alu dut (.op, .a, .b, .rom_addr, .rom_q, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    logic [4:0] exp_y;
    for (int n = 0; n < 2000; n++) begin
      op    = lut_op_e'(2'(n % 4));
      a     = 5'($urandom);
      b     = 5'($urandom);
      rom_q = 5'($urandom);
      #1;
      m = (a[3:0] < b[3:0]) ? a[3:0] : b[3:0];
      if (n % 4 == 0) exp_y = (m == 0) ? 5'd0 : {a[4] ^ b[4], 4'(m)};
      else            exp_y = rom_q;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("op %0d a %b b %b rom %b: y %b expected %b", n % 4, a, b, rom_q, y, exp_y);
      end
      checks++;
      if (rom_addr !== {2'(n % 4), a, b}) begin
        failures++;
        if (failures < 10) $display("rom address %h", rom_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
