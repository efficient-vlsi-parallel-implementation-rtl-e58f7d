// log_alu: one port's log-domain operation unit.
//
// Forms the look-up ROM address {opcode, a, b} and returns either the ROM
// word or, for opcode 00, the result of the combinational f-function: the
// opcode is the select of the output multiplexer, as the decoder describes.
// Purely combinational; the ROM itself is outside (rom_addr out, rom_q in).
module log_alu
  import ldpc_pkg::*;
(
  input  lut_op_e   op,
  input  sm_t       a,
  input  sm_t       b,
  output rom_addr_t rom_addr,
  input  sm_t       rom_q,
  output sm_t       y
);

  sm_t f_y;

  f_function u_f (
    .a (a),
    .b (b),
    .y (f_y)
  );

  assign rom_addr = '{op: op, a: a, b: b};
  assign y        = (op == OP_F) ? f_y : rom_q;

endmodule
