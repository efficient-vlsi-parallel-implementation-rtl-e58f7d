// lut_rom: dual-port 4K x 5-bit look-up table ROM.
//
// The address is {opcode, operand 1, operand 2} (2+5+5 bits) and the word is
// a 5-bit sign-magnitude result, so each opcode owns a 1K region:
//   000..3FF f-function   sign(a)^sign(b), min(|a|,|b|)
//   400..7FF addition     a + b, saturated to +-15
//   800..BFF clipped add  a + b, clipped to +-CLIP (extrinsic clipping)
//   C00..FFF subtraction  a - b, saturated to +-15
// The region layout, word width and address format follow the decoder's
// description; the saturating integer arithmetic on the indices and the clip
// level CLIP are this design's choices. Reads are asynchronous (a
// combinational table); both ports are independent. Contents are computed at
// elaboration from the formulas above.
module lut_rom
  import ldpc_pkg::*;
#(
  parameter int CLIP = 7
) (
  input  rom_addr_t addr_a,
  input  rom_addr_t addr_b,
  output sm_t       q_a,
  output sm_t       q_b
);

  sm_t mem [4096];

  function automatic sm_t entry(int i);
    sm_t a, b;
    a = sm_t'((i >> 5) & 31);
    b = sm_t'(i & 31);
    case ((i >> 10) & 3)
      0:       return f_min(a, b);
      1:       return int_to_sm(sm_to_int(a) + sm_to_int(b), MAG_MAX);
      2:       return int_to_sm(sm_to_int(a) + sm_to_int(b), CLIP);
      default: return int_to_sm(sm_to_int(a) - sm_to_int(b), MAG_MAX);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = entry(i);
  end

  assign q_a = mem[addr_a];
  assign q_b = mem[addr_b];

endmodule
