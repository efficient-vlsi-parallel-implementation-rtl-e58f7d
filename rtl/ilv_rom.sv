// ilv_rom: dual-port 4K x 12-bit interleaver / deinterleaver ROM.
//
// The address is a bit position {dim, col, row} in the current dimension; the
// word is the position {dim-1, col', row'} where the previous dimension holds
// the same information bit (dimension 0 points back to dimension 3). Used
// forward when the updating step fetches the previous dimension's values, and
// as the deinterleaver at the output, where the dimension-0 entries map the
// natural bit order into the last dimension. Size, two ports and the meaning
// of address and data follow the decoder's description. The permutations are
// this design's own: dimension d holds bit n = (M_d*(4*row+col) + A_d) mod
// 1024 with (M_d, A_d) = (1,0), (77,13), (181,101), (333,211), computed at
// elaboration. Reads are synchronous: q is valid one clock after en.
module ilv_rom
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic a_en,
  input  pos_t a_addr,
  output pos_t a_q,
  input  logic b_en,
  input  pos_t b_addr,
  output pos_t b_q
);

  pos_t mem [4096];

  function automatic pos_t entry(int i);
    int d, col, row, pd;
    d   = (i >> 10) & 3;
    col = (i >> 8) & 3;
    row = i & 255;
    pd  = (d + 3) & 3;
    return pos_of_nat(pd, nat_of_pos(d, col, row));
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = entry(i);
  end

  always_ff @(posedge clk) begin
    if (a_en) a_q <= mem[a_addr];
    if (b_en) b_q <= mem[b_addr];
  end

endmodule
