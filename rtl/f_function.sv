// f_function: the combinational f-function of the look-up section.
//
// Combines two sign-magnitude log-domain values the way a parity check does:
// the result sign is the XOR of the operand signs and the magnitude is the
// smaller operand magnitude (min-sum form). The decoder names this operation
// and computes it with logic rather than with the ROM; the min-sum form is
// this design's choice. +15 is its neutral element. A zero magnitude gives +0.
// Purely combinational, no clock.
module f_function
  import ldpc_pkg::*;
(
  input  sm_t a,
  input  sm_t b,
  output sm_t y
);

  logic [3:0] mag;

  always_comb begin
    mag = (a[3:0] < b[3:0]) ? a[3:0] : b[3:0];
    y   = (mag == 4'd0) ? SM_ZERO : {a[4] ^ b[4], mag};
  end

endmodule
