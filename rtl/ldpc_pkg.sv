// ldpc_pkg: types, field layouts and shared arithmetic for the dual-port
// parallel PLR decoder.
//
// Every soft value in the decoder is a 5-bit sign-magnitude index in the
// logarithm (LLR) domain: bit 4 is the sign (1 = the bit is more likely a 1),
// bits 3:0 the magnitude 0..15. The sign bit alone is the hard decision.
//
// The address layouts follow the decoder's memory maps: a RAM address is
// {dim, var, col, row} = 2+2+2+8 bits, a look-up ROM address is
// {opcode, operand 1, operand 2} = 2+5+5 bits, and an interleaver ROM word is
// a position {dim, col, row} = 2+2+8 bits. The meaning of the var codes, the
// code block layout (4 dimensions of 256 rows x 4 columns) and the two
// operand order conventions follow the decoder's description; the
// interleaver coefficients and the clip level are this design's own choice.
package ldpc_pkg;

  localparam int SMW      = 5;   // width of a sign-magnitude soft value
  localparam int MAG_MAX  = 15;  // largest magnitude
  localparam int DIMS     = 4;   // component codes ("dimensions")
  localparam int ROWS     = 256; // rows per dimension
  localparam int COLS     = 4;   // columns (information bits) per row
  localparam int NBITS    = ROWS * COLS; // 1024 information bits per block

  typedef logic [SMW-1:0] sm_t;

  localparam sm_t SM_ZERO   = 5'b0_0000; // no information
  localparam sm_t SM_MAXPOS = 5'b0_1111; // certain 0, neutral element of f

  // Look-up operations, in the order of the look-up ROM's four regions.
  typedef enum logic [1:0] {
    OP_F    = 2'b00,  // f-function, 000..3FF
    OP_ADD  = 2'b01,  // addition, 400..7FF
    OP_CADD = 2'b10,  // clipped addition, 800..BFF
    OP_SUB  = 2'b11   // subtraction, C00..FFF
  } lut_op_e;

  // Look-up ROM address: opcode and two sign-magnitude operands.
  typedef struct packed {
    lut_op_e op;
    sm_t     a;
    sm_t     b;
  } rom_addr_t;

  // RAM variable field.
  typedef enum logic [1:0] {
    VAR_Q    = 2'b00, // q: a-priori values of the dimension's bits
    VAR_QT   = 2'b01, // q~: horizontal forward partial results
    VAR_MISC = 2'b10, // col field selects q^, p, a or b
    VAR_U    = 2'b11  // u: extrinsic information
  } var_e;

  // col field values inside VAR_MISC
  localparam logic [1:0] MISC_QH = 2'd0; // q^: check value of the whole row
  localparam logic [1:0] MISC_P  = 2'd1; // p: received parity of the row
  localparam logic [1:0] MISC_A  = 2'd2; // a: vertical forward result
  localparam logic [1:0] MISC_B  = 2'd3; // b: vertical backward result

  typedef struct packed {
    logic [1:0] dim;
    var_e       v;
    logic [1:0] col;
    logic [7:0] row;
  } ram_addr_t;

  // A bit position inside one dimension, also the interleaver ROM word.
  typedef struct packed {
    logic [1:0] dim;
    logic [1:0] col;
    logic [7:0] row;
  } pos_t;

  // Commands from the control unit to a port engine.
  typedef enum logic [2:0] {
    CMD_HF   = 3'd0, // updating + horizontal forward
    CMD_VF   = 3'd1, // vertical forward
    CMD_VB   = 3'd2, // vertical backward
    CMD_HB   = 3'd3, // horizontal backward merged with extrinsic calculation
    CMD_IN   = 3'd4, // input a received block
    CMD_OUT  = 3'd5, // output the decoded block
    CMD_INIT = 3'd6  // clear the extrinsic information
  } cmd_e;

  // ---------------------------------------------------------------- arithmetic
  function automatic int sm_to_int(sm_t x);
    return x[SMW-1] ? -int'(x[SMW-2:0]) : int'(x[SMW-2:0]);
  endfunction

  // Saturate to +-lim and encode; zero is always +0.
  function automatic sm_t int_to_sm(int v, int lim);
    int m;
    m = (v < 0) ? -v : v;
    if (m > lim) m = lim;
    if (v < 0 && m != 0) return {1'b1, 4'(m)};
    return {1'b0, 4'(m)};
  endfunction

  // f-function: sign product and smallest magnitude (min-sum check update).
  function automatic sm_t f_min(sm_t a, sm_t b);
    logic [3:0] m;
    m = (a[3:0] < b[3:0]) ? a[3:0] : b[3:0];
    if (m == 4'd0) return SM_ZERO;
    return {a[4] ^ b[4], m};
  endfunction

  // ---------------------------------------------------------------- interleaver
  // Dimension d holds, at position (col, row), information bit
  //   n = (ILV_MUL[d] * (4*row + col) + ILV_ADD[d]) mod 1024.
  // Dimension 0 is the natural order.
  function automatic int ilv_mul(int d);
    case (d)
      0: return 1;
      1: return 77;
      2: return 181;
      default: return 333;
    endcase
  endfunction

  function automatic int ilv_add(int d);
    case (d)
      0: return 0;
      1: return 13;
      2: return 101;
      default: return 211;
    endcase
  endfunction

  // Inverse of an odd number modulo 1024 by Newton iteration.
  function automatic int inv_mod1024(int a);
    int x;
    x = a;
    for (int k = 0; k < 4; k++) x = (x * (2 - a * x)) & 1023;
    return x;
  endfunction

  function automatic int nat_of_pos(int d, int col, int row);
    return (ilv_mul(d) * (4 * row + col) + ilv_add(d)) & 1023;
  endfunction

  // Position inside dimension d of information bit n, as {col, row}.
  function automatic pos_t pos_of_nat(int d, int n);
    int l;
    pos_t p;
    l = (inv_mod1024(ilv_mul(d)) * (n - ilv_add(d))) & 1023;
    p.dim = 2'(d);
    p.col = 2'(l & 3);
    p.row = 8'(l >> 2);
    return p;
  endfunction

endpackage
