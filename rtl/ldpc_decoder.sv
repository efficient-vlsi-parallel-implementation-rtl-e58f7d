// ldpc_decoder: parallel dual-port PLR decoder for a 1024-bit, rate-1/2
// LDPC code built from 4 dimensions of 256 rows x 4 columns.
//
// Structure: one control unit, two port engines (A and B), a dual-port
// 16K x 5 RAM, a dual-port 4K x 5 look-up ROM and a dual-port 4K x 12
// interleaver ROM. Engine A owns RAM port A and the A ports of both ROMs,
// engine B the B ports, so the two halves of every decoding step run at the
// same time without address conflicts.
//
// Interface (all synchronous to clk, reset active high):
//   en, di[4:0]  received soft values, one per clock with en high, accepted
//                while in_ready is high: 1024 information values in natural
//                order, then the 256 parities of dimension 0, 1, 2 and 3.
//   dout[4:0], valid  decoded soft values of the previous block in natural
//                order, one per clock with valid high; dout[4] is the decoded
//                bit. They appear in the output state at the start of the
//                next block's input/output iteration.
//   in_ready, iteration, block_done  status: accepting input, iteration
//                number (1 = input/output iteration), end of a block's
//                decoding.
// Soft values are 5-bit sign-magnitude (bit 4 = sign, 1 means bit value 1).
// The pin names clk, reset, en, di, valid and the block set follow the
// decoder's description; the output is named dout because do is a keyword;
// in_ready, iteration and block_done are added here.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int N_ITER = 16,
  parameter int CLIP   = 7
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       en,
  input  logic [4:0] di,
  output logic [4:0] dout,
  output logic       valid,
  output logic       in_ready,
  output logic [4:0] iteration,
  output logic       block_done
);

  // control
  logic       a_start, b_start, a_done, b_done, upd;
  cmd_e       a_cmd, b_cmd;
  logic [7:0] a_first, a_last, b_first, b_last;
  logic [1:0] dim;

  // memories
  logic      a_ram_en, a_ram_we, b_ram_en, b_ram_we;
  ram_addr_t a_ram_addr, b_ram_addr;
  sm_t       a_ram_wdata, b_ram_wdata, a_ram_rdata, b_ram_rdata;
  logic      a_ilv_en, b_ilv_en;
  pos_t      a_ilv_addr, b_ilv_addr, a_ilv_q, b_ilv_q;
  rom_addr_t a_rom_addr, b_rom_addr;
  sm_t       a_rom_q, b_rom_q;

  logic a_out_valid, b_out_valid;
  sm_t  a_out_data, b_out_data;

  control_unit #(.N_ITER(N_ITER)) u_ctrl (
    .clk, .reset,
    .a_start, .a_cmd, .a_first, .a_last, .a_done,
    .b_start, .b_cmd, .b_first, .b_last, .b_done,
    .dim, .upd,
    .iteration, .first_iter (), .last_iter (), .block_done
  );

  port_engine u_eng_a (
    .clk, .reset,
    .start (a_start), .cmd (a_cmd), .dim, .first (a_first), .last (a_last),
    .upd, .busy (), .done (a_done),
    .ram_en (a_ram_en), .ram_we (a_ram_we), .ram_addr (a_ram_addr),
    .ram_wdata (a_ram_wdata), .ram_rdata (a_ram_rdata),
    .ilv_en (a_ilv_en), .ilv_addr (a_ilv_addr), .ilv_q (a_ilv_q),
    .rom_addr (a_rom_addr), .rom_q (a_rom_q),
    .in_valid (en), .in_data (di), .in_ready (in_ready),
    .out_valid (a_out_valid), .out_data (a_out_data),
    .clip_event ()
  );

  port_engine u_eng_b (
    .clk, .reset,
    .start (b_start), .cmd (b_cmd), .dim, .first (b_first), .last (b_last),
    .upd, .busy (), .done (b_done),
    .ram_en (b_ram_en), .ram_we (b_ram_we), .ram_addr (b_ram_addr),
    .ram_wdata (b_ram_wdata), .ram_rdata (b_ram_rdata),
    .ilv_en (b_ilv_en), .ilv_addr (b_ilv_addr), .ilv_q (b_ilv_q),
    .rom_addr (b_rom_addr), .rom_q (b_rom_q),
    .in_valid (1'b0), .in_data (SM_ZERO), .in_ready (),
    .out_valid (b_out_valid), .out_data (b_out_data),
    .clip_event ()
  );

  dp_ram #(.AW(14), .DW(SMW)) u_ram (
    .clk,
    .a_en (a_ram_en), .a_we (a_ram_we), .a_addr (a_ram_addr),
    .a_wdata (a_ram_wdata), .a_rdata (a_ram_rdata),
    .b_en (b_ram_en), .b_we (b_ram_we), .b_addr (b_ram_addr),
    .b_wdata (b_ram_wdata), .b_rdata (b_ram_rdata)
  );

  lut_rom #(.CLIP(CLIP)) u_lut (
    .addr_a (a_rom_addr), .addr_b (b_rom_addr),
    .q_a (a_rom_q), .q_b (b_rom_q)
  );

  ilv_rom u_ilv (
    .clk,
    .a_en (a_ilv_en), .a_addr (a_ilv_addr), .a_q (a_ilv_q),
    .b_en (b_ilv_en), .b_addr (b_ilv_addr), .b_q (b_ilv_q)
  );

  // output multiplexer: either port may deliver decoded values
  assign valid = a_out_valid | b_out_valid;
  assign dout  = b_out_valid ? b_out_data : a_out_data;

endmodule
