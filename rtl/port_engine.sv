// port_engine: the datapath and step sequencer behind one RAM port.
//
// The decoder runs two of these, one on each port of the dual-port RAM, so
// that two halves of a dimension (or the two vertical recursions) are
// processed at the same time. Each engine owns one RAM port, one interleaver
// ROM port and one look-up ROM port (through its log_alu), plus three
// combinational f-function units and a few temporary registers that hold
// values used only inside one row.
//
// A command (start pulse with cmd, dim, first, last, upd) processes rows
// first..last of dimension dim; done pulses for one cycle when it ends and
// busy is high in between. With F the f-function, ADD/SUB the saturating
// look-ups and CADD the clipped addition, and for row i, column j:
//   CMD_HF   updating + horizontal forward, rows ascending. If upd:
//            q(j,i) = SUB(ADD(q'(P), u'(P)), u(j,i)) where P is the ROM's
//            position in the previous dimension (primed); then
//            q~(j,i) = F(q(i,0..j)) and q^(i) = F(q(i,0..3)).
//            5 cycles per column with upd, 2 without, +1 per row (+1 start).
//   CMD_VF   a(i) = ADD(p(i), F(a(i-1), q^(i))), a(-1) = +15; 3 cycles/row.
//   CMD_VB   rows descending, b(first) = 0,
//            b(i-1) = F(q^(i), ADD(p(i), b(i))); 3 cycles/row, +1.
//   CMD_HB   e = F(a(i-1), ADD(p(i), b(i))), then columns 3..0 backwards:
//            u(j,i) = CADD(F(e, F(q~(j-1,i), F(q(i,j+1..3)))), 0);
//            14 cycles per row.
//   CMD_IN   writes one in_data per cycle with in_valid and in_ready:
//            1024 information values to q of dimension 0, then 4 x 256
//            parity values to p.
//   CMD_OUT  natural bit n = 4*row+col: deinterleave through the dimension-0
//            ROM entry to dimension 3 and emit out_data = ADD(q, u) with
//            out_valid; 3 cycles per bit (+1 start).
//   CMD_INIT writes 0 to u of every dimension and column of rows first..last.
// The split into the four step categories, their order, which values are
// stored where and the use of the ROMs follow the decoder's description. The
// exact recursions (a zigzag-style parity chain through the rows), the
// cycle-level schedule and the command handshake are this design's own.
// RAM reads have one cycle latency; RAM and ROM port signals are
// combinational outputs of the current step.
module port_engine
  import ldpc_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  // command
  input  logic      start,
  input  cmd_e      cmd,
  input  logic [1:0] dim,
  input  logic [7:0] first,
  input  logic [7:0] last,
  input  logic      upd,
  output logic      busy,
  output logic      done,
  // RAM port
  output logic      ram_en,
  output logic      ram_we,
  output ram_addr_t ram_addr,
  output sm_t       ram_wdata,
  input  sm_t       ram_rdata,
  // interleaver ROM port
  output logic      ilv_en,
  output pos_t      ilv_addr,
  input  pos_t      ilv_q,
  // look-up ROM port
  output rom_addr_t rom_addr,
  input  sm_t       rom_q,
  // received data in, decoded data out
  input  logic      in_valid,
  input  sm_t       in_data,
  output logic      in_ready,
  output logic      out_valid,
  output sm_t       out_data,
  // monitor: a clipped addition changed its result
  output logic      clip_event
);

  // ---------------------------------------------------------------- state
  cmd_e       op_q;
  logic [1:0] dim_q;
  logic [7:0] row, row_end;
  logic [1:0] col;
  logic [1:0] dcnt;
  logic [10:0] kcnt;
  logic       upd_q;
  logic [3:0] ph;
  pos_t       p_q;
  sm_t        t, acc, e, bacc, areg;

  // ---------------------------------------------------------------- datapath
  // Two f-function units feed the ALU (pre1, pre2) and one takes the ALU
  // result (post), so no combinational path runs through the ALU twice.
  lut_op_e alu_op;
  sm_t     alu_a, alu_b, alu_y;
  sm_t     pre1_a, pre1_b, pre1_y, pre2_a, pre2_b, pre2_y, post_a, post_b, post_y;

  log_alu u_alu (
    .op       (alu_op),
    .a        (alu_a),
    .b        (alu_b),
    .rom_addr (rom_addr),
    .rom_q    (rom_q),
    .y        (alu_y)
  );

  f_function u_pre1 (.a(pre1_a), .b(pre1_b), .y(pre1_y));
  f_function u_pre2 (.a(pre2_a), .b(pre2_b), .y(pre2_y));
  f_function u_post (.a(post_a), .b(post_b), .y(post_y));

  function automatic ram_addr_t own(logic [1:0] d, var_e v, logic [1:0] c, logic [7:0] r);
    return '{dim: d, v: v, col: c, row: r};
  endfunction

  // Input stream address: 1024 information values, then parities.
  function automatic ram_addr_t in_addr(logic [10:0] k);
    if (!k[10]) return '{dim: 2'd0, v: VAR_Q, col: k[1:0], row: k[9:2]};
    return '{dim: k[9:8], v: VAR_MISC, col: MISC_P, row: k[7:0]};
  endfunction

  logic last_row;
  assign last_row = (row == row_end);

  // ---------------------------------------------------------------- f units
  always_comb begin
    pre1_a = SM_MAXPOS;
    pre1_b = SM_MAXPOS;
    if (busy) begin
      if (op_q == CMD_HF && ph == 4'd8) begin
        pre1_a = acc;
        pre1_b = ram_rdata;
      end else if (op_q == CMD_VF && ph == 4'd2) begin
        pre1_a = areg;
        pre1_b = t;
      end else if (op_q == CMD_HB && ph == 4'd4) begin
        pre1_a = ram_rdata;
        pre1_b = bacc;
      end else if (op_q == CMD_HB && ph == 4'd6) begin
        pre1_a = bacc;
        pre1_b = ram_rdata;
      end
    end
  end

  always_comb begin
    pre2_a = SM_MAXPOS;
    pre2_b = SM_MAXPOS;
    if (busy && op_q == CMD_HB) begin
      if (ph == 4'd4) begin
        pre2_a = e;
        pre2_b = pre1_y;
      end else if (ph == 4'd7) begin
        pre2_a = e;
        pre2_b = bacc;
      end
    end
  end

  // ---------------------------------------------------------------- ALU
  always_comb begin
    alu_op = OP_F;
    alu_a  = SM_ZERO;
    alu_b  = SM_ZERO;
    if (busy) begin
      unique case (op_q)
        CMD_HF: begin
          if (ph == 4'd3) begin
            alu_op = OP_ADD;
            alu_a  = t;
            alu_b  = ram_rdata;
          end else if (ph == 4'd4) begin
            alu_op = OP_SUB;
            alu_a  = t;
            alu_b  = ram_rdata;
          end
        end
        CMD_VF: if (ph == 4'd2) begin
          alu_op = OP_ADD;
          alu_a  = ram_rdata;
          alu_b  = pre1_y;
        end
        CMD_VB: if (ph == 4'd3) begin
          alu_op = OP_ADD;
          alu_a  = ram_rdata;
          alu_b  = areg;
        end
        CMD_HB: begin
          if (ph == 4'd3) begin
            alu_op = OP_ADD;
            alu_a  = ram_rdata;
            alu_b  = t;
          end else if (ph == 4'd4 || ph == 4'd7) begin
            alu_op = OP_CADD;
            alu_a  = pre2_y;
            alu_b  = SM_ZERO;
          end
        end
        CMD_OUT: if (ph == 4'd3) begin
          alu_op = OP_ADD;
          alu_a  = t;
          alu_b  = ram_rdata;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    post_a = SM_MAXPOS;
    post_b = SM_MAXPOS;
    if (busy) begin
      if (op_q == CMD_HF && ph == 4'd4) begin
        post_a = acc;
        post_b = alu_y;
      end else if (op_q == CMD_VB && ph == 4'd3) begin
        post_a = t;
        post_b = alu_y;
      end else if (op_q == CMD_HB && ph == 4'd3) begin
        post_a = areg;
        post_b = alu_y;
      end
    end
  end

  // ---------------------------------------------------------------- memory ports
  always_comb begin
    ram_en    = 1'b0;
    ram_we    = 1'b0;
    ram_addr  = '0;
    ram_wdata = SM_ZERO;
    ilv_en    = 1'b0;
    ilv_addr  = '0;
    if (busy) begin
      unique case (op_q)
        CMD_HF: unique case (ph)
          4'd0: begin
            ilv_en   = 1'b1;
            ilv_addr = '{dim: dim_q, col: col, row: row};
          end
          4'd1: begin
            ram_en   = 1'b1;
            ram_addr = own(ilv_q.dim, VAR_Q, ilv_q.col, ilv_q.row);
          end
          4'd2: begin
            ram_en   = 1'b1;
            ram_addr = own(p_q.dim, VAR_U, p_q.col, p_q.row);
          end
          4'd3: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_U, col, row);
          end
          4'd4: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_Q, col, row);
            ram_wdata = alu_y;
          end
          4'd5: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_QT, col, row);
            ram_wdata = acc;
            if (col != 2'd3) begin
              ilv_en   = 1'b1;
              ilv_addr = '{dim: dim_q, col: col + 2'd1, row: row};
            end
          end
          4'd6: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_MISC, MISC_QH, row);
            ram_wdata = acc;
            if (upd_q && !last_row) begin
              ilv_en   = 1'b1;
              ilv_addr = '{dim: dim_q, col: 2'd0, row: row + 8'd1};
            end
          end
          4'd7: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_Q, col, row);
          end
          default: begin // 8: accumulate the value read in step 7
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_QT, col, row);
            ram_wdata = (col == 2'd0) ? ram_rdata : pre1_y;
          end
        endcase

        CMD_VF: unique case (ph)
          4'd0: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_QH, row);
          end
          4'd1: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_P, row);
          end
          default: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_MISC, MISC_A, row);
            ram_wdata = alu_y;
          end
        endcase

        CMD_VB: unique case (ph)
          4'd0: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_MISC, MISC_B, row);
            ram_wdata = areg;
          end
          4'd1: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_QH, row);
          end
          4'd2: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_P, row);
          end
          default: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_MISC, MISC_B, row - 8'd1);
            ram_wdata = post_y;
          end
        endcase

        CMD_HB: unique case (ph)
          4'd0: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_A, row - 8'd1);
          end
          4'd1: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_B, row);
          end
          4'd2: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_MISC, MISC_P, row);
          end
          4'd3: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_QT, 2'd2, row);
          end
          4'd4: begin
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_U, col, row);
            ram_wdata = alu_y;
          end
          4'd5: begin
            ram_en   = 1'b1;
            ram_addr = own(dim_q, VAR_Q, col, row);
          end
          4'd6: begin
            if (col != 2'd1) begin
              ram_en   = 1'b1;
              ram_addr = own(dim_q, VAR_QT, col - 2'd2, row);
            end
          end
          default: begin // 7: column 0
            ram_en    = 1'b1;
            ram_we    = 1'b1;
            ram_addr  = own(dim_q, VAR_U, 2'd0, row);
            ram_wdata = alu_y;
          end
        endcase

        CMD_IN: begin
          ram_en    = in_valid;
          ram_we    = in_valid;
          ram_addr  = in_addr(kcnt);
          ram_wdata = in_data;
        end

        CMD_OUT: unique case (ph)
          4'd0: begin
            ilv_en   = 1'b1;
            ilv_addr = '{dim: 2'd0, col: col, row: row};
          end
          4'd1: begin
            ram_en   = 1'b1;
            ram_addr = own(ilv_q.dim, VAR_Q, ilv_q.col, ilv_q.row);
          end
          4'd2: begin
            ram_en   = 1'b1;
            ram_addr = own(p_q.dim, VAR_U, p_q.col, p_q.row);
          end
          default: begin
            if (!(col == 2'd3 && last_row)) begin
              ilv_en   = 1'b1;
              ilv_addr = (col == 2'd3) ? '{dim: 2'd0, col: 2'd0, row: row + 8'd1}
                                       : '{dim: 2'd0, col: col + 2'd1, row: row};
            end
          end
        endcase

        default: begin // CMD_INIT
          ram_en    = 1'b1;
          ram_we    = 1'b1;
          ram_addr  = own(dcnt, VAR_U, col, row);
          ram_wdata = SM_ZERO;
        end
      endcase
    end
  end

  assign in_ready = busy && (op_q == CMD_IN);

  a_start_when_idle : assert property (@(posedge clk) disable iff (reset)
    start |-> !busy)
    else $error("port_engine: start while busy");

  assign clip_event = busy && (alu_op == OP_CADD) &&
                      (alu_y != int_to_sm(sm_to_int(alu_a) + sm_to_int(alu_b), MAG_MAX));

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    done      <= 1'b0;
    out_valid <= 1'b0;
    if (reset) begin
      busy <= 1'b0;
      ph   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        op_q    <= cmd;
        dim_q   <= dim;
        row     <= first;
        row_end <= last;
        upd_q   <= upd;
        col     <= (cmd == CMD_HB) ? 2'd3 : 2'd0;
        dcnt    <= 2'd0;
        kcnt    <= '0;
        areg    <= (cmd == CMD_VB) ? SM_ZERO : SM_MAXPOS;
        ph      <= (cmd == CMD_HF && !upd) ? 4'd7 : 4'd0;
      end
    end else begin
      unique case (op_q)
        CMD_HF: unique case (ph)
          4'd0: ph <= 4'd1;
          4'd1: begin p_q <= ilv_q; ph <= 4'd2; end
          4'd2: begin t <= ram_rdata; ph <= 4'd3; end
          4'd3: begin t <= alu_y; ph <= 4'd4; end
          4'd4: begin
            acc <= (col == 2'd0) ? alu_y : post_y;
            ph  <= 4'd5;
          end
          4'd5: begin
            if (col != 2'd3) begin
              col <= col + 2'd1;
              ph  <= 4'd1;
            end else ph <= 4'd6;
          end
          4'd6: begin
            col <= 2'd0;
            if (last_row) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              row <= row + 8'd1;
              ph  <= upd_q ? 4'd1 : 4'd7;
            end
          end
          4'd7: ph <= 4'd8;
          default: begin
            acc <= (col == 2'd0) ? ram_rdata : pre1_y;
            if (col != 2'd3) begin
              col <= col + 2'd1;
              ph  <= 4'd7;
            end else ph <= 4'd6;
          end
        endcase

        CMD_VF: unique case (ph)
          4'd0: ph <= 4'd1;
          4'd1: begin t <= ram_rdata; ph <= 4'd2; end
          default: begin
            areg <= alu_y;
            ph   <= 4'd0;
            if (last_row) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else row <= row + 8'd1;
          end
        endcase

        CMD_VB: unique case (ph)
          4'd0: begin
            if (last_row) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else ph <= 4'd1;
          end
          4'd1: ph <= 4'd2;
          4'd2: begin t <= ram_rdata; ph <= 4'd3; end
          default: begin
            areg <= post_y;
            row  <= row - 8'd1;
            if (row - 8'd1 == row_end) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else ph <= 4'd1;
          end
        endcase

        CMD_HB: unique case (ph)
          4'd0: ph <= 4'd1;
          4'd1: begin
            areg <= (row == 8'd0) ? SM_MAXPOS : ram_rdata;
            ph   <= 4'd2;
          end
          4'd2: begin t <= ram_rdata; ph <= 4'd3; end
          4'd3: begin
            e    <= post_y;
            bacc <= SM_MAXPOS;
            col  <= 2'd3;
            ph   <= 4'd4;
          end
          4'd4: ph <= 4'd5;
          4'd5: ph <= 4'd6;
          4'd6: begin
            bacc <= pre1_y;
            col  <= col - 2'd1;
            ph   <= (col != 2'd1) ? 4'd4 : 4'd7;
          end
          default: begin
            ph <= 4'd0;
            if (last_row) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else row <= row + 8'd1;
          end
        endcase

        CMD_IN: begin
          if (in_valid) begin
            kcnt <= kcnt + 11'd1;
            if (kcnt == 11'(2 * NBITS - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end

        CMD_OUT: unique case (ph)
          4'd0: ph <= 4'd1;
          4'd1: begin p_q <= ilv_q; ph <= 4'd2; end
          4'd2: begin t <= ram_rdata; ph <= 4'd3; end
          default: begin
            out_valid <= 1'b1;
            out_data  <= alu_y;
            if (col == 2'd3 && last_row) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              ph  <= 4'd1;
              col <= col + 2'd1;
              if (col == 2'd3) row <= row + 8'd1;
            end
          end
        endcase

        default: begin // CMD_INIT
          col <= col + 2'd1;
          if (col == 2'd3) begin
            dcnt <= dcnt + 2'd1;
            if (dcnt == 2'd3) begin
              if (last_row) begin
                busy <= 1'b0;
                done <= 1'b1;
              end else row <= row + 8'd1;
            end
          end
        end
      endcase
    end
  end

endmodule
