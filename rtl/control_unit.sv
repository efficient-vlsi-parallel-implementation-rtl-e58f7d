// control_unit: the decoder's single controller.
//
// One finite-state machine that does the work of the timing controller, the
// iteration controller and the dimension controllers. Its iteration part
// cycles through: set iteration = 1, output the previous block, input the
// next block, initialise the extrinsic information, then decode. Decoding
// runs iterations 2..N_ITER; each iteration walks dimensions 0..3, and each
// dimension runs three phases on the two RAM ports in parallel:
//   HF  port A rows 0..127, port B rows 128..255 (updating + horizontal
//       forward; the updating step is skipped in dimension 0 of iteration 2,
//       whose a-priori values are the received ones)
//   V   port A vertical backward rows 255..0, port B vertical forward 0..255
//   HB  port A rows 0..127, port B rows 128..255
// Output uses port B (all 1024 bits), input uses port A, initialisation
// splits the rows between the ports. After reset there is no decoded block,
// so the first output state is skipped.
//
// The state sequence, iteration count (16 including the input/output
// iteration) and port split follow the decoder's description. The
// start/done handshake with the engines and the skipped first output are
// this design's own. Each phase issues one start pulse to every engine it
// uses and moves on in the cycle after the last of them reports done.
module control_unit
  import ldpc_pkg::*;
#(
  parameter int N_ITER = 16
) (
  input  logic       clk,
  input  logic       reset,
  // port A engine
  output logic       a_start,
  output cmd_e       a_cmd,
  output logic [7:0] a_first,
  output logic [7:0] a_last,
  input  logic       a_done,
  // port B engine
  output logic       b_start,
  output cmd_e       b_cmd,
  output logic [7:0] b_first,
  output logic [7:0] b_last,
  input  logic       b_done,
  // shared command fields
  output logic [1:0] dim,
  output logic       upd,
  // status
  output logic [4:0] iteration,
  output logic       first_iter,
  output logic       last_iter,
  output logic       block_done
);

  typedef enum logic [3:0] {
    S_SETIT, S_OUTPUT, S_INPUT, S_INIT, S_HF, S_V, S_HB, S_DIMINC, S_ITINC
  } state_e;

  state_e state;
  logic   issued, a_wait, b_wait, have_block;

  logic uses_a, uses_b;
  always_comb begin
    uses_a = state inside {S_INPUT, S_INIT, S_HF, S_V, S_HB};
    uses_b = state inside {S_OUTPUT, S_INIT, S_HF, S_V, S_HB};
  end

  // commands for the current state
  always_comb begin
    a_cmd   = CMD_HF;
    b_cmd   = CMD_HF;
    a_first = 8'd0;
    a_last  = 8'(ROWS / 2 - 1);
    b_first = 8'(ROWS / 2);
    b_last  = 8'(ROWS - 1);
    unique case (state)
      S_OUTPUT: begin b_cmd = CMD_OUT; b_first = 8'd0; end
      S_INPUT:  a_cmd = CMD_IN;
      S_INIT:   begin a_cmd = CMD_INIT; b_cmd = CMD_INIT; end
      S_V: begin
        a_cmd   = CMD_VB;
        a_first = 8'(ROWS - 1);
        a_last  = 8'd0;
        b_cmd   = CMD_VF;
        b_first = 8'd0;
      end
      S_HB:     begin a_cmd = CMD_HB; b_cmd = CMD_HB; end
      default: ;
    endcase
  end

  assign a_start    = uses_a && !issued;
  assign b_start    = uses_b && !issued;
  assign upd        = !(iteration == 5'd2 && dim == 2'd0);
  assign first_iter = (iteration == 5'd1);
  assign last_iter  = (iteration == 5'(N_ITER));

  always_ff @(posedge clk) begin
    block_done <= 1'b0;
    if (reset) begin
      state      <= S_SETIT;
      issued     <= 1'b0;
      a_wait     <= 1'b0;
      b_wait     <= 1'b0;
      have_block <= 1'b0;
      iteration  <= 5'd1;
      dim        <= 2'd0;
    end else begin
      unique case (state)
        S_SETIT: begin
          iteration <= 5'd1;
          dim       <= 2'd0;
          state     <= have_block ? S_OUTPUT : S_INPUT;
        end
        S_DIMINC: begin
          if (dim == 2'(DIMS - 1)) state <= S_ITINC;
          else begin
            dim   <= dim + 2'd1;
            state <= S_HF;
          end
        end
        S_ITINC: begin
          dim <= 2'd0;
          if (iteration == 5'(N_ITER)) begin
            have_block <= 1'b1;
            block_done <= 1'b1;
            state      <= S_SETIT;
          end else begin
            iteration <= iteration + 5'd1;
            state     <= S_HF;
          end
        end
        default: begin
          if (!issued) begin
            issued <= 1'b1;
            a_wait <= uses_a;
            b_wait <= uses_b;
          end else begin
            if (a_done) a_wait <= 1'b0;
            if (b_done) b_wait <= 1'b0;
            if ((!a_wait || a_done) && (!b_wait || b_done)) begin
              issued <= 1'b0;
              unique case (state)
                S_OUTPUT: state <= S_INPUT;
                S_INPUT:  state <= S_INIT;
                S_INIT: begin
                  iteration <= 5'd2;
                  dim       <= 2'd0;
                  state     <= S_HF;
                end
                S_HF:     state <= S_V;
                S_V:      state <= S_HB;
                default:  state <= S_DIMINC;
              endcase
            end
          end
        end
      endcase
    end
  end

  a_done_expected : assert property (@(posedge clk) disable iff (reset)
    a_done |-> (issued && a_wait))
    else $error("control_unit: unexpected done from port A");
  b_done_expected : assert property (@(posedge clk) disable iff (reset)
    b_done |-> (issued && b_wait))
    else $error("control_unit: unexpected done from port B");

endmodule
