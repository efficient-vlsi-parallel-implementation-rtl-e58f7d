// dp_ram: dual-port RAM holding the data of all four dimensions.
//
// 2^AW words of DW bits (16K x 5 by default: 4 dimensions x 4K words, address
// {dim, var, col, row}). Each port performs one access per clock: a write
// when en and we are high, otherwise a read when en is high, whose data
// appears on rdata after the clock edge (one-cycle latency, read-first).
// rdata holds its value when the port is idle. The two ports must not write
// the same word in the same cycle (checked by an assertion). Contents are
// not reset. Size and two ports follow the decoder's description; the
// read timing is this design's choice.
module dp_ram #(
  parameter int AW = 14,
  parameter int DW = 5
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

  a_no_write_collision : assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr))
    else $error("dp_ram: both ports write address %0h", a_addr);

endmodule
