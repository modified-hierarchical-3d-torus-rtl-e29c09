// flit_fifo: one virtual-channel buffer of DEPTH flits.
//
// A plain first-in first-out queue built as a register array with read and
// write pointers and an occupancy counter. The document sizes a channel
// buffer in flits (2 in its main runs, 20 in its buffer-size study) and moves
// a flit between buffers only when the receiving buffer has room; here
// `has_room` is taken from the registered count, so it does not depend on a
// pop in the same cycle. That makes the credit path to the neighbouring
// router free of combinational logic; a buffer that is read every cycle still
// accepts one flit per cycle because its count then stays below DEPTH.
//
// Interface: push/din write, pop/dout read the oldest flit (dout valid when
// `valid`), has_room = count < DEPTH. Timing: both take effect at the rising
// edge; dout is the head entry, available combinationally.
module flit_fifo
  import mh3dt_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t dout,
  output logic  valid,
  output logic  has_room
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [AW-1:0]      rd_q, wr_q;
  logic [AW:0]        cnt_q;

  assign valid    = (cnt_q != '0);
  assign has_room = (cnt_q < (AW+1)'(DEPTH));
  assign dout     = mem[rd_q];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> has_room);
  assert property (@(posedge clk) disable iff (!rst_n) pop  |-> valid);

endmodule
