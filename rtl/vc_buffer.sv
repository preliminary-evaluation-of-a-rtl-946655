// vc_buffer: input message buffer of one virtual channel.
//
// A first-in first-out queue of DEPTH flits. Under virtual cut-through a
// header is only sent when the whole message fits in the receiving buffer, so
// the buffer never overflows; DEPTH defaults to the message length, as in the
// evaluated configuration where every buffer holds exactly one message.
// The head flit is visible combinationally (head/empty); rd_en pops it at the
// clock edge and wr_en appends wr_flit at the same edge. Reading and writing
// in the same cycle is allowed, also when the queue is full.
// Reset (synchronous, active high) empties the queue.
module vc_buffer
  import hybrid_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  flit_t                    wr_flit,
  input  logic                     rd_en,
  output flit_t                    head,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int CW = $clog2(DEPTH + 1);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (int'(count) == DEPTH);
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) begin
        mem[wr_ptr] <= wr_flit;
        wr_ptr      <= incr(wr_ptr);
      end
      if (rd_en) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(wr_en) - CW'(rd_en);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);

endmodule
