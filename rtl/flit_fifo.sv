// flit_fifo: the flip-flop flit buffer of one virtual channel, with bypass.
//
// A small circular buffer of DEPTH flit registers with write and read
// pointers. When the buffer is empty, the flit arriving this cycle is shown
// at the head at once, so it can be arbitrated for and cross the switch in
// the same cycle it arrives; if it is popped in that cycle it is never
// written. The buffer is built from flip-flops because it is shallow.
//
// Interface: push/din write a flit (the sender holds a credit for it, so a
// push into a full buffer is an error); head_valid/head show the oldest flit
// (or the arriving one when empty); pop removes it. count is the number of
// stored flits, before this cycle's push and pop. Timing: head is
// combinational from din when the buffer is empty; all state changes at the
// rising clock edge; active-low synchronous reset empties the buffer.
//
// Follows the document: flip-flop buffers, 5 entries per VC, input bypass.
// Own choice: the pointer-based organisation details.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        push,
  input  flit_t                       din,
  input  logic                        pop,
  output logic                        head_valid,
  output flit_t                       head,
  output logic [$clog2(DEPTH+1)-1:0]  count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t            mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic             empty, bypass, do_write, do_read;

  assign empty      = (count == 0);
  assign head_valid = !empty || push;
  assign head       = empty ? din : mem[rd_ptr];
  assign bypass     = empty && push && pop;
  assign do_write   = push && !bypass;
  assign do_read    = pop && !empty;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_write) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= incr(wr_ptr);
      end
      if (do_read) rd_ptr <= incr(rd_ptr);
      count <= count + $bits(count)'(do_write) - $bits(count)'(do_read);
    end
  end

  // A credit-based sender never overruns the buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && !pop && count == ($clog2(DEPTH+1))'(DEPTH)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && !head_valid));

endmodule
