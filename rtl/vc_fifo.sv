// vc_fifo: one virtual-channel flit buffer of an ingress port.
//
// A circular buffer of DEPTH flits (8 by default, the VC buffer size of the
// evaluated configuration) with separate push and pop. The front flit is
// visible combinationally on front_o; a pop removes it at the clock edge.
// Pushing into a full buffer is a protocol error (credit flow control must
// prevent it) and is flagged by an assertion. Push and pop may happen in the
// same cycle. Reset empties the buffer; the storage itself is not reset.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_i,
  input  flit_t push_flit_i,
  input  logic  pop_i,
  output flit_t front_o,
  output logic  empty_o,
  output logic  full_o
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  assign empty_o = (count == 0);
  assign full_o  = (count == (PW+1)'(DEPTH));
  assign front_o = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_ptr] <= push_flit_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push_i) wr_ptr <= inc(wr_ptr);
      if (pop_i)  rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(push_i) - (PW+1)'(pop_i);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);
endmodule
