// vc_fifo: one virtual channel, a first-in first-out flit buffer.
//
// The virtual channels of the router's In FIFO and Out FIFO are each one of
// these. The oldest flit is always visible on `head` (show-ahead), so the
// header decoder and the output link controller can inspect it before it is
// removed. A push and a pop may happen in the same cycle, also when the FIFO
// is full (the pop frees the slot the push uses). DEPTH is the buffer size the
// designer trades between area and speed; its default of 4 flits is this
// implementation's choice, the design leaves the size to the user.
//
// Timing: a flit pushed in cycle t is on `head` (and `empty` low) from t+1.
// Interface: push/din write, pop removes head; full, empty and count report
// the fill level. Pushing when full or popping when empty is an error,
// caught by assertions and otherwise ignored.
module vc_fifo #(
  parameter int DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  noc_pkg::flit_t       din,
  input  logic                 pop,
  output noc_pkg::flit_t       head,
  output logic                 full,
  output logic                 empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  noc_pkg::flit_t    mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
