// header_decoder: route computation and wormhole route memory of one input
// virtual channel.
//
// When the flit at the head of the channel is a header, the decoder looks its
// destination up in the routing table and forms the output port and the
// output virtual channel. When that header is forwarded (`advance`), the route
// is remembered, and every following normal flit and the tail take the same
// route: this is wormhole routing, the whole packet follows its header. The
// tail's departure ends the packet and frees the decoder for the next header.
//
// Virtual channel choice (dateline scheme for a torus, this implementation's
// reading of "two virtual channels avoid deadlocks in a torus"): a packet
// enters the network on channel 0; it moves to channel 1 on a hop the table
// marks as crossing the wrap-around link, keeps its channel while it continues
// in the same ring (input port equals output port), and starts again on
// channel 0 when it turns into another ring. Packets to the local port use the
// single output-buffer channel 0. With N_VC = 1 the channel is always 0.
//
// Timing: combinational from the head flit to out_port/out_vc; the route
// registers update on the clock edge where `advance` is high.
module header_decoder #(
  parameter int N_NET   = 2,        // network ports; the local port is N_NET
  parameter int N_VC    = 2,
  parameter int IN_PORT = 0,        // port this channel belongs to
  parameter int IN_VC   = 0,        // virtual channel number of this channel
  localparam int PW     = $clog2(N_NET + 1),
  localparam int VCW    = (N_VC > 1) ? $clog2(N_VC) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         valid,      // channel not empty
  input  noc_pkg::flit_t               head,
  // routing table lookup
  output logic [noc_pkg::ADDR_W-1:0]   tbl_addr,
  input  logic [PW-1:0]                tbl_port,
  input  logic                         tbl_dateline,
  // decoded route of the head flit
  output logic                         is_head,
  output logic                         is_tail,
  output logic [PW-1:0]                out_port,
  output logic [VCW-1:0]               out_vc,
  input  logic                         advance     // head flit forwarded
);
  import noc_pkg::*;

  logic           active;
  logic [PW-1:0]  r_port;
  logic [VCW-1:0] r_vc;
  logic [PW-1:0]  new_port;
  logic [VCW-1:0] new_vc;

  assign tbl_addr = head_dest(head.data);
  assign is_head  = valid && (head.ftype == FT_HEAD);
  assign is_tail  = valid && (head.ftype == FT_TAIL);
  assign new_port = tbl_port;

  always_comb begin
    new_vc = '0;
    if (N_VC > 1 && int'(tbl_port) < N_NET) begin
      if (tbl_dateline)                     new_vc = VCW'(1);
      else if (int'(tbl_port) == IN_PORT)   new_vc = VCW'(IN_VC);
    end
  end

  assign out_port = active ? r_port : new_port;
  assign out_vc   = active ? r_vc   : new_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      r_port <= '0;
      r_vc   <= '0;
    end else if (advance) begin
      if (is_head) begin
        active <= 1'b1;
        r_port <= new_port;
        r_vc   <= new_vc;
      end else if (is_tail) begin
        active <= 1'b0;
      end
    end
  end

  a_advance_valid: assert property (@(posedge clk) disable iff (!rst_n) advance |-> valid);
  a_head_order:    assert property (@(posedge clk) disable iff (!rst_n) is_head |-> !active);
endmodule
