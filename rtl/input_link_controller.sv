// input_link_controller: receiving end of one router link (wr_req / wr_ack).
//
// The sender offers a flit with `wr_req` high, together with the flit and the
// virtual channel it travels on. The controller answers with `wr_ack`, one bit
// per virtual channel, high while that channel's buffer has room; a flit is
// transferred in a cycle where wr_req and wr_ack[wr_vc] are both high (the
// two-way handshake of the design, done once per flit). `wr_ack` depends only
// on buffer state, never on wr_req, so links never form combinational loops.
//
// The controller also checks the packet format per virtual channel: a header
// must open a packet, normal and tail flits must follow a header, and a tail
// closes the packet. A flit that breaks this rule (or carries the unused
// control code) is accepted but not written into the buffer, and `proto_err`
// pulses for one cycle. The framing check and the per-channel ack vector are
// choices of this implementation.
//
// Timing: combinational from request to `push`; the framing state updates on
// the clock edge of each transfer.
module input_link_controller #(
  parameter int N_VC = 2,
  localparam int VCW = (N_VC > 1) ? $clog2(N_VC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // link side
  input  logic             wr_req,
  input  logic [VCW-1:0]   wr_vc,
  input  noc_pkg::flit_t   wr_flit,
  output logic [N_VC-1:0]  wr_ack,
  // buffer side
  input  logic [N_VC-1:0]  buf_full,
  output logic             push,
  output logic [VCW-1:0]   push_vc,
  output noc_pkg::flit_t   push_flit,
  // status
  output logic             proto_err
);
  import noc_pkg::*;

  logic [N_VC-1:0] in_pkt;   // per channel: a header was seen, no tail yet
  logic            xfer, ok;

  assign wr_ack   = ~buf_full;
  assign xfer     = wr_req && wr_ack[wr_vc];

  always_comb begin
    unique case (wr_flit.ftype)
      FT_HEAD:          ok = !in_pkt[wr_vc];
      FT_BODY, FT_TAIL: ok = in_pkt[wr_vc];
      default:          ok = 1'b0;
    endcase
  end

  assign push      = xfer && ok;
  assign push_vc   = wr_vc;
  assign push_flit = wr_flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= '0;
      proto_err <= 1'b0;
    end else begin
      proto_err <= xfer && !ok;
      if (push) begin
        if (wr_flit.ftype == FT_HEAD)      in_pkt[wr_vc] <= 1'b1;
        else if (wr_flit.ftype == FT_TAIL) in_pkt[wr_vc] <= 1'b0;
      end
    end
  end

  // A sender must hold its offer until it is taken.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_req && !wr_ack[wr_vc]) |=> (wr_req && $stable(wr_vc) && $stable(wr_flit)));
endmodule
