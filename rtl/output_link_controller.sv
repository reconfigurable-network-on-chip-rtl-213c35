// output_link_controller: sending end of one router link (rd_req / rd_ack).
//
// The receiver raises `rd_req[v]` while it can take a flit on virtual channel
// v. The controller picks one channel that both holds a flit and is requested,
// drives that flit with `rd_ack` high and the channel number on `rd_vc`, and
// pops it from its buffer in the same cycle: the flit is transferred whenever
// rd_ack is high. Channels are served round robin, so one blocked channel
// never holds back the other (the reason the design has two virtual channels).
// With one channel this is also the processor-side port of the output buffer:
// the processor raises rd_req when it wants to receive (blocking receive).
//
// Timing: rd_ack is combinational from rd_req and the buffer state; the
// round-robin pointer moves after each transfer. The round-robin choice among
// channels is this implementation's.
module output_link_controller #(
  parameter int N_VC = 2,
  localparam int VCW = (N_VC > 1) ? $clog2(N_VC) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // buffer side
  input  noc_pkg::flit_t [N_VC-1:0] buf_head,
  input  logic [N_VC-1:0]          buf_empty,
  output logic [N_VC-1:0]          pop,
  // link side
  input  logic [N_VC-1:0]          rd_req,
  output logic                     rd_ack,
  output logic [VCW-1:0]           rd_vc,
  output noc_pkg::flit_t           rd_flit
);
  logic [N_VC-1:0] cand;
  logic [VCW-1:0]  last;     // channel served most recently
  logic [VCW-1:0]  sel;

  assign cand = ~buf_empty & rd_req;

  // First candidate after `last`, in circular order.
  always_comb begin
    sel = '0;
    for (int k = N_VC; k >= 1; k--) begin
      if (cand[(int'(last) + k) % N_VC]) sel = VCW'((int'(last) + k) % N_VC);
    end
  end

  assign rd_ack  = |cand;
  assign rd_vc   = sel;
  assign rd_flit = buf_head[sel];
  assign pop     = rd_ack ? (N_VC'(1) << sel) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      last <= VCW'(N_VC - 1);
    else if (rd_ack) last <= sel;
  end
endmodule
