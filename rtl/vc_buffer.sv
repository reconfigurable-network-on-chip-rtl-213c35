// vc_buffer: a bank of N_VC virtual-channel FIFOs sharing one write port.
//
// This is the In FIFO and the Out FIFO of the router: one buffer per virtual
// channel ("N ... 1" channels), all written through a single link, so at most
// one flit enters per cycle, steered by `wr_vc`. Each channel is read on its
// own (`pop[v]`, `head[v]`), because the crossbar and the output link
// controller pick among channels independently. The number of channels and
// the depth of each follow the design (two virtual channels on router links,
// one where a single channel suffices); the depth default is a choice of this
// implementation.
//
// Timing: as vc_fifo; a flit written in cycle t is visible at t+1.
module vc_buffer #(
  parameter int N_VC  = 2,
  parameter int DEPTH = 4,
  localparam int VCW  = (N_VC > 1) ? $clog2(N_VC) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [VCW-1:0]        wr_vc,
  input  noc_pkg::flit_t        wr_flit,
  input  logic [N_VC-1:0]       pop,
  output noc_pkg::flit_t [N_VC-1:0] head,
  output logic [N_VC-1:0]       full,
  output logic [N_VC-1:0]       empty
);
  for (genvar v = 0; v < N_VC; v++) begin : g_vc
    logic [$clog2(DEPTH+1)-1:0] cnt;
    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (wr_en && (wr_vc == VCW'(v))),
      .din   (wr_flit),
      .pop   (pop[v]),
      .head  (head[v]),
      .full  (full[v]),
      .empty (empty[v]),
      .count (cnt)
    );
  end
endmodule
