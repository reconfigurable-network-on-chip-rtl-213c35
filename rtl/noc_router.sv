// noc_router: wormhole router with lookup-table routing and virtual channels.
//
// The router has N_NET network ports (links to neighbouring routers) and one
// local port for its processor, numbered N_NET. With the defaults (N_NET = 2,
// N_VC = 2) it is the 2D router: three input and three output interfaces,
// data flowing in two directions (X and Y rings of a torus), two virtual
// channels on every router link. With N_NET = 1 and N_VC = 1 the same module
// is the 1D router, with a reduced interface and a single channel.
//
// Datapath, in the order a flit passes through it:
//   input link controller -> In FIFO (one vc_fifo per virtual channel)
//   -> header decoder (route from the routing table, held for the packet)
//   -> arbiter per output port -> crossbar
//   -> Out FIFO (one vc_fifo per virtual channel; for the local port a single
//      output buffer of OUT_BUF_DEPTH flits that decouples the network from
//      the processor's blocking receive) -> output link controller.
//
// Each input virtual channel (and the single local input channel) is an
// input of the crossbar. A packet claims an output virtual channel when its
// header passes and releases it when its tail passes, so flits of different
// packets never interleave in one channel. A flit moves only when its target
// output buffer has room; nothing is ever dropped inside the router. Inputs
// from routers have priority over the processor input, round robin inside
// each class. Flits of one channel that cross the router take one cycle per
// stage: written into the In FIFO at the link transfer, through the crossbar
// the next cycle at the earliest, out over the link the cycle after.
//
// Link protocol (both ends of every port): the sender drives rd_ack with a
// flit and its channel number; the receiver drives wr_ack, one bit per
// channel, high while that channel can take a flit. A flit is transferred in
// a cycle where both are high. Wire a router's out_rd_ack/out_rd_flit/
// out_rd_vc to the neighbour's in_wr_req/in_wr_flit/in_wr_vc and the
// neighbour's in_wr_ack to out_rd_req. Local ports use channel 0 only; their
// other ack bits are always low.
//
// Buffer depths default to this implementation's choice; the design lets the
// user set them to trade area for speed.
module noc_router #(
  parameter int N_NET         = 2,
  parameter int N_VC          = 2,
  parameter int BUF_DEPTH     = 4,
  parameter int OUT_BUF_DEPTH = 8,
  localparam int P       = N_NET + 1,
  localparam int PW      = $clog2(P),
  localparam int EW      = PW + 1,
  localparam int VCW     = (N_VC > 1) ? $clog2(N_VC) : 1,
  localparam int ENTRIES = 1 << noc_pkg::ADDR_W,
  parameter logic [ENTRIES*EW-1:0] RT_INIT = {ENTRIES{1'b0, PW'(N_NET)}}
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // input interfaces (the local input ignores in_wr_vc: it has one channel)
  input  logic [P-1:0]                in_wr_req,
  input  logic [P-1:0][VCW-1:0]       in_wr_vc,
  input  noc_pkg::flit_t [P-1:0]      in_wr_flit,
  output logic [P-1:0][N_VC-1:0]      in_wr_ack,
  // output interfaces
  input  logic [P-1:0][N_VC-1:0]      out_rd_req,
  output logic [P-1:0]                out_rd_ack,
  output logic [P-1:0][VCW-1:0]       out_rd_vc,
  output noc_pkg::flit_t [P-1:0]      out_rd_flit,
  // routing table reconfiguration
  input  logic                        rt_we,
  input  logic [noc_pkg::ADDR_W-1:0]  rt_addr,
  input  logic [PW-1:0]               rt_port,
  input  logic                        rt_dateline,
  // status: packet-format violation seen at an input
  output logic [P-1:0]                proto_err
);
  import noc_pkg::*;

  localparam int NCH = N_NET * N_VC + 1;  // input channels = output channels
  localparam int LCH = N_NET * N_VC;      // index of the local channel
  localparam int CW  = $clog2(NCH);

  // ---------------------------------------------------------------- inputs
  flit_t [NCH-1:0]  ch_head;
  logic  [NCH-1:0]  ch_empty, ch_pop;

  for (genvar p = 0; p < N_NET; p++) begin : g_in_net
    logic            push;
    logic [VCW-1:0]  push_vc;
    flit_t           push_flit;
    logic [N_VC-1:0] full;
    input_link_controller #(.N_VC(N_VC)) u_ilc (
      .clk, .rst_n,
      .wr_req   (in_wr_req[p]),
      .wr_vc    (in_wr_vc[p]),
      .wr_flit  (in_wr_flit[p]),
      .wr_ack   (in_wr_ack[p]),
      .buf_full (full),
      .push, .push_vc, .push_flit,
      .proto_err(proto_err[p])
    );
    vc_buffer #(.N_VC(N_VC), .DEPTH(BUF_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .wr_en   (push),
      .wr_vc   (push_vc),
      .wr_flit (push_flit),
      .pop     (ch_pop  [p*N_VC +: N_VC]),
      .head    (ch_head [p*N_VC +: N_VC]),
      .full    (full),
      .empty   (ch_empty[p*N_VC +: N_VC])
    );
  end

  begin : g_in_loc
    logic  push, push_vc, full, ack;
    flit_t push_flit;
    input_link_controller #(.N_VC(1)) u_ilc (
      .clk, .rst_n,
      .wr_req   (in_wr_req[N_NET]),
      .wr_vc    (1'b0),
      .wr_flit  (in_wr_flit[N_NET]),
      .wr_ack   (ack),
      .buf_full (full),
      .push, .push_vc, .push_flit,
      .proto_err(proto_err[N_NET])
    );
    assign in_wr_ack[N_NET] = N_VC'(ack);
    vc_buffer #(.N_VC(1), .DEPTH(BUF_DEPTH)) u_in_fifo (
      .clk, .rst_n,
      .wr_en   (push),
      .wr_vc   (push_vc),
      .wr_flit (push_flit),
      .pop     (ch_pop  [LCH]),
      .head    (ch_head [LCH]),
      .full    (full),
      .empty   (ch_empty[LCH])
    );
  end

  // ------------------------------------------------- header decoders, table
  logic [NCH-1:0][ADDR_W-1:0] tbl_addr;
  logic [NCH-1:0][PW-1:0]     tbl_port, ch_port;
  logic [NCH-1:0]             tbl_dl, ch_is_head, ch_is_tail;
  logic [NCH-1:0][VCW-1:0]    ch_vc;
  logic [NCH-1:0][CW-1:0]     ch_oc;   // output channel targeted

  routing_table #(.N_PORTS(P), .N_RD(NCH), .INIT(RT_INIT)) u_rt (
    .clk, .rst_n,
    .cfg_we      (rt_we),
    .cfg_addr    (rt_addr),
    .cfg_port    (rt_port),
    .cfg_dateline(rt_dateline),
    .rd_addr     (tbl_addr),
    .rd_port     (tbl_port),
    .rd_dateline (tbl_dl)
  );

  for (genvar i = 0; i < NCH; i++) begin : g_hd
    header_decoder #(
      .N_NET(N_NET), .N_VC(N_VC),
      .IN_PORT((i == LCH) ? N_NET : i / N_VC),
      .IN_VC  ((i == LCH) ? 0 : i % N_VC)
    ) u_hd (
      .clk, .rst_n,
      .valid       (!ch_empty[i]),
      .head        (ch_head[i]),
      .tbl_addr    (tbl_addr[i]),
      .tbl_port    (tbl_port[i]),
      .tbl_dateline(tbl_dl[i]),
      .is_head     (ch_is_head[i]),
      .is_tail     (ch_is_tail[i]),
      .out_port    (ch_port[i]),
      .out_vc      (ch_vc[i]),
      .advance     (ch_pop[i])
    );
    assign ch_oc[i] = (int'(ch_port[i]) == N_NET) ? CW'(LCH)
                                                  : CW'(int'(ch_port[i]) * N_VC + int'(ch_vc[i]));
  end

  // -------------------------------------------- allocation and arbitration
  logic [NCH-1:0]         oc_busy;     // output channel owned by a packet
  logic [NCH-1:0]         oc_full;
  logic [P-1:0][NCH-1:0]  req, grant;
  logic [P-1:0][CW-1:0]   grant_idx;
  logic [NCH-1:0]         hi;

  always_comb begin
    for (int i = 0; i < NCH; i++) hi[i] = (i != LCH);
    for (int o = 0; o < P; o++) begin
      for (int i = 0; i < NCH; i++) begin
        req[o][i] = !ch_empty[i] && (int'(ch_port[i]) == o) && !oc_full[ch_oc[i]]
                    && (!ch_is_head[i] || !oc_busy[ch_oc[i]]);
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_arb
    rr_prio_arbiter #(.N(NCH)) u_arb (
      .clk, .rst_n,
      .req      (req[o]),
      .hi       (hi),
      .update   (1'b1),
      .grant    (grant[o]),
      .grant_idx(grant_idx[o])
    );
  end

  always_comb begin
    ch_pop = '0;
    for (int o = 0; o < P; o++) ch_pop = ch_pop | grant[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oc_busy <= '0;
    end else begin
      for (int i = 0; i < NCH; i++) begin
        if (ch_pop[i] && ch_is_head[i])      oc_busy[ch_oc[i]] <= 1'b1;
        else if (ch_pop[i] && ch_is_tail[i]) oc_busy[ch_oc[i]] <= 1'b0;
      end
    end
  end

  // -------------------------------------------------------------- crossbar
  flit_t [P-1:0] xb_flit;
  logic  [P-1:0] xb_valid;

  crossbar #(.N_IN(NCH), .N_OUT(P)) u_xbar (
    .in_flit  (ch_head),
    .sel      (grant),
    .out_flit (xb_flit),
    .out_valid(xb_valid)
  );

  // --------------------------------------------------------------- outputs
  for (genvar o = 0; o < N_NET; o++) begin : g_out_net
    flit_t [N_VC-1:0] head;
    logic  [N_VC-1:0] empty, full, pop;
    vc_buffer #(.N_VC(N_VC), .DEPTH(BUF_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .wr_en   (xb_valid[o]),
      .wr_vc   (ch_vc[grant_idx[o]]),
      .wr_flit (xb_flit[o]),
      .pop     (pop),
      .head    (head),
      .full    (full),
      .empty   (empty)
    );
    assign oc_full[o*N_VC +: N_VC] = full;
    output_link_controller #(.N_VC(N_VC)) u_olc (
      .clk, .rst_n,
      .buf_head (head),
      .buf_empty(empty),
      .pop      (pop),
      .rd_req   (out_rd_req[o]),
      .rd_ack   (out_rd_ack[o]),
      .rd_vc    (out_rd_vc[o]),
      .rd_flit  (out_rd_flit[o])
    );
  end

  begin : g_out_loc
    flit_t head;
    logic  empty, full, pop, vc;
    vc_buffer #(.N_VC(1), .DEPTH(OUT_BUF_DEPTH)) u_out_buf (
      .clk, .rst_n,
      .wr_en   (xb_valid[N_NET]),
      .wr_vc   (1'b0),
      .wr_flit (xb_flit[N_NET]),
      .pop     (pop),
      .head    (head),
      .full    (full),
      .empty   (empty)
    );
    assign oc_full[LCH] = full;
    output_link_controller #(.N_VC(1)) u_olc (
      .clk, .rst_n,
      .buf_head (head),
      .buf_empty(empty),
      .pop      (pop),
      .rd_req   (out_rd_req[N_NET][0]),
      .rd_ack   (out_rd_ack[N_NET]),
      .rd_vc    (vc),
      .rd_flit  (out_rd_flit[N_NET])
    );
    assign out_rd_vc[N_NET] = VCW'(vc);
  end

  // At most one flit per output port per cycle, one port per input channel.
  for (genvar i = 0; i < NCH; i++) begin : g_chk
    logic [P-1:0] col;
    for (genvar o = 0; o < P; o++) begin : g_col
      assign col[o] = grant[o][i];
    end
    a_one_port: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col));
  end
endmodule
