// noc_torus: the network-on-chip, a COLS x ROWS torus of 2D routers with one
// processor attached to each router through a network interface.
//
// Node n = y*COLS + x sits at column x, row y. Every router has two network
// ports: port 0 sends along its row to column x+1 and receives from column
// x-1; port 1 sends down its column to row y+1 and receives from row y-1. The
// last column and the last row wrap around, so each row and each column is a
// unidirectional ring. Port 2 is the local port to the processor. With the
// default 2 x 2 size this is the four-router, four-processor network of the
// design; in the evaluated system three processors and one shared memory sit
// on the four local ports.
//
// The routing tables are loaded at reset with dimension-order routes (along
// the row first, then along the column), computed from the node position by
// rt_init() below; the hop over a wrap-around link is marked as the dateline,
// where packets move to virtual channel 1, which keeps the rings free of
// deadlock. The rt_* ports rewrite any table entry at run time (rt_we has one
// bit per router), which is how the network is reconfigured for another
// placement of processors. The route choice is this implementation's; the
// design only states that routing is deterministic and table driven.
//
// Processor ports are those of network_interface, one set per node, packed
// into arrays indexed by node number.
module noc_torus #(
  parameter int COLS          = 2,
  parameter int ROWS          = 2,
  parameter int N_VC          = 2,
  parameter int BUF_DEPTH     = 4,
  parameter int OUT_BUF_DEPTH = 8,
  localparam int NODES        = COLS * ROWS
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // processors
  input  logic [NODES-1:0]                       tx_valid,
  input  logic [NODES-1:0][noc_pkg::ADDR_W-1:0]  tx_dest,
  input  logic [NODES-1:0][noc_pkg::DATA_W-1:0]  tx_data,
  input  logic [NODES-1:0]                       tx_last,
  output logic [NODES-1:0]                       tx_ready,
  output logic [NODES-1:0]                       rx_valid,
  output logic [NODES-1:0][noc_pkg::DATA_W-1:0]  rx_data,
  output logic [NODES-1:0]                       rx_last,
  input  logic [NODES-1:0]                       rx_ready,
  // routing table reconfiguration
  input  logic [NODES-1:0]                       rt_we,
  input  logic [noc_pkg::ADDR_W-1:0]             rt_addr,
  input  logic [1:0]                             rt_port,
  input  logic                                   rt_dateline,
  // packet-format violations seen at any router input
  output logic [NODES-1:0][2:0]                  proto_err
);
  import noc_pkg::*;

  localparam int P       = 3;
  localparam int EW      = 3;
  localparam int ENTRIES = 1 << ADDR_W;
  localparam int VCW     = (N_VC > 1) ? $clog2(N_VC) : 1;

  initial begin
    assert (NODES <= ENTRIES) else $error("more nodes than node addresses");
  end

  // Dimension-order routing table for the router at (x, y).
  function automatic logic [ENTRIES*EW-1:0] rt_init(int x, int y);
    logic [ENTRIES*EW-1:0] t;
    t = '0;
    for (int a = 0; a < ENTRIES; a++) begin
      int dx, dy;
      logic [EW-1:0] e;
      dx = a % COLS;
      dy = a / COLS;
      if (a >= NODES)   e = {1'b0, 2'd2};
      else if (dx != x) e = {1'(x == COLS - 1), 2'd0};
      else if (dy != y) e = {1'(y == ROWS - 1), 2'd1};
      else              e = {1'b0, 2'd2};
      t[a*EW +: EW] = e;
    end
    return t;
  endfunction

  // Per-router link signals.
  logic  [NODES-1:0][P-1:0]            in_req, out_ack;
  logic  [NODES-1:0][P-1:0][VCW-1:0]   in_vc, out_vc;
  flit_t [NODES-1:0][P-1:0]            in_flit, out_flit;
  logic  [NODES-1:0][P-1:0][N_VC-1:0]  in_ack, out_req;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int X    = n % COLS;
    localparam int Y    = n / COLS;
    localparam int EAST = Y * COLS + (X + 1) % COLS;
    localparam int SOUTH = ((Y + 1) % ROWS) * COLS + X;
    localparam int WEST = Y * COLS + (X + COLS - 1) % COLS;
    localparam int NORTH = ((Y + ROWS - 1) % ROWS) * COLS + X;

    noc_router #(
      .N_NET(2), .N_VC(N_VC), .BUF_DEPTH(BUF_DEPTH),
      .OUT_BUF_DEPTH(OUT_BUF_DEPTH), .RT_INIT(rt_init(X, Y))
    ) u_router (
      .clk, .rst_n,
      .in_wr_req  (in_req[n]),
      .in_wr_vc   (in_vc[n]),
      .in_wr_flit (in_flit[n]),
      .in_wr_ack  (in_ack[n]),
      .out_rd_req (out_req[n]),
      .out_rd_ack (out_ack[n]),
      .out_rd_vc  (out_vc[n]),
      .out_rd_flit(out_flit[n]),
      .rt_we      (rt_we[n]),
      .rt_addr    (rt_addr),
      .rt_port    (rt_port),
      .rt_dateline(rt_dateline),
      .proto_err  (proto_err[n])
    );

    // Row ring (port 0) from the west neighbour, column ring (port 1) from
    // the north neighbour.
    assign in_req [n][0] = out_ack [WEST][0];
    assign in_vc  [n][0] = out_vc  [WEST][0];
    assign in_flit[n][0] = out_flit[WEST][0];
    assign out_req[n][0] = in_ack  [EAST][0];
    assign in_req [n][1] = out_ack [NORTH][1];
    assign in_vc  [n][1] = out_vc  [NORTH][1];
    assign in_flit[n][1] = out_flit[NORTH][1];
    assign out_req[n][1] = in_ack  [SOUTH][1];

    // Local port.
    logic ni_rd_req;
    assign in_vc[n][2]   = '0;
    assign out_req[n][2] = N_VC'(ni_rd_req);

    network_interface u_ni (
      .clk, .rst_n,
      .tx_valid   (tx_valid[n]),
      .tx_dest    (tx_dest[n]),
      .tx_data    (tx_data[n]),
      .tx_last    (tx_last[n]),
      .tx_ready   (tx_ready[n]),
      .rx_valid   (rx_valid[n]),
      .rx_data    (rx_data[n]),
      .rx_last    (rx_last[n]),
      .rx_ready   (rx_ready[n]),
      .net_wr_req (in_req[n][2]),
      .net_wr_flit(in_flit[n][2]),
      .net_wr_ack (in_ack[n][2][0]),
      .net_rd_ack (out_ack[n][2]),
      .net_rd_flit(out_flit[n][2]),
      .net_rd_req (ni_rd_req)
    );
  end
endmodule
