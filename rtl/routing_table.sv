// routing_table: the router's destination lookup table.
//
// The network routes deterministically: each router holds a table that maps
// every destination node address to the output port that leads towards it,
// and changing the topology or the placement of the processors only means
// rewriting the tables. Each entry here is {dateline, port}: `port` selects
// the output (network ports 0..N_PORTS-2, the local processor port last) and
// `dateline` marks a hop over a torus wrap-around link, after which a packet
// must travel on virtual channel 1 (see header_decoder).
//
// The table is a register array with N_RD combinational read ports, one per
// header decoder, and one write port for reconfiguration at run time. On
// reset it loads INIT, entry a in bits [a*EW +: EW]; the default INIT sends
// every address to the local port. Entry layout, reset loading and the write
// port are choices of this implementation.
//
// Timing: reads are combinational; a write is visible the cycle after cfg_we.
module routing_table #(
  parameter int N_PORTS = 3,
  parameter int N_RD    = 5,
  localparam int PW     = $clog2(N_PORTS),
  localparam int EW     = PW + 1,
  localparam int ENTRIES = 1 << noc_pkg::ADDR_W,
  parameter logic [ENTRIES*EW-1:0] INIT = {ENTRIES{1'b0, PW'(N_PORTS - 1)}}
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // reconfiguration
  input  logic                                 cfg_we,
  input  logic [noc_pkg::ADDR_W-1:0]           cfg_addr,
  input  logic [PW-1:0]                        cfg_port,
  input  logic                                 cfg_dateline,
  // lookups
  input  logic [N_RD-1:0][noc_pkg::ADDR_W-1:0] rd_addr,
  output logic [N_RD-1:0][PW-1:0]              rd_port,
  output logic [N_RD-1:0]                      rd_dateline
);
  logic [EW-1:0] tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < ENTRIES; a++) tbl[a] <= INIT[a*EW +: EW];
    end else if (cfg_we) begin
      tbl[cfg_addr] <= {cfg_dateline, cfg_port};
    end
  end

  always_comb begin
    for (int r = 0; r < N_RD; r++) begin
      {rd_dateline[r], rd_port[r]} = tbl[rd_addr[r]];
    end
  end

  a_cfg_port_valid: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> (int'(cfg_port) < N_PORTS));
endmodule
