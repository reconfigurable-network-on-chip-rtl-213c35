// tb_noc_router: end-to-end test of one 2D router (N_NET = 2, N_VC = 2).
//
// Every input port runs a packet source that picks a random destination and
// length and, on network ports, a random virtual channel; every output port
// has a sink that requests flits on random channels at random times. The
// routing table is written through the reconfiguration port with a random
// map, once at the start and again halfway. A scoreboard checks that each
// packet leaves on the port the table gives for its destination, on the
// virtual channel the dateline rule gives, whole, in order and not mixed with
// another packet on that channel. It also checks the two-cycle latency of an
// idle router, the priority of router inputs over the processor input, and
// that a stray flit raises proto_err and is discarded. Mechanisms counted:
// input stalls (wr_ack low), output stalls, contention for an output, the
// processor input losing to a router input, channel-1 (dateline) routes and
// table rewrites.
module tb_noc_router;
  import noc_pkg::*;
  localparam int N_NET = 2, N_VC = 2;
  localparam int P = N_NET + 1, PW = $clog2(P), VCW = (N_VC > 1) ? $clog2(N_VC) : 1;
  localparam int NPKT = 150;   // packets per input port

  logic clk = 0, rst_n = 0;
  logic [P-1:0] in_wr_req, out_rd_ack, proto_err;
  logic [P-1:0][VCW-1:0] in_wr_vc, out_rd_vc;
  flit_t [P-1:0] in_wr_flit, out_rd_flit;
  logic [P-1:0][N_VC-1:0] in_wr_ack, out_rd_req;
  logic rt_we, rt_dateline;
  logic [ADDR_W-1:0] rt_addr;
  logic [PW-1:0] rt_port;

  noc_router #(.N_NET(N_NET), .N_VC(N_VC)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- table
  logic [PW:0] tbl [16];   // {dateline, port}
  task automatic write_table();
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      tbl[a] = {1'($urandom), PW'($urandom_range(0, P - 1))};
      rt_we = 1; rt_addr = 4'(a); {rt_dateline, rt_port} = tbl[a];
    end
    @(negedge clk);
    rt_we = 0;
  endtask

  // ------------------------------------------------------------ scoreboard
  // Packet id = {src port, sequence number}, carried in the header's upper
  // bits and in every data flit's upper bits.
  typedef struct { int port; int vc; flit_t flits[$]; } pkt_t;
  pkt_t pkts [int];
  int   cur [P][N_VC];        // packet open on (output, vc), -1 if none
  int   delivered = 0;
  int   n_in_stall = 0, n_out_stall = 0, n_contend = 0, n_prio = 0, n_vc1 = 0, n_rewrite = 0;

  function automatic int exp_vc(int in_port, int in_vc, logic [PW:0] e);
    if (int'(e[PW-1:0]) == N_NET || N_VC == 1) return 0;
    if (e[PW]) return 1;
    if (int'(e[PW-1:0]) == in_port) return in_vc;
    return 0;
  endfunction

  // ---------------------------------------------------------------- sources
  bit sources_on = 0;
  int sent [P];

  task automatic send_flit(int p, int vc, flit_t f);
    @(negedge clk);
    in_wr_req[p] = 1; in_wr_vc[p] = VCW'(vc); in_wr_flit[p] = f;
    forever begin
      #1;
      if (in_wr_ack[p][vc]) break;
      n_in_stall++;
      @(negedge clk);
    end
    @(posedge clk);
    #1 in_wr_req[p] = 0;
  endtask

  task automatic source(int p, int first, int count);
    for (int s = first; s < first + count; s++) begin
      int id, vc, len;
      logic [3:0] dest;
      flit_t f;
      pkt_t pk;
      id   = p * 256 + s;
      vc   = (p == N_NET) ? 0 : $urandom_range(0, N_VC - 1);
      len  = $urandom_range(1, 5);
      dest = 4'($urandom);
      pk.port = int'(tbl[dest][PW-1:0]);
      pk.vc   = exp_vc(p, vc, tbl[dest]);
      if (pk.vc == 1) n_vc1++;
      f.ftype = FT_HEAD; f.data = {2'(p), 8'(s), 2'b00, dest};
      pk.flits.push_back(f);
      for (int k = 0; k < len; k++) begin
        f.ftype = (k == len - 1) ? FT_TAIL : FT_BODY;
        f.data  = {2'(p), 8'(s), 6'(k)};
        pk.flits.push_back(f);
      end
      pkts[id] = pk;
      foreach (pk.flits[k]) send_flit(p, vc, pk.flits[k]);
      sent[p]++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  // ------------------------------------------------------------------ sinks
  bit sink_on = 1;
  bit lat_mode = 0;
  always @(negedge clk) begin
    for (int o = 0; o < P; o++)
      for (int v = 0; v < N_VC; v++)
        out_rd_req[o][v] = sink_on && (lat_mode || $urandom_range(0, 3) != 0) && (o != N_NET || v == 0);
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) begin
      if (out_rd_ack[o]) begin
        int v, id;
        flit_t f;
        v = int'(out_rd_vc[o]);
        f = out_rd_flit[o];
        checks++;
        if (f.ftype == FT_HEAD) begin
          id = int'(f.data[15:14]) * 256 + int'(f.data[13:6]);
          if (cur[o][v] != -1 || !pkts.exists(id) || pkts[id].port != o || pkts[id].vc != v) begin
            failures++;
            $display("FAIL header of packet %0d on port %0d vc %0d at %0t", id, o, v, $time);
          end else begin
            cur[o][v] = id;
          end
        end
        id = cur[o][v];
        if (id == -1) begin
          failures++; $display("FAIL flit outside packet on port %0d vc %0d", o, v);
        end else begin
          if (pkts[id].flits.size() == 0 || pkts[id].flits[0] != f) begin
            failures++; $display("FAIL flit order packet %0d at %0t", id, $time);
          end else void'(pkts[id].flits.pop_front());
          if (f.ftype == FT_TAIL) begin
            cur[o][v] = -1;
            if (pkts[id].flits.size() == 0) begin pkts.delete(id); delivered++; end
          end
        end
      end
    end
  end

  // Observed mechanisms inside the router.
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) begin
      if ($countones(dut.req[o]) > 1) n_contend++;
      if (dut.req[o][N_NET * N_VC] && |dut.req[o][N_NET * N_VC - 1:0]) begin
        n_prio++;
        checks++;
        if (dut.grant[o][N_NET * N_VC]) begin
          failures++; $display("FAIL processor input won over router input");
        end
      end
    end
  end

  // Output stall: an Out FIFO channel filled up because its receiver did not
  // request flits, holding back the crossbar.
  always @(posedge clk) if (rst_n)
    if (|dut.oc_full[N_NET * N_VC - 1:0]) n_out_stall++;

  // ------------------------------------------------------------------- main
  initial begin
    int total;
    in_wr_req = '0; in_wr_vc = '0; in_wr_flit = '0; rt_we = 0; rt_addr = 0;
    rt_port = 0; rt_dateline = 0;
    foreach (cur[o, v]) cur[o][v] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Reset table: every address goes to the local port.
    for (int a = 0; a < 16; a++) tbl[a] = {1'b0, PW'(N_NET)};

    // Latency of an idle router: a header accepted at one clock edge is
    // offered on the output two edges later.
    begin
      flit_t f;
      pkt_t pk;
      lat_mode = 1;
      f.ftype = FT_HEAD; f.data = {2'(0), 8'(255), 2'b00, 4'd3};
      pk.port = N_NET; pk.vc = 0;
      pk.flits.push_back(f);
      f.ftype = FT_TAIL; f.data = {2'(0), 8'(255), 6'(0)};
      pk.flits.push_back(f);
      pkts[255] = pk;
      @(negedge clk);
      in_wr_req[0] = 1; in_wr_vc[0] = 0; in_wr_flit[0] = pk.flits[0];
      #1 check(in_wr_ack[0][0], "idle router accepts");
      @(negedge clk);
      in_wr_req[0] = 0;
      check(!out_rd_ack[N_NET], "not yet out after one cycle");
      @(negedge clk);
      check(out_rd_ack[N_NET] && out_rd_flit[N_NET] == pk.flits[0], "out after two cycles");
      send_flit(0, 0, pk.flits[1]);
      repeat (4) @(negedge clk);
      lat_mode = 0;
    end

    for (int phase = 0; phase < 2; phase++) begin
      write_table();
      n_rewrite++;
      for (int p = 0; p < P; p++) begin
        fork
          automatic int pp = p;
          source(pp, phase * (NPKT / 2), NPKT / 2);
        join_none
      end
      wait fork;
      wait (pkts.size() == 0);
      repeat (10) @(posedge clk);
    end
    total = 0;
    foreach (sent[p]) total += sent[p];
    check(delivered == total + 1, "every packet delivered");
    check(pkts.size() == 0, "nothing left undelivered");

    // A stray normal flit: rejected with proto_err, not forwarded.
    @(negedge clk);
    in_wr_req[1] = 1; in_wr_vc[1] = 0; in_wr_flit[1] = flit_t'({FT_BODY, 16'h1234});
    @(posedge clk); #1 in_wr_req[1] = 0;
    check(proto_err[1] == 1, "proto_err on stray flit");
    repeat (5) @(posedge clk);
    check(dut.ch_empty == '1, "stray flit discarded");

    $display("mechanisms: input_stall=%0d output_stall=%0d contention=%0d priority=%0d vc1_routes=%0d rewrites=%0d",
             n_in_stall, n_out_stall, n_contend, n_prio, n_vc1, n_rewrite);
    check(n_in_stall > 0, "input stall happened");
    check(n_out_stall > 0, "output stall happened");
    check(n_contend > 0, "output contention happened");
    check(n_prio > 0, "priority decision happened");
    check(N_VC == 1 || n_vc1 > 0, "channel-1 route happened");
    check(n_rewrite == 2, "table rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
