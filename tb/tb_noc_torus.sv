// tb_noc_torus: end-to-end test of the 2 x 2 torus network at its default
// parameters, with a processor model on every node.
//
// Phase 1, random traffic: every processor sends packets of random length to
// random nodes (itself included) while all receivers stall at random.
// Phase 2, reconfiguration: every routing table is rewritten at run time, by
// its reconfiguration port, to route along the column first, and phase 1's
// traffic is repeated. In phase 1 the receivers are slow, so the network
// fills up and links stall; in phase 2 they are fast.
// Phase 3, the evaluated workload: processors on nodes 0..2 exchange blocks
// with a shared memory on node 3: 10 bytes and 1 KB, as 8-bit and as 16-bit
// words. For each size all three processors write their block to the memory
// at once, then the memory returns a block of the same size to each of them.
// The cycle count of each exchange is printed.
//
// A scoreboard holds, per destination and source, the packets still to be
// delivered; every received packet must equal the oldest outstanding packet
// of one source (packets from one source to one destination keep their
// order). Mechanisms counted, each must occur: link stalls, receiver stalls,
// wrap-around hops on virtual channel 1, the processor input losing to a
// router input, output contention and table rewrites.
module tb_noc_torus;
  import noc_pkg::*;
  localparam int COLS = 2, ROWS = 2, NODES = COLS * ROWS;

  logic clk = 0, rst_n = 0;
  logic [NODES-1:0] tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready, rt_we;
  logic [NODES-1:0][ADDR_W-1:0] tx_dest;
  logic [NODES-1:0][DATA_W-1:0] tx_data, rx_data;
  logic [ADDR_W-1:0] rt_addr;
  logic [1:0] rt_port;
  logic rt_dateline;
  logic [NODES-1:0][2:0] proto_err;

  noc_torus dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scoreboard
  typedef logic [DATA_W-1:0] word_q [$];
  typedef struct { word_q w; } pkt_t;
  pkt_t   outstanding [NODES][NODES][$];   // [dst][src]
  word_q  rx_cur [NODES];
  int     n_sent = 0, n_recv = 0;

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NODES; d++) begin
      if (rx_valid[d] && rx_ready[d]) begin
        rx_cur[d].push_back(rx_data[d]);
        if (rx_last[d]) begin
          bit found;
          found = 0;
          for (int s = 0; s < NODES && !found; s++) begin
            if (outstanding[d][s].size() > 0 && outstanding[d][s][0].w == rx_cur[d]) begin
              void'(outstanding[d][s].pop_front());
              found = 1;
            end
          end
          checks++;
          if (!found) begin
            failures++;
            $display("FAIL node %0d received a packet of %0d words nobody sent next", d, rx_cur[d].size());
          end
          n_recv++;
          rx_cur[d].delete();
        end
      end
    end
  end

  bit rx_random = 1;
  bit rx_slow   = 1;   // receivers take a word only one cycle in eight
  always @(negedge clk)
    for (int d = 0; d < NODES; d++)
      rx_ready[d] = !rx_random || (rx_slow ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0));

  // ------------------------------------------------------- processor model
  task automatic send_packet(int s, int d, word_q w);
    pkt_t pk;
    pk.w = w;
    outstanding[d][s].push_back(pk);
    n_sent++;
    foreach (w[k]) begin
      @(negedge clk);
      tx_valid[s] = 1; tx_dest[s] = ADDR_W'(d); tx_data[s] = w[k];
      tx_last[s] = (k == w.size() - 1);
      forever begin
        #1;
        if (tx_ready[s]) break;
        @(negedge clk);
      end
    end
    @(negedge clk);
    tx_valid[s] = 0; tx_last[s] = 0;
  endtask

  function automatic word_q random_words(int n, int bits);
    word_q w;
    for (int k = 0; k < n; k++) w.push_back(DATA_W'($urandom) & DATA_W'((1 << bits) - 1));
    return w;
  endfunction

  task automatic random_traffic(int s, int npkt);
    for (int k = 0; k < npkt; k++) begin
      send_packet(s, $urandom_range(0, NODES - 1), random_words($urandom_range(1, 8), 16));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    forever begin
      int left;
      left = 0;
      for (int d = 0; d < NODES; d++) for (int s = 0; s < NODES; s++) left += outstanding[d][s].size();
      if (left == 0) break;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
  endtask

  // --------------------------------------------------------- mechanisms
  int n_link_stall = 0, n_rx_stall = 0, n_vc1 = 0, n_prio = 0, n_contend = 0, n_rewrite = 0;
  for (genvar n = 0; n < NODES; n++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      for (int p = 0; p < 2; p++) begin
        if (dut.g_node[n].u_router.out_rd_ack[p] && dut.g_node[n].u_router.out_rd_vc[p] == 1) n_vc1++;
      end
      for (int o = 0; o < 3; o++) begin
        if (dut.g_node[n].u_router.req[o][4] && |dut.g_node[n].u_router.req[o][3:0]) begin
          n_prio++;
          checks++;
          if (dut.g_node[n].u_router.grant[o][4]) begin
            failures++; $display("FAIL processor input won over a router input");
          end
        end
        if ($countones(dut.g_node[n].u_router.req[o]) > 1) n_contend++;
      end
      if (rx_valid[n] && !rx_ready[n]) n_rx_stall++;
      // Link stall: an Out FIFO channel holds a flit that the neighbour
      // cannot take because its In FIFO channel is full.
      for (int v = 0; v < 2; v++) begin
        if (!dut.g_node[n].u_router.g_out_net[0].empty[v] &&
            !dut.g_node[n].u_router.out_rd_req[0][v]) n_link_stall++;
        if (!dut.g_node[n].u_router.g_out_net[1].empty[v] &&
            !dut.g_node[n].u_router.out_rd_req[1][v]) n_link_stall++;
      end
    end
  end

  // ------------------------------------------------------ column-first table
  task automatic rewrite_tables_yx();
    for (int n = 0; n < NODES; n++) begin
      for (int a = 0; a < 16; a++) begin
        int x, y, dx, dy;
        x = n % COLS; y = n / COLS; dx = a % COLS; dy = a / COLS;
        @(negedge clk);
        rt_we = '0; rt_we[n] = 1; rt_addr = 4'(a);
        if (a >= NODES)    {rt_dateline, rt_port} = {1'b0, 2'd2};
        else if (dy != y)  {rt_dateline, rt_port} = {1'(y == ROWS - 1), 2'd1};
        else if (dx != x)  {rt_dateline, rt_port} = {1'(x == COLS - 1), 2'd0};
        else               {rt_dateline, rt_port} = {1'b0, 2'd2};
      end
    end
    @(negedge clk);
    rt_we = '0;
    n_rewrite++;
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    longint t0;
    tx_valid = '0; tx_last = '0; tx_dest = '0; tx_data = '0;
    rt_we = '0; rt_addr = '0; rt_port = '0; rt_dateline = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) rewrite_tables_yx();
      rx_slow = (phase == 0);
      for (int s = 0; s < NODES; s++) begin
        fork
          automatic int ss = s;
          random_traffic(ss, 40);
        join_none
      end
      wait fork;
      drain();
    end

    // Workload: three processors and a shared memory on node 3.
    rx_random = 0;
    for (int bits = 8; bits <= 16; bits += 8) begin
      for (int sz = 0; sz < 2; sz++) begin
        int bytes, words;
        bytes = (sz == 0) ? 10 : 1024;
        words = bytes / (bits / 8);
        t0 = cycle;
        for (int s = 0; s < 3; s++) begin
          fork
            automatic int ss = s;
            automatic int ww = words;
            automatic int bb = bits;
            send_packet(ss, 3, random_words(ww, bb));
          join_none
        end
        wait fork;
        drain();
        $display("workload %0d-bit %0d bytes: processors to memory in %0d cycles", bits, bytes, cycle - t0);
        t0 = cycle;
        for (int d = 0; d < 3; d++) send_packet(3, d, random_words(words, bits));
        drain();
        $display("workload %0d-bit %0d bytes: memory to processors in %0d cycles", bits, bytes, cycle - t0);
      end
    end

    check(n_sent == n_recv, "every packet received");
    check(proto_err == '0, "no packet-format violation");
    $display("mechanisms: link_stall=%0d rx_stall=%0d vc1_hops=%0d priority=%0d contention=%0d rewrites=%0d",
             n_link_stall, n_rx_stall, n_vc1, n_prio, n_contend, n_rewrite);
    check(n_link_stall > 0, "link stall happened");
    check(n_rx_stall > 0, "receiver stall happened");
    check(n_vc1 > 0, "dateline hop on channel 1 happened");
    check(n_prio > 0, "priority decision happened");
    check(n_contend > 0, "output contention happened");
    check(n_rewrite == 1, "routing tables rewritten");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
