// tb_network_interface: a random-stalling router model on both sides.
// Send: the processor model sends packets of random length and destination;
// the flits seen at the router input must be one header with the destination,
// the words as normal flits and the last word as tail, and the processor must
// be held (tx_ready low) during the header and while the router stalls.
// Receive: packets offered by the router model must reach the processor as
// their data words, header removed, rx_last on the tail's word.
module tb_network_interface;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tx_valid, tx_last, tx_ready, rx_valid, rx_last, rx_ready;
  logic [ADDR_W-1:0] tx_dest;
  logic [DATA_W-1:0] tx_data, rx_data;
  logic net_wr_req, net_wr_ack, net_rd_ack, net_rd_req;
  flit_t net_wr_flit, net_rd_flit;
  int checks = 0, failures = 0;

  network_interface dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t exp_tx[$];     // flits the router must see
  flit_t rx_src[$];     // flits the router offers
  logic [DATA_W:0] exp_rx[$];  // {last, data} the processor must see
  int tx_done = 0, stalls = 0;

  // Router input model: random acknowledge, checks every accepted flit.
  always @(posedge clk) if (rst_n) begin
    if (net_wr_req && net_wr_ack) begin
      checks++;
      if (exp_tx.size() == 0 || net_wr_flit != exp_tx[0]) begin
        failures++; $display("FAIL tx flit %h at %0t", net_wr_flit, $time);
      end
      if (exp_tx.size() > 0) void'(exp_tx.pop_front());
    end
    if (net_wr_req && !net_wr_ack) stalls++;
    net_wr_ack <= ($urandom_range(0, 3) != 0);
  end

  // Router output model: offers the next flit when the interface requests.
  always_comb begin
    net_rd_ack  = net_rd_req && rx_src.size() > 0 && offer;
    net_rd_flit = (rx_src.size() > 0) ? rx_src[0] : '0;
  end
  logic offer;
  always @(posedge clk) begin
    if (rst_n && net_rd_ack) void'(rx_src.pop_front());
    offer <= ($urandom_range(0, 2) != 0);
    rx_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    checks++;
    if (exp_rx.size() == 0 || {rx_last, rx_data} != exp_rx[0]) begin
      failures++; $display("FAIL rx word at %0t", $time);
    end
    if (exp_rx.size() > 0) void'(exp_rx.pop_front());
  end

  initial begin
    int len;
    tx_valid = 0; tx_last = 0; tx_dest = 0; tx_data = 0;
    net_wr_ack = 0; offer = 0; rx_ready = 0;
    // Receive traffic.
    for (int p = 0; p < 50; p++) begin
      len = $urandom_range(1, 6);
      rx_src.push_back(flit_t'({FT_HEAD, 16'($urandom)}));
      for (int k = 0; k < len; k++) begin
        flit_t f;
        f.ftype = (k == len - 1) ? FT_TAIL : FT_BODY;
        f.data  = 16'($urandom);
        rx_src.push_back(f);
        exp_rx.push_back({(k == len - 1), f.data});
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Send traffic.
    for (int p = 0; p < 50; p++) begin
      len = $urandom_range(1, 6);
      @(negedge clk);
      tx_dest = 4'($urandom);
      exp_tx.push_back(flit_t'({FT_HEAD, 12'b0, tx_dest}));
      for (int k = 0; k < len; k++) begin
        tx_valid = 1;
        tx_data = 16'($urandom);
        tx_last = (k == len - 1);
        exp_tx.push_back(flit_t'({tx_last ? FT_TAIL : FT_BODY, tx_data}));
        forever begin
          #1;
          if (tx_ready) break;
          @(negedge clk);
        end
        @(negedge clk);
      end
      tx_valid = 0; tx_last = 0;
    end
    repeat (400) @(posedge clk);
    check(exp_tx.size() == 0, "all sent flits reached the router");
    check(exp_rx.size() == 0 && rx_src.size() == 0, "all received words delivered");
    check(stalls > 0, "send stalled by the router at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
