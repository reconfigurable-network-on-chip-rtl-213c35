// tb_output_link_controller: two channels with queued flits; the receiver's
// rd_req pattern is random. Checks that a flit is offered only on a
// requested, non-empty channel, that each channel's flits leave in order,
// that both channels alternate when both are eligible, and that nothing is
// offered when nothing is requested.
module tb_output_link_controller;
  import noc_pkg::*;
  localparam int N_VC = 2;
  logic clk = 0, rst_n = 0;
  flit_t [N_VC-1:0] buf_head;
  logic [N_VC-1:0] buf_empty, pop, rd_req;
  logic rd_ack;
  logic [0:0] rd_vc;
  flit_t rd_flit;
  int checks = 0, failures = 0;
  flit_t q[N_VC][$];
  int alternations = 0;
  int last_vc = -1;
  logic [N_VC-1:0] popped;

  output_link_controller #(.N_VC(N_VC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always_comb begin
    for (int v = 0; v < N_VC; v++) begin
      buf_empty[v] = (q[v].size() == 0);
      buf_head[v]  = (q[v].size() > 0) ? q[v][0] : '0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_req = '0;
    for (int v = 0; v < N_VC; v++)
      for (int k = 0; k < 200; k++) q[v].push_back(flit_t'({2'(v), 16'(k)}));
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (q[0].size() + q[1].size() > 0) begin
      @(negedge clk);
      rd_req = 2'($urandom_range(0, 3));
      #1;
      check(rd_ack == |(rd_req & ~buf_empty), "rd_ack when something eligible");
      if (rd_ack) begin
        check(rd_req[rd_vc] && !buf_empty[rd_vc], "offered channel eligible");
        check(rd_flit == q[rd_vc][0], "flit in order");
        check(pop == (2'b01 << rd_vc), "pop matches");
        if (&(rd_req & ~buf_empty)) begin
          check(int'(rd_vc) != last_vc, "round robin between channels");
          alternations++;
        end
        last_vc = rd_vc;
      end else begin
        check(pop == 0, "no pop without transfer");
      end
      popped = pop;
      @(posedge clk); #1;
      for (int v = 0; v < N_VC; v++) if (popped[v]) void'(q[v].pop_front());
    end
    check(alternations > 10, "both channels eligible often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
