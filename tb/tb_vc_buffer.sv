// tb_vc_buffer: writes random flits to random virtual channels of a two
// channel bank and reads them back per channel in random order; each channel
// must return exactly its own flits in order, and its full flag must follow
// its own fill level only.
module tb_vc_buffer;
  import noc_pkg::*;
  localparam int N_VC = 2, DEPTH = 3;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [0:0] wr_vc;
  flit_t wr_flit;
  logic [N_VC-1:0] pop, full, empty;
  flit_t [N_VC-1:0] head;
  int checks = 0, failures = 0;
  flit_t q[N_VC][$];

  vc_buffer #(.N_VC(N_VC), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_vc = 0; wr_flit = '0; pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int v = 0; v < N_VC; v++) begin
        check(empty[v] == (q[v].size() == 0), "empty");
        check(full[v] == (q[v].size() == DEPTH), "full");
        if (q[v].size() > 0) check(head[v] == q[v][0], "head");
        pop[v] = (q[v].size() > 0) && ($urandom_range(0, 2) == 0);
      end
      wr_vc = 1'($urandom_range(0, 1));
      wr_en = (q[wr_vc].size() < DEPTH) && ($urandom_range(0, 1) == 1);
      wr_flit.ftype = flit_type_e'($urandom_range(0, 2));
      wr_flit.data  = 16'($urandom);
      @(posedge clk);
      #1;
      for (int v = 0; v < N_VC; v++) if (pop[v]) void'(q[v].pop_front());
      if (wr_en) q[wr_vc].push_back(wr_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
