// tb_vc_fifo: random push/pop traffic against a queue model; checks the head
// flit, the full/empty flags and the fill count every cycle, including
// simultaneous push and pop on a full FIFO.
module tb_vc_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  flit_t din, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t q[$];
  int saw_full = 0;

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) check(head == q[0], "head");
      if (full) saw_full++;
      pop  = (q.size() > 0) && ($urandom_range(0, 2) == 0 || cyc > 1900);
      push = (q.size() < DEPTH || pop) && ($urandom_range(0, 1) == 1) && cyc <= 1900;
      din.ftype = flit_type_e'($urandom_range(0, 2));
      din.data  = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(saw_full > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
