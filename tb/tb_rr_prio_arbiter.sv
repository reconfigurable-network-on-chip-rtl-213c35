// tb_rr_prio_arbiter: random requests with inputs 0..3 in the high (router)
// class and input 4 in the low (processor) class. Checks, against a reference
// round-robin model, that the low class is granted only when no high request
// is present, that grants are one-hot and go to a requester, and that under
// continuous requests every high input is granted in turn.
module tb_rr_prio_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, hi, grant;
  logic update;
  logic [2:0] grant_idx;
  int checks = 0, failures = 0;
  int last;

  rr_prio_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int model(logic [N-1:0] r, logic [N-1:0] h, int l);
    logic [N-1:0] e;
    e = (|(r & h)) ? (r & h) : r;
    for (int k = 1; k <= N; k++) if (e[(l + k) % N]) return (l + k) % N;
    return -1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    hi = 5'b01111; req = 0; update = 0;
    last = N - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      req = 5'($urandom);
      update = ($urandom_range(0, 3) != 0);
      #1;
      exp = model(req, hi, last);
      if (exp < 0) check(grant == 0, "no grant without request");
      else begin
        check(grant == (5'b1 << exp) && grant_idx == 3'(exp), "grant matches model");
        if (update) last = exp;
      end
    end
    // Continuous requests from all: high inputs served in turn, never 4.
    @(negedge clk);
    req = 5'b11111; update = 1;
    for (int k = 0; k < 8; k++) begin
      #1;
      exp = model(req, hi, last);
      check(exp != 4 && grant == (5'b1 << exp), "high class in turn");
      last = exp;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
