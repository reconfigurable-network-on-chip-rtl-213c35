// tb_routing_table: checks the reset contents (a non-trivial INIT pattern),
// that all read ports see the table independently, and that a reconfiguration
// write changes exactly the written entry from the next cycle on.
module tb_routing_table;
  import noc_pkg::*;
  localparam int N_PORTS = 3, N_RD = 3, PW = 2, EW = 3, ENTRIES = 16;
  // Entry a = {a[0], a % 3}
  function automatic logic [ENTRIES*EW-1:0] mk_init();
    logic [ENTRIES*EW-1:0] t;
    for (int a = 0; a < ENTRIES; a++) t[a*EW +: EW] = {1'(a & 1), 2'(a % 3)};
    return t;
  endfunction
  localparam logic [ENTRIES*EW-1:0] INIT = mk_init();

  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_dateline;
  logic [ADDR_W-1:0] cfg_addr;
  logic [PW-1:0] cfg_port;
  logic [N_RD-1:0][ADDR_W-1:0] rd_addr;
  logic [N_RD-1:0][PW-1:0] rd_port;
  logic [N_RD-1:0] rd_dateline;
  int checks = 0, failures = 0;
  logic [EW-1:0] model [ENTRIES];

  routing_table #(.N_PORTS(N_PORTS), .N_RD(N_RD), .INIT(INIT)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < ENTRIES; a++) begin
      for (int r = 0; r < N_RD; r++) rd_addr[r] = ADDR_W'((a + 5 * r) % ENTRIES);
      #1;
      for (int r = 0; r < N_RD; r++)
        check({rd_dateline[r], rd_port[r]} == model[(a + 5 * r) % ENTRIES], "lookup");
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_port = 0; cfg_dateline = 0; rd_addr = '0;
    for (int a = 0; a < ENTRIES; a++) model[a] = {1'(a & 1), 2'(a % 3)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    read_all();
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 4'($urandom); cfg_port = 2'($urandom_range(0, 2));
      cfg_dateline = 1'($urandom);
      rd_addr[0] = cfg_addr; #1;
      check({rd_dateline[0], rd_port[0]} == model[cfg_addr], "old value until the edge");
      @(posedge clk); #1;
      model[cfg_addr] = {cfg_dateline, cfg_port};
      cfg_we = 0;
      check({rd_dateline[0], rd_port[0]} == model[cfg_addr], "new value after the edge");
    end
    @(negedge clk);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
