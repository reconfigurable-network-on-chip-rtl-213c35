// tb_header_decoder: the testbench plays the routing table (a fixed random
// map from address to {dateline, port}). For a channel on port 0, VC 1, it
// sends packets of random length and destination and checks the output port
// and virtual channel of the header against the dateline rule, and that
// normal and tail flits keep the header's route although their data would
// index other table entries.
module tb_header_decoder;
  import noc_pkg::*;
  localparam int IN_PORT = 0, IN_VC = 1;
  logic clk = 0, rst_n = 0;
  logic valid, tbl_dateline, is_head, is_tail, advance;
  flit_t head;
  logic [ADDR_W-1:0] tbl_addr;
  logic [1:0] tbl_port, out_port;
  logic [0:0] out_vc;
  int checks = 0, failures = 0;
  logic [2:0] table_m [16];
  int n_dl = 0, n_keep = 0, n_turn = 0;

  header_decoder #(.N_NET(2), .N_VC(2), .IN_PORT(IN_PORT), .IN_VC(IN_VC)) dut (.*);
  always #5 clk = ~clk;

  assign {tbl_dateline, tbl_port} = table_m[tbl_addr];

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
    logic [1:0] ep;
    logic       ev;
    int len;
    for (int a = 0; a < 16; a++) table_m[a] = {1'($urandom), 2'($urandom_range(0, 2))};
    valid = 0; head = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 200; pkt++) begin
      @(negedge clk);
      valid = 1;
      head.ftype = FT_HEAD; head.data = 16'($urandom);
      // idle cycles with the header waiting: route must not latch
      advance = 0;
      #1;
      ep = table_m[head.data[3:0]][1:0];
      if (ep == 2)                          ev = 0;
      else if (table_m[head.data[3:0]][2]) ev = 1;
      else if (ep == IN_PORT)               ev = IN_VC;
      else                                  ev = 0;
      if (ep != 2 && table_m[head.data[3:0]][2]) n_dl++;
      else if (ep == IN_PORT)                    n_keep++;
      else if (ep == 1)                          n_turn++;
      check(is_head && !is_tail, "header recognised");
      check(out_port == ep && out_vc == ev, "header route and channel");
      @(negedge clk);
      advance = 1;
      @(negedge clk);
      len = $urandom_range(1, 4);
      for (int k = 0; k < len; k++) begin
        head.ftype = (k == len - 1) ? FT_TAIL : FT_BODY;
        head.data = 16'($urandom);
        advance = $urandom_range(0, 1);
        #1;
        check(!is_head && is_tail == (k == len - 1), "flit type");
        check(out_port == ep && out_vc == ev, "route held for the packet");
        if (!advance) begin
          @(negedge clk); advance = 1; #1;
        end
        @(negedge clk);
      end
      advance = 0; valid = 0;
    end
    check(n_dl > 0 && n_keep > 0 && n_turn > 0, "all channel rules exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
