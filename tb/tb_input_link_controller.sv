// tb_input_link_controller: checks the per-channel acknowledge (high exactly
// while the channel's buffer has room), that accepted well-formed flits are
// pushed on the right channel, and that framing violations (normal flit
// without header, second header inside a packet, reserved code) are accepted
// but not pushed and raise proto_err for one cycle.
module tb_input_link_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_req;
  logic [0:0] wr_vc, push_vc;
  flit_t wr_flit, push_flit;
  logic [1:0] wr_ack, buf_full;
  logic push, proto_err;
  int checks = 0, failures = 0;
  int n_err = 0;

  input_link_controller #(.N_VC(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Offer one flit for one cycle (buffer has room) and check the response.
  task automatic send(logic vc, flit_type_e t, bit expect_push);
    @(negedge clk);
    wr_req = 1; wr_vc = vc; wr_flit.ftype = t; wr_flit.data = 16'($urandom);
    #1;
    check(wr_ack == ~buf_full, "ack follows buffer room");
    check(push == expect_push, "push");
    if (expect_push) check(push_vc == vc && push_flit == wr_flit, "pushed flit");
    @(posedge clk); #1;
    check(proto_err == !expect_push, "proto_err");
    wr_req = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_req = 0; wr_vc = 0; wr_flit = '0; buf_full = 2'b00;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(0, FT_BODY, 0);            // no header yet
    send(0, FT_HEAD, 1);
    send(1, FT_TAIL, 0);            // channel 1 has no open packet
    send(1, FT_HEAD, 1);
    send(0, FT_BODY, 1);
    send(0, FT_HEAD, 0);            // header inside a packet
    send(1, FT_BODY, 1);
    send(0, FT_RSVD, 0);
    send(0, FT_TAIL, 1);
    send(1, FT_TAIL, 1);
    send(0, FT_TAIL, 0);            // packet already closed
    // Full channel: no ack, no push.
    @(negedge clk);
    buf_full = 2'b01; wr_req = 1; wr_vc = 0; wr_flit.ftype = FT_HEAD;
    #1;
    check(wr_ack == 2'b10, "ack vector with channel 0 full");
    check(!push, "no push into full channel");
    wr_req = 0;
    @(negedge clk);
    wr_req = 1; wr_vc = 1; wr_flit.ftype = FT_HEAD;
    #1;
    check(push && push_vc == 1, "other channel still accepts");
    @(negedge clk);
    wr_req = 0; buf_full = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
