// rr_prio_arbiter: two-level arbiter, fixed priority between two classes and
// round robin inside each class.
//
// Requests whose `hi` bit is set (inputs from neighbouring routers) always win
// over the others (the processor input, which software drives and which is
// therefore slower). Among the requests of the winning class the grant goes
// round robin: the search starts just after the requester granted last, so
// every requester of equal priority is served in turn. `grant` is one-hot (or
// zero when nothing requests) and `grant_idx` is its index. The pointer moves
// only when `update` is high, so a grant that is not used does not cost the
// requester its turn. One shared pointer for both classes is this
// implementation's choice.
//
// Timing: grant is combinational from req; the pointer updates on the clock.
module rr_prio_arbiter #(
  parameter int N = 5,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  hi,
  input  logic          update,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx
);
  logic [IW-1:0] last;
  logic [N-1:0]  eff;

  // Restrict to the high class whenever it has a request.
  assign eff = (|(req & hi)) ? (req & hi) : req;

  always_comb begin
    grant_idx = '0;
    for (int k = N; k >= 1; k--) begin
      if (eff[(int'(last) + k) % N]) grant_idx = IW'((int'(last) + k) % N);
    end
    grant = (|eff) ? (N'(1) << grant_idx) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N - 1);
    else if (update && |eff)   last <= grant_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
