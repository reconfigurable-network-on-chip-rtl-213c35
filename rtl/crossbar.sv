// crossbar: the router's switch between input channels and output ports.
//
// Each output port takes the flit of the one input channel its arbiter
// granted (`sel[o]`, one-hot over the inputs) and signals `out_valid[o]`. The
// arbiters guarantee at most one grant per output; an input channel may be
// granted by at most one output, which the header decoders guarantee because
// each channel targets a single port. Written as an AND-OR multiplexer per
// output; purely combinational.
module crossbar #(
  parameter int N_IN  = 5,
  parameter int N_OUT = 3
) (
  input  noc_pkg::flit_t [N_IN-1:0]  in_flit,
  input  logic [N_OUT-1:0][N_IN-1:0] sel,
  output noc_pkg::flit_t [N_OUT-1:0] out_flit,
  output logic [N_OUT-1:0]           out_valid
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = |sel[o];
      for (int i = 0; i < N_IN; i++) begin
        if (sel[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
      end
    end
  end
endmodule
