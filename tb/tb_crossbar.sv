// tb_crossbar: random one-hot selections (or none) per output; each output
// must carry exactly the selected input's flit and flag valid, and carry
// nothing when no input is selected.
module tb_crossbar;
  import noc_pkg::*;
  localparam int N_IN = 5, N_OUT = 3;
  flit_t [N_IN-1:0] in_flit;
  logic [N_OUT-1:0][N_IN-1:0] sel;
  flit_t [N_OUT-1:0] out_flit;
  logic [N_OUT-1:0] out_valid;
  int checks = 0, failures = 0;
  int pick [N_OUT];

  crossbar #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N_IN; i++) begin
        in_flit[i].ftype = flit_type_e'($urandom_range(0, 2));
        in_flit[i].data  = 16'($urandom);
      end
      for (int o = 0; o < N_OUT; o++) begin
        pick[o] = $urandom_range(0, N_IN);   // N_IN means no selection
        sel[o] = (pick[o] < N_IN) ? (N_IN'(1) << pick[o]) : '0;
      end
      #1;
      for (int o = 0; o < N_OUT; o++) begin
        if (pick[o] < N_IN) check(out_valid[o] && out_flit[o] == in_flit[pick[o]], "selected flit");
        else                check(!out_valid[o] && out_flit[o] == '0, "idle output");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
