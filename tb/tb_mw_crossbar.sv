// tb_mw_crossbar: checks the registered n x n crossbar at 8 ports.
// Random flits on all inputs and random selections (including several
// outputs reading one input, a broadcast the allocator never makes but the
// crossbar must still carry); one cycle later each valid output must hold
// the selected input's flit and the output VC it was sent with.
`timescale 1ns/1ps
module tb_mw_crossbar;
  import mw_pkg::*;
  localparam int NP = 8, NV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  flit_t in_flit [NP];
  logic [NP-1:0] x_valid, out_valid;
  logic [2:0] x_src [NP];
  logic [3:0] x_vc [NP], out_vc [NP];
  flit_t out_flit [NP];
  int checks = 0, failures = 0;

  mw_crossbar #(.N_PORTS(NP), .N_VCS(NV)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    flit_t exp_f [NP];
    logic [3:0] exp_vc [NP];
    logic [NP-1:0] exp_v;
    x_valid = 0;
    for (int p = 0; p < NP; p++) begin in_flit[p] = '0; x_src[p] = 0; x_vc[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom});
        x_src[p]   = 3'($urandom);
        x_vc[p]    = 4'($urandom);
      end
      x_valid = NP'($urandom);
      for (int q = 0; q < NP; q++) begin
        exp_f[q] = in_flit[x_src[q]]; exp_vc[q] = x_vc[q];
      end
      exp_v = x_valid;
      @(negedge clk);
      check(out_valid == exp_v, "valid bits");
      for (int q = 0; q < NP; q++)
        if (exp_v[q]) begin
          check(out_flit[q] == exp_f[q], $sformatf("flit on output %0d", q));
          check(out_vc[q] == exp_vc[q], "output VC");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
