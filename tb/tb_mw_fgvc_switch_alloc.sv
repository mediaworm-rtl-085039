// tb_mw_fgvc_switch_alloc: checks the FGVC crossbar input multiplexer and
// the crossbar output conflict resolution at 4 ports x 4 VCs.
// Each trial draws random ready VCs, routes, free output-VC space, tail
// flags and timestamps (offsets from a random base, so the 32-bit stamps
// often wrap through zero). The model, working on the offsets, picks per
// input the eligible VC with the smallest offset (lowest VC on a tie) and
// per output the requesting input with the smallest offset (lowest input on
// a tie); pops, crossbar selections, output VCs and releases must match it.
`timescale 1ns/1ps
module tb_mw_fgvc_switch_alloc;
  import mw_pkg::*;
  localparam int NP = 4, NV = 4;
  logic [NV-1:0] ready [NP];
  ts_t           stamp [NP][NV];
  logic [NV-1:0] tail  [NP];
  logic [1:0]    out_port [NP][NV];
  logic [1:0]    out_vc   [NP][NV];
  logic [NV-1:0] ovc_space [NP];
  logic [NV-1:0] pop [NP];
  logic [1:0]    in_sel_vc [NP];
  logic [NP-1:0] x_valid, rel_valid;
  logic [1:0]    x_src [NP], x_vc [NP], rel_vc [NP];
  int checks = 0, failures = 0;

  mw_fgvc_switch_alloc #(.N_PORTS(NP), .N_VCS(NV)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  int n_in_contention = 0, n_out_conflict = 0;
  initial begin
    for (int t = 0; t < 5000; t++) begin
      int off [NP][NV];
      int a_v [NP];
      int x_p [NP];
      ts_t base;
      base = ts_t'($urandom);
      for (int p = 0; p < NP; p++) begin
        ready[p] = 4'($urandom);
        tail[p]  = 4'($urandom);
        ovc_space[p] = 4'($urandom | $urandom);
        for (int v = 0; v < NV; v++) begin
          off[p][v] = $urandom % ((t % 2) ? 8 : 100000);
          stamp[p][v] = base + ts_t'(off[p][v]);
          out_port[p][v] = 2'($urandom);
          out_vc[p][v] = 2'($urandom);
        end
      end
      #1;
      for (int p = 0; p < NP; p++) begin
        int n;
        a_v[p] = -1; n = 0;
        for (int v = 0; v < NV; v++)
          if (ready[p][v] && ovc_space[out_port[p][v]][out_vc[p][v]]) begin
            n++;
            if (a_v[p] < 0 || off[p][v] < off[p][a_v[p]]) a_v[p] = v;
          end
        if (n > 1) n_in_contention++;
        if (a_v[p] >= 0) check(int'(in_sel_vc[p]) == a_v[p], $sformatf("input %0d selects VC %0d, expected %0d", p, in_sel_vc[p], a_v[p]));
      end
      for (int q = 0; q < NP; q++) begin
        int n;
        x_p[q] = -1; n = 0;
        for (int p = 0; p < NP; p++)
          if (a_v[p] >= 0 && int'(out_port[p][a_v[p]]) == q) begin
            n++;
            if (x_p[q] < 0 || off[p][a_v[p]] < off[x_p[q]][a_v[x_p[q]]]) x_p[q] = p;
          end
        if (n > 1) n_out_conflict++;
        check(x_valid[q] == (x_p[q] >= 0), "output valid");
        if (x_p[q] >= 0) begin
          check(int'(x_src[q]) == x_p[q], $sformatf("output %0d source %0d, expected %0d", q, x_src[q], x_p[q]));
          check(x_vc[q] == out_vc[x_p[q]][a_v[x_p[q]]], "output VC");
          check(rel_valid[q] == tail[x_p[q]][a_v[x_p[q]]], "release on tail");
          if (rel_valid[q]) check(rel_vc[q] == x_vc[q], "released VC");
        end else check(!rel_valid[q], "release without crossing");
      end
      for (int p = 0; p < NP; p++) begin
        logic [NV-1:0] e;
        e = '0;
        if (a_v[p] >= 0 && x_p[out_port[p][a_v[p]]] == p) e[a_v[p]] = 1'b1;
        check(pop[p] == e, $sformatf("pop of input %0d", p));
      end
      #1;
    end
    check(n_in_contention > 100 && n_out_conflict > 100, "too little contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
