// tb_mw_vc_alloc: checks the stage-3 output-VC arbitration at 3 ports x 4
// VCs (12 requesters). A model keeps which output VCs are held. Each cycle
// random requesters ask for random (port, VC) pairs and random held VCs are
// released. Checks: at most one grant per output port per cycle, only to a
// requester whose VC is free, never two grants for one VC, the busy state
// and the per-port load equal the model, and a requester that keeps asking
// for a VC that stays free is granted within 12 cycles (round robin).
`timescale 1ns/1ps
module tb_mw_vc_alloc;
  localparam int NP = 3, NV = 4, NR = NP * NV, LW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NR-1:0] req, gnt;
  logic [1:0] req_port [NR];
  logic [1:0] req_ovc  [NR];
  logic [NP-1:0] rel_valid;
  logic [1:0] rel_vc [NP];
  logic [NV-1:0] ovc_busy [NP];
  logic [LW-1:0] port_load [NP];
  int checks = 0, failures = 0;
  bit busy [NP][NV];
  int waiting [NR];
  logic [NR-1:0] g;

  mw_vc_alloc #(.N_PORTS(NP), .N_VCS(NV), .LOAD_W(LW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  int n_grants = 0, n_blocked = 0;
  initial begin
    req = 0; rel_valid = 0;
    for (int r = 0; r < NR; r++) begin req_port[r] = 0; req_ovc[r] = 0; waiting[r] = 0; end
    for (int q = 0; q < NP; q++) begin rel_vc[q] = 0; for (int v = 0; v < NV; v++) busy[q][v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    g = '0;
    for (int i = 0; i < 3000; i++) begin
      int ng [NP];
      bit taken [NP][NV];
      @(negedge clk);
      // inputs change only on the falling edge; granted requesters drop out
      req = req & ~g;
      // requests: a requester keeps its target while it waits
      for (int r = 0; r < NR; r++) begin
        if (!req[r] && ($urandom % 3 == 0)) begin
          req[r] = 1; req_port[r] = 2'($urandom % NP); req_ovc[r] = 2'($urandom % NV);
        end
      end
      for (int q = 0; q < NP; q++) begin
        int v;
        v = $urandom % NV;
        rel_valid[q] = busy[q][v] && ($urandom % 2);
        rel_vc[q] = 2'(v);
      end
      #1;
      for (int q = 0; q < NP; q++) begin
        int ld;
        ng[q] = 0; ld = 0;
        for (int v = 0; v < NV; v++) begin
          taken[q][v] = 0;
          check(ovc_busy[q][v] == busy[q][v], $sformatf("busy state port %0d vc %0d: %0d model %0d cycle %0d", q, v, ovc_busy[q][v], busy[q][v], i));
          ld += busy[q][v];
        end
        check(int'(port_load[q]) == ld, "port load");
      end
      for (int r = 0; r < NR; r++) begin
        if (gnt[r]) begin
          check(req[r], "grant without request");
          check(!busy[req_port[r]][req_ovc[r]], "grant of a held VC");
          check(!taken[req_port[r]][req_ovc[r]], "two grants for one VC");
          taken[req_port[r]][req_ovc[r]] = 1;
          ng[req_port[r]]++;
          n_grants++;
        end else if (req[r] && busy[req_port[r]][req_ovc[r]]) n_blocked++;
      end
      for (int q = 0; q < NP; q++) check(ng[q] <= 1, "more than one grant per port");
      g = gnt;
      @(posedge clk);
      for (int q = 0; q < NP; q++) if (rel_valid[q]) busy[q][rel_vc[q]] = 0;
      for (int r = 0; r < NR; r++) begin
        if (g[r]) begin busy[req_port[r]][req_ovc[r]] = 1; waiting[r] = 0; end
        else if (req[r] && !busy[req_port[r]][req_ovc[r]]) begin
          waiting[r]++;
          check(waiting[r] <= NR, "requester starved");
        end else waiting[r] = 0;   // count only cycles of unbroken eligibility
      end
    end
    check(n_grants > 100 && n_blocked > 100, "too little traffic");
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
