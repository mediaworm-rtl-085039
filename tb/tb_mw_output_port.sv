// tb_mw_output_port: checks stage 5 (output VC buffers and VC multiplexer)
// at 4 VCs, 20-flit buffers. The driver acts as the switch allocator: it
// reserves a VC only when ovc_space says so and delivers the flit one cycle
// later. The downstream returns credits with random delays. Checks: per VC,
// flits leave in the order they came; never more flits in flight on a VC
// than the downstream buffer holds; at most one flit per cycle; ovc_space
// drops after 20 reservations without departures; when several VCs have
// flits and credits, the link is never idle and they are served in turn.
`timescale 1ns/1ps
module tb_mw_output_port;
  import mw_pkg::*;
  localparam int NV = 4, D = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic xin_valid, reserve_valid;
  logic [1:0] xin_vc, reserve_vc;
  flit_t xin_flit;
  logic [NV-1:0] ovc_space;
  link_t out_link;
  credit_t credit_in;
  int checks = 0, failures = 0;

  mw_output_port #(.N_VCS(NV), .DEPTH(D), .DN_DEPTH(D)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  logic [31:0] sent [NV][$];
  int seqno [NV];
  int inflight [NV];
  int pending_cred [NV];
  bit hold = 1;
  int n_rx = 0, n_space_low = 0, n_busy_cycles = 0;
  bit r_valid; logic [1:0] r_vc;

  // driven on the falling edge, so the router samples stable values
  always @(negedge clk) begin
    if (!rst_n) begin
      xin_valid <= 0; reserve_valid <= 0; credit_in <= '0; r_valid = 0;
      for (int v = 0; v < NV; v++) begin seqno[v] = 0; inflight[v] = 0; pending_cred[v] = 0; end
    end else begin
      credit_t c;
      // receive
      if (out_link.valid) begin
        int v;
        v = int'(out_link.vc);
        n_rx++;
        check(sent[v].size() > 0 && out_link.flit.data == sent[v][0], $sformatf("order on VC %0d", v));
        if (sent[v].size() > 0) void'(sent[v].pop_front());
        inflight[v]++;
        check(inflight[v] <= D, "downstream buffer overrun");
        pending_cred[v]++;
      end
      c = '0;
      if (!hold && ($urandom % 3 != 0))
        for (int v = 0; v < NV; v++)
          if (!c.valid && pending_cred[v] > 0) begin
            c.valid = 1; c.vc = VCID_W'(v); pending_cred[v]--; inflight[v]--;
          end
      credit_in <= c;
      // crossbar side: deliver last cycle's reservation, make a new one
      xin_valid <= r_valid;
      xin_vc    <= r_vc;
      if (r_valid) begin
        xin_flit.ftype <= FT_BODY;
        xin_flit.data  <= {r_vc, 30'(seqno[r_vc])};
        sent[r_vc].push_back({r_vc, 30'(seqno[r_vc])});
        seqno[r_vc]++;
      end
      r_vc = 2'($urandom);
      r_valid = ovc_space[r_vc] && ($urandom % 4 != 0);
      if (ovc_space != '1) n_space_low++;
      reserve_valid <= r_valid;
      reserve_vc    <= r_vc;
    end
  end

  initial begin
    xin_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // downstream holds credits: 20 flits per VC go out, then 20 more fill
    // the output buffer and ovc_space must drop
    repeat (300) @(posedge clk);
    check(n_rx == NV * D, $sformatf("%0d flits sent before credits ran out, expected %0d", n_rx, NV * D));
    check(ovc_space == '0, "space left after 40 reservations per VC");
    hold = 0;
    repeat (3000) @(posedge clk);
    hold = 1;
    repeat (100) @(posedge clk);
    hold = 0;
    repeat (300) @(posedge clk);
    check(n_space_low > 0, "ovc_space never dropped");
    check(n_rx > 1000, "too few flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // back-to-back service: with flits and credits on several VCs the link
  // must carry a flit every cycle
  always @(posedge clk) begin
    if (rst_n) begin
      int n;
      n = 0;
      for (int v = 0; v < NV; v++)
        if (!dut.fifo_empty[v] && dut.dn_cred[v] != 0) n++;
      if (n > 1) begin
        n_busy_cycles++;
        check(dut.mux_any, "VC multiplexer idle with eligible VCs");
      end
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
