// tb_mw_router: end-to-end test of the MediaWorm router at its default size
// (8 ports, 16 VCs per port, 20-flit buffers, 32-bit flits).
//
// Phase 1 sends one 20-flit message through the idle router and checks the
// pipeline latency: the router samples the head flit on its input at one
// clock edge and the downstream samples it on the output 6 edges later;
// the other flits follow one per cycle.
//
// Phase 2 runs mixed traffic: VCs 0..7 are real-time (each message carries
// a Vtick between 2 and 100), VCs 8..15 best-effort. Every source sends
// MSGS_PER_SRC messages of 20 flits to random outputs and output VCs of its
// class, interleaving up to 16 messages on its VCs and obeying credits. The
// sinks hold their credits back in random bursts so that buffers fill and
// the schedulers see contention. Body flits carry {source port, source VC,
// message number, flit index}, so the sinks check that every flit arrives
// on the right port and VC, in order, exactly once.
//
// A monitor checks every FGVC decision at the crossbar input multiplexers:
// the chosen flit has the smallest timestamp of the eligible flits, and a
// best-effort flit never wins while a real-time one is eligible. It also
// counts how often each mechanism occurred (stage-3 waits for a busy output
// VC, crossbar output conflicts, full output buffers, downstream credit
// stalls, multiplexer contention); one that never occurred is a failure.
`timescale 1ns/1ps
module tb_mw_router;
  import mw_pkg::*;

  localparam int NP  = 8;
  localparam int NV  = 16;
  localparam int DEP = 20;
  localparam int LEN = 20;
  localparam int MSGS_PER_SRC = 48;
  localparam logic [NV-1:0] RT_MASK = 16'h00FF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t   in_link    [NP];
  credit_t credit_out [NP];
  link_t   out_link   [NP];
  credit_t credit_in  [NP];

  mw_router dut (
    .clk, .rst_n, .rt_vc_mask(RT_MASK),
    .in_link, .credit_out, .out_link, .credit_in
  );

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- message list ----------------
  typedef struct {
    int dest;
    int ovc;
    int ivc;
    int vtick;
  } msg_t;

  msg_t msgs [NP][MSGS_PER_SRC];
  bit   delivered [NP][MSGS_PER_SRC];

  // ---------------- sources ----------------
  bit  src_enable = 1'b0;
  int  src_next   [NP];          // next message to start
  int  vc_msg     [NP][NV];      // message in progress on a VC, -1 if none
  int  vc_idx     [NP][NV];      // next flit index
  int  src_cred   [NP][NV];
  int  src_rr     [NP];
  int  sent_msgs = 0;

  // directed single message
  bit  dir_go = 1'b0;
  int  dir_idx = 0;
  int  dir_t0 = -1;

  function automatic flit_t make_flit(int p, int m, int idx);
    flit_t f;
    if (idx == 0) begin
      f.ftype = FT_HEAD;
      f.data  = make_header(DEST_W'(msgs[p][m].dest), VCID_W'(msgs[p][m].ovc),
                            VTICK_W'(msgs[p][m].vtick));
    end else begin
      f.ftype = (idx == LEN - 1) ? FT_TAIL : FT_BODY;
      f.data  = {4'(p), 4'(msgs[p][m].ivc), 8'(m), 16'(idx)};
    end
    return f;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        in_link[p] <= '0;
        src_next[p] = 0;
        src_rr[p]   = 0;
        for (int v = 0; v < NV; v++) begin
          vc_msg[p][v]   = -1;
          vc_idx[p][v]   = 0;
          src_cred[p][v] = DEP;
        end
      end
    end else begin
      for (int p = 0; p < NP; p++) begin
        link_t l;
        l = '0;
        if (credit_out[p].valid) src_cred[p][int'(credit_out[p].vc)]++;
        if (dir_go && p == 0) begin
          // phase 1: message 0 of port 0, back to back
          if (dir_idx < LEN) begin
            l.valid = 1'b1;
            l.vc    = VCID_W'(msgs[0][0].ivc);
            l.flit  = make_flit(0, 0, dir_idx);
            if (dir_idx == 0) dir_t0 = cyc;
            src_cred[0][msgs[0][0].ivc]--;
            dir_idx++;
          end
        end else if (src_enable) begin
          // start the next message if its input VC is free
          if (src_next[p] < MSGS_PER_SRC && vc_msg[p][msgs[p][src_next[p]].ivc] < 0) begin
            vc_msg[p][msgs[p][src_next[p]].ivc] = src_next[p];
            vc_idx[p][msgs[p][src_next[p]].ivc] = 0;
            src_next[p]++;
          end
          // send one flit, round robin over VCs with a message and a credit
          for (int k = 0; k < NV; k++) begin
            int v;
            v = (src_rr[p] + k) % NV;
            if (!l.valid && vc_msg[p][v] >= 0 && src_cred[p][v] > 0) begin
              l.valid = 1'b1;
              l.vc    = VCID_W'(v);
              l.flit  = make_flit(p, vc_msg[p][v], vc_idx[p][v]);
              src_cred[p][v]--;
              vc_idx[p][v]++;
              if (vc_idx[p][v] == LEN) begin
                vc_msg[p][v] = -1;
                sent_msgs++;
              end
              src_rr[p] = (v + 1) % NV;
            end
          end
        end
        in_link[p] <= l;
      end
    end
  end

  // ---------------- sinks ----------------
  bit  sink_stall_en = 1'b0;
  bit  stall   [NP];
  int  pend    [NP][NV];
  int  rx_src  [NP][NV];
  int  rx_msg  [NP][NV];
  int  rx_next [NP][NV];
  int  rx_msgs = 0;
  int  rx_flits = 0;
  int  dir_head_t = -1;
  int  dir_tail_t = -1;
  int  dir_flits = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < NP; q++) begin
        credit_in[q] <= '0;
        stall[q] = 1'b0;
        for (int v = 0; v < NV; v++) begin
          pend[q][v]    = 0;
          rx_next[q][v] = 0;
          rx_src[q][v]  = -1;
          rx_msg[q][v]  = -1;
        end
      end
    end else begin
      for (int q = 0; q < NP; q++) begin
        credit_t c;
        c = '0;
        if (out_link[q].valid) begin
          int v;
          flit_t f;
          v = int'(out_link[q].vc);
          f = out_link[q].flit;
          rx_flits++;
          pend[q][v]++;
          if (dir_go) begin
            if (dir_flits == 0) dir_head_t = cyc;
            dir_flits++;
            if (is_tail(f.ftype)) dir_tail_t = cyc;
          end
          if (rx_next[q][v] == 0) begin
            check(f.ftype == FT_HEAD, "message does not start with a head flit");
            check(int'(hdr_dest(f.data)) == q, $sformatf("head on port %0d for dest %0d", q, hdr_dest(f.data)));
            check(int'(hdr_ovc(f.data)) == v, "head on wrong output VC");
            rx_next[q][v] = 1;
          end else begin
            int sp, sv, sm, si;
            sp = int'(f.data[31:28]);
            sv = int'(f.data[27:24]);
            sm = int'(f.data[23:16]);
            si = int'(f.data[15:0]);
            if (rx_next[q][v] == 1) begin
              rx_src[q][v] = sp;
              rx_msg[q][v] = sm;
              check(msgs[sp][sm].dest == q && msgs[sp][sm].ovc == v && msgs[sp][sm].ivc == sv,
                    "message delivered to wrong port or VC");
            end
            check(sp == rx_src[q][v] && sm == rx_msg[q][v], "flits of two messages mixed on one VC");
            check(si == rx_next[q][v], $sformatf("flit index %0d, expected %0d", si, rx_next[q][v]));
            check(is_tail(f.ftype) == (si == LEN - 1), "tail flag wrong");
            rx_next[q][v]++;
            if (is_tail(f.ftype)) begin
              check(!delivered[sp][sm], "message delivered twice");
              delivered[sp][sm] = 1'b1;
              rx_msgs++;
              rx_next[q][v] = 0;
            end
          end
        end
        // credit return, one per cycle, held back while stalled
        if (sink_stall_en && ($urandom % 64) == 0) stall[q] = !stall[q];
        if (!sink_stall_en) stall[q] = 1'b0;
        if (!stall[q]) begin
          for (int v = 0; v < NV; v++) begin
            if (!c.valid && pend[q][v] > 0) begin
              c.valid = 1'b1;
              c.vc    = VCID_W'(v);
              pend[q][v]--;
            end
          end
        end
        credit_in[q] <= c;
      end
    end
  end

  // ---------------- FGVC monitor and mechanism counters ----------------
  int n_mux_contention = 0;
  int n_rt_over_be = 0;
  int n_vc_wait = 0;
  int n_xbar_conflict = 0;
  int n_out_full = 0;
  int n_dn_stall = 0;
  int n_head = 0;
  int n_bypass = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if ((dut.va_req & ~dut.va_gnt) != '0) n_vc_wait++;
      for (int p = 0; p < NP; p++) begin
        int  n_elig;
        bit  rt_elig;
        n_elig  = 0;
        rt_elig = 1'b0;
        for (int v = 0; v < NV; v++) begin
          if (dut.u_sa.ready[p][v]) begin
            if (dut.u_sa.ovc_space[dut.u_sa.out_port[p][v]][dut.u_sa.out_vc[p][v]]) begin
              n_elig++;
              if (RT_MASK[v]) rt_elig = 1'b1;
            end else begin
              n_out_full++;
            end
          end
        end
        if (n_elig > 1) begin
          int s;
          n_mux_contention++;
          s = int'(dut.u_sa.in_sel_vc[p]);
          for (int v = 0; v < NV; v++)
            if (dut.u_sa.ready[p][v] && dut.u_sa.ovc_space[dut.u_sa.out_port[p][v]][dut.u_sa.out_vc[p][v]])
              check(!ts_before(dut.u_sa.stamp[p][v], dut.u_sa.stamp[p][s]),
                    $sformatf("input %0d: VC %0d chosen over earlier VC %0d", p, s, v));
          if (rt_elig && !RT_MASK[s]) check(1'b0, "best-effort flit beat a real-time flit");
          if (rt_elig && (n_elig > 1)) n_rt_over_be += (RT_MASK[s] ? 1 : 0);
        end
        if (dut.u_sa.pop[p] != '0) begin
          if (is_head(dut.hol_flit[p][dut.u_sa.in_sel_vc[p]].flit.ftype)) n_head++;
          else n_bypass++;
        end
      end
      for (int q = 0; q < NP; q++) begin
        int n;
        n = 0;
        for (int p = 0; p < NP; p++)
          if (dut.u_sa.a_valid[p] && int'(dut.u_sa.a_port[p]) == q) n++;
        if (n > 1) n_xbar_conflict++;
      end
    end
  end

  for (genvar q = 0; q < NP; q++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        for (int v = 0; v < NV; v++)
          if (!dut.g_out[q].u_out.fifo_empty[v] && dut.g_out[q].u_out.dn_cred[v] == 0)
            n_dn_stall++;
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    for (int p = 0; p < NP; p++) begin
      for (int m = 0; m < MSGS_PER_SRC; m++) begin
        bit rt;
        rt = ($urandom % 2) == 0;
        msgs[p][m].dest  = $urandom % NP;
        msgs[p][m].ivc   = (rt ? 0 : 8) + ($urandom % 8);
        msgs[p][m].ovc   = (rt ? 0 : 8) + ($urandom % 8);
        msgs[p][m].vtick = rt ? 2 + ($urandom % 99) : 0;
        delivered[p][m]  = 1'b0;
      end
    end
    msgs[0][0].dest = 5;
    msgs[0][0].ovc  = 3;
    msgs[0][0].ivc  = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // phase 1: latency through the idle router
    dir_go = 1'b1;
    repeat (60) @(posedge clk);
    check(dir_flits == LEN, $sformatf("directed message: %0d flits arrived", dir_flits));
    check(dir_head_t - dir_t0 == 7, $sformatf("head latency %0d edges, expected 7 (6 in the router)", dir_head_t - dir_t0));
    check(dir_tail_t - dir_head_t == LEN - 1, $sformatf("flits not back to back: %0d", dir_tail_t - dir_head_t));
    dir_go = 1'b0;
    delivered[0][0] = 1'b1;
    src_next[0] = 1;

    // phase 2: mixed random traffic
    rx_msgs = 1;
    sink_stall_en = 1'b1;
    src_enable = 1'b1;
    wait (sent_msgs == NP * MSGS_PER_SRC - 1);
    sink_stall_en = 1'b0;
    wait (rx_msgs == NP * MSGS_PER_SRC);
    repeat (50) @(posedge clk);
    for (int p = 0; p < NP; p++)
      for (int m = 0; m < MSGS_PER_SRC; m++)
        check(delivered[p][m], $sformatf("message %0d of source %0d lost", m, p));
    check(rx_flits == NP * MSGS_PER_SRC * LEN, $sformatf("%0d flits received", rx_flits));

    $display("mechanisms: head=%0d bypass=%0d vc_wait=%0d mux_contention=%0d rt_over_be=%0d xbar_conflict=%0d out_full=%0d dn_stall=%0d",
             n_head, n_bypass, n_vc_wait, n_mux_contention, n_rt_over_be, n_xbar_conflict, n_out_full, n_dn_stall);
    check(n_head > 0, "no head flit routed");
    check(n_bypass > 0, "no body flit bypassed stages 2-3");
    check(n_vc_wait > 0, "no stage-3 wait for a busy output VC");
    check(n_mux_contention > 0, "no contention at a crossbar input multiplexer");
    check(n_rt_over_be > 0, "no real-time flit chosen over a best-effort one");
    check(n_xbar_conflict > 0, "no crossbar output conflict");
    check(n_out_full > 0, "no full output buffer");
    check(n_dn_stall > 0, "no downstream credit stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: sent=%0d received=%0d", sent_msgs, rx_msgs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
