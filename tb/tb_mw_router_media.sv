// tb_mw_router_media: bandwidth guarantee of the MediaWorm router under
// overload, at its default size (8 ports, 16 VCs, 20-flit buffers).
//
// All traffic goes to output 0, whose link carries one flit per cycle, and
// is offered about twice that. Two real-time streams are paced like video
// sources with a regulator:
//   stream 0: input 1, VC 0, Vtick 2 (half the link), 20-flit messages
//             released every 40 cycles;
//   stream 1: input 3, VC 1, Vtick 8 (an eighth of the link), messages
//             released every 160 cycles.
// Best-effort messages (Vtick forced to the maximum) keep inputs 1 to 4
// saturated on VCs 8 to 12, so stream 0 competes with best-effort flits at
// its crossbar input multiplexer and every input competes at output 0.
//
// Checks:
//   * every flit arrives once, in order, on its VC;
//   * every real-time message is delivered within its own service time
//     (20 x Vtick cycles) plus a fixed slack after its release, so the
//     streams get their rate with bounded jitter;
//   * in the steady window the output link is busy nearly every cycle and
//     best-effort traffic receives at least 80% of the bandwidth left over
//     by the streams (the scheduler is work conserving);
//   * real-time flits did win against best-effort flits at the crossbar
//     input multiplexer and at the crossbar output.
// Plain round robin would give stream 0 only about a quarter of the link
// here, and its messages would fall further behind with every release.
`timescale 1ns/1ps
module tb_mw_router_media;
  import mw_pkg::*;

  localparam int NP  = 8;
  localparam int NV  = 16;
  localparam int DEP = 20;
  localparam int LEN = 20;
  localparam int NS  = 7;            // streams
  localparam int T0  = 100;          // first release
  localparam int RUN = 1600;         // cycles of paced traffic
  localparam int SLACK = 40;         // allowed extra delay of a message
  localparam logic [NV-1:0] RT_MASK = 16'h00FF;

  // stream table: source port, VC (also the output VC), Vtick (0 = best effort),
  // number of messages (best effort: until the end of the run)
  localparam int S_SRC [NS] = '{1, 3, 1, 2, 2, 3, 4};
  localparam int S_VC  [NS] = '{0, 1, 8, 9, 10, 11, 12};
  localparam int S_VT  [NS] = '{2, 8, 0, 0, 0, 0, 0};

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic int n_msgs(int s);
    return (S_VT[s] == 0) ? 1 << 30 : RUN / (LEN * S_VT[s]);
  endfunction

  function automatic int release_time(int s, int m);
    return T0 + m * LEN * S_VT[s];
  endfunction

  // ---------------- sources ----------------
  int  s_msg  [NS];
  int  s_idx  [NS];
  int  s_cred [NS];
  int  sent_flits [NS];
  bit  be_stop = 1'b0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) in_link[p] <= '0;
      for (int s = 0; s < NS; s++) begin
        s_msg[s] = 0; s_idx[s] = 0; s_cred[s] = DEP; sent_flits[s] = 0;
      end
    end else begin
      for (int s = 0; s < NS; s++)
        if (credit_out[S_SRC[s]].valid && int'(credit_out[S_SRC[s]].vc) == S_VC[s]) s_cred[s]++;
      for (int p = 0; p < NP; p++) begin
        link_t l;
        l = '0;
        // streams are listed real-time first, so a source serves its
        // real-time stream before its best-effort ones
        for (int s = 0; s < NS; s++) begin
          bit avail;
          if (S_VT[s] != 0) avail = s_msg[s] < n_msgs(s) && cyc >= release_time(s, s_msg[s]);
          else              avail = cyc >= T0 && (s_idx[s] != 0 || !be_stop);
          if (!l.valid && S_SRC[s] == p && avail && s_cred[s] > 0) begin
            l.valid = 1'b1;
            l.vc    = VCID_W'(S_VC[s]);
            if (s_idx[s] == 0)
              l.flit = '{ftype: FT_HEAD,
                         data: make_header(8'd0, VCID_W'(S_VC[s]),
                                           (S_VT[s] == 0) ? VTICK_BE : VTICK_W'(S_VT[s]))};
            else
              l.flit = '{ftype: (s_idx[s] == LEN - 1) ? FT_TAIL : FT_BODY,
                         data: {8'(s), 8'(s_msg[s]), 16'(s_idx[s])}};
            s_cred[s]--;
            sent_flits[s]++;
            s_idx[s]++;
            if (s_idx[s] == LEN) begin
              s_idx[s] = 0;
              s_msg[s]++;
            end
          end
        end
        in_link[p] <= l;
      end
    end
  end

  // ---------------- sink on output 0 ----------------
  int  r_msg  [NS];
  int  r_idx  [NS];
  int  rx_flits [NS];
  int  win_flits_rt = 0;
  int  win_flits_be = 0;
  int  win_busy = 0;
  int  max_late = -1000000;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < NP; q++) credit_in[q] <= '0;
      for (int s = 0; s < NS; s++) begin r_msg[s] = 0; r_idx[s] = 0; rx_flits[s] = 0; end
    end else begin
      credit_t c;
      c = '0;
      for (int q = 1; q < NP; q++) check(!out_link[q].valid, "flit on an output no message was sent to");
      if (out_link[0].valid) begin
        int s;
        flit_t f;
        f = out_link[0].flit;
        s = -1;
        for (int k = 0; k < NS; k++) if (S_VC[k] == int'(out_link[0].vc)) s = k;
        c.valid = 1'b1;
        c.vc    = out_link[0].vc;
        if (s < 0) begin
          check(1'b0, "flit on an unused VC");
        end else begin
          rx_flits[s]++;
          if (cyc >= T0 + 200 && cyc < T0 + RUN) begin
            win_busy++;
            if (S_VT[s] != 0) win_flits_rt++; else win_flits_be++;
          end
          if (r_idx[s] == 0) begin
            check(f.ftype == FT_HEAD, "message does not start with a head flit");
            check(int'(hdr_ovc(f.data)) == S_VC[s], "head on wrong VC");
          end else begin
            check(int'(f.data[31:24]) == s && int'(f.data[23:16]) == (r_msg[s] & 255) &&
                  int'(f.data[15:0]) == r_idx[s],
                  $sformatf("stream %0d: flit out of order", s));
            check(is_tail(f.ftype) == (r_idx[s] == LEN - 1), "tail flag wrong");
          end
          r_idx[s]++;
          if (r_idx[s] == LEN) begin
            if (S_VT[s] != 0) begin
              int late;
              late = cyc - (release_time(s, r_msg[s]) + LEN * S_VT[s]);
              if (late > max_late) max_late = late;
              check(late <= SLACK, $sformatf("stream %0d message %0d late by %0d cycles", s, r_msg[s], late));
            end
            r_idx[s] = 0;
            r_msg[s]++;
          end
        end
      end
      credit_in[0] <= c;
    end
  end

  // ---------------- scheduler monitor ----------------
  int n_rt_over_be = 0;     // input multiplexer chose real-time over best effort
  int n_out_rt_win = 0;     // crossbar output conflict won by a real-time flit
  int n_mux_contention = 0;
  int n_xbar_conflict = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NP; p++) begin
        int  n_elig;
        bit  rt_elig;
        n_elig  = 0;
        rt_elig = 1'b0;
        for (int v = 0; v < NV; v++)
          if (dut.u_sa.ready[p][v] && dut.u_sa.ovc_space[dut.u_sa.out_port[p][v]][dut.u_sa.out_vc[p][v]]) begin
            n_elig++;
            if (RT_MASK[v]) rt_elig = 1'b1;
          end
        if (n_elig > 1) begin
          n_mux_contention++;
          if (rt_elig) begin
            check(RT_MASK[dut.u_sa.in_sel_vc[p]], "best-effort flit beat a real-time flit at the input");
            n_rt_over_be++;
          end
        end
      end
      begin
        int  n;
        bit  rt_cand;
        n = 0;
        rt_cand = 1'b0;
        for (int p = 0; p < NP; p++)
          if (dut.u_sa.a_valid[p] && dut.u_sa.a_port[p] == '0) begin
            n++;
            if (RT_MASK[dut.u_sa.in_sel_vc[p]]) rt_cand = 1'b1;
          end
        if (n > 1) begin
          n_xbar_conflict++;
          if (rt_cand) begin
            check(RT_MASK[dut.u_sa.x_vc[0]], "best-effort flit beat a real-time flit at the output");
            n_out_rt_win++;
          end
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    int win;
    real rt_share, left;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (cyc >= T0 + RUN);
    be_stop = 1'b1;
    for (int s = 0; s < 2; s++) wait (r_msg[s] == n_msgs(s));
    wait (sent_flits[2] + sent_flits[3] + sent_flits[4] + sent_flits[5] + sent_flits[6] ==
          rx_flits[2] + rx_flits[3] + rx_flits[4] + rx_flits[5] + rx_flits[6]);
    repeat (50) @(posedge clk);

    win = RUN - 200;
    rt_share = 1.0 / 2 + 1.0 / 8;
    left = (1.0 - rt_share) * win;
    $display("window %0d cycles: link busy %0d, real-time flits %0d, best-effort flits %0d; latest message %0d cycles after its due time",
             win, win_busy, win_flits_rt, win_flits_be, max_late);
    $display("mechanisms: mux_contention=%0d rt_over_be=%0d xbar_conflict=%0d out_rt_win=%0d",
             n_mux_contention, n_rt_over_be, n_xbar_conflict, n_out_rt_win);
    for (int s = 0; s < NS; s++)
      check(rx_flits[s] == sent_flits[s], $sformatf("stream %0d: sent %0d flits, received %0d", s, sent_flits[s], rx_flits[s]));
    for (int s = 0; s < 2; s++)
      check(rx_flits[s] == n_msgs(s) * LEN, $sformatf("stream %0d incomplete", s));
    check(win_busy >= win * 95 / 100, "output link idle under overload");
    check(real'(win_flits_be) >= 0.8 * left, "best-effort traffic starved of left-over bandwidth");
    check(n_rt_over_be > 0, "no real-time win at an input multiplexer");
    check(n_out_rt_win > 0, "no real-time win at a crossbar output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: stream messages received %0d %0d", r_msg[0], r_msg[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
