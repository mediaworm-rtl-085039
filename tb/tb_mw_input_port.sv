// tb_mw_input_port: checks stage 1 and the per-VC state of one input port
// (8 output ports, 4 VCs, 4-flit buffers, VC 3 best-effort).
// Directed: a head flit (destination 5, output VC 2, Vtick 7) arriving on VC
// 1 at time T is at the buffer front one cycle later with stamp T+7, is
// routed the cycle after (ROUTED, port 5, VC 2), becomes active on the
// stage-3 grant, and its body flit, arriving while active, needs no routing
// (bypass). Every flit taken returns a credit for its VC one cycle later;
// taking the tail makes the VC idle. A head on the best-effort VC is
// stamped with the largest Vtick whatever its header says. Random: messages of 1..6 flits on all VCs with
// random grants and pops; per VC the flits must come out in order, the VC
// must request exactly once per message, and credits must match pops.
`timescale 1ns/1ps
module tb_mw_input_port;
  import mw_pkg::*;
  localparam int NP = 8, NV = 4, D = 4, LW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ts_t now;
  logic [NV-1:0] rt_vc_mask = 4'b0111;
  link_t in_link;
  credit_t credit_out;
  logic [LW-1:0] port_load [NP];
  logic [NV-1:0] hol_valid, vc_active, vc_req, alloc_gnt, pop;
  stamped_flit_t hol_flit [NV];
  logic [2:0] vc_out_port [NV];
  logic [1:0] vc_out_vc [NV];
  int checks = 0, failures = 0;

  mw_input_port #(.N_PORTS(NP), .N_VCS(NV), .DEPTH(D), .LOAD_W(LW)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, s); end
  endtask

  always @(posedge clk) now <= rst_n ? now + 1 : 0;

  function automatic link_t lk(int v, flit_type_e t, logic [31:0] d);
    link_t l;
    l.valid = 1; l.vc = VCID_W'(v); l.flit.ftype = t; l.flit.data = d;
    return l;
  endfunction

  // credit counter per VC, checked against pops
  int cred_model [NV];
  logic [NV-1:0] pop_q;
  always @(posedge clk) begin
    if (!rst_n) pop_q <= 0;
    else begin
      pop_q <= pop;
    end
  end
  always @(negedge clk) begin
    if (rst_n) begin
      check(credit_out.valid == (pop_q != 0), "credit for each pop");
      if (pop_q != 0) check(pop_q[credit_out.vc[1:0]], "credit VC");
    end
  end

  // random phase state
  bit rand_on = 0;
  int next_flit [NV];
  int exp_flit [NV];
  int msg_len [NV];
  int sent_in_msg [NV];
  int credits [NV];
  int n_req_events = 0, n_msgs_out = 0;

  initial begin
    ts_t t0;
    in_link = '0; alloc_gnt = 0; pop = 0;
    for (int p = 0; p < NP; p++) port_load[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // ---- directed ----
    @(negedge clk);
    in_link = lk(1, FT_HEAD, make_header(8'd5, 8'd2, 16'd7));
    t0 = now;            // arrival time: the router's clock at the sampling edge
    @(negedge clk);
    in_link = '0;
    check(hol_valid == 4'b0010, "head at buffer front");
    check(hol_flit[1].stamp == t0 + 7, $sformatf("head stamp %0d expected %0d", hol_flit[1].stamp, t0 + 7));
    check(vc_req == 0, "not yet routed");
    @(negedge clk);
    check(vc_req == 4'b0010 && vc_out_port[1] == 3'd5 && vc_out_vc[1] == 2'd2, "routed to port 5, VC 2");
    alloc_gnt = 4'b0010;
    @(negedge clk);
    alloc_gnt = 0;
    check(vc_active == 4'b0010 && vc_req == 0, "active after grant");
    in_link = lk(1, FT_BODY, 32'hABCD);
    pop = 4'b0010;                         // head crosses
    @(negedge clk);
    in_link = lk(1, FT_TAIL, 32'h1234);
    check(hol_valid[1] && hol_flit[1].flit.data == 32'hABCD, "body flit at front");
    check(hol_flit[1].stamp == t0 + 14, "body stamp uses the message's Vtick");
    check(vc_active[1] && vc_req == 0, "body bypasses routing");
    pop = 4'b0010;
    @(negedge clk);
    in_link = '0;
    check(hol_flit[1].flit.ftype == FT_TAIL, "tail at front");
    pop = 4'b0010;
    @(negedge clk);
    pop = 0;
    check(vc_active == 0 && hol_valid == 0, "idle after tail");
    // heads on VC 0 and on the best-effort VC 3 in successive cycles
    in_link = lk(0, FT_HEADTAIL, make_header(8'd3, 8'd1, 16'd9));
    @(negedge clk);
    in_link = lk(3, FT_HEADTAIL, make_header(8'd6, 8'd0, 16'd9));
    @(negedge clk);
    in_link = '0;
    check(vc_req == 4'b0001, "first head routed");
    check(hol_flit[3].stamp == now - 1 + 65535, "best-effort VC gets the largest Vtick");
    @(negedge clk);
    check(vc_req == 4'b1001 && vc_out_port[3] == 3'd6, "second head routed next cycle");
    alloc_gnt = 4'b1001;
    @(negedge clk);
    alloc_gnt = 0;
    pop = 4'b0001;
    @(negedge clk);
    pop = 4'b1000;
    @(negedge clk);
    pop = 0;
    @(negedge clk);
    check(vc_active == 0 && hol_valid == 0, "both single-flit messages done");
    // ---- random ----
    for (int v = 0; v < NV; v++) begin
      next_flit[v] = 0; exp_flit[v] = 0; sent_in_msg[v] = 0; credits[v] = D; msg_len[v] = 1 + $urandom % 6;
    end
    rand_on = 1;
    repeat (4000) @(posedge clk);
    rand_on = 0;
    check(n_req_events > 100 && n_msgs_out > 100, "too few messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random driver, acting as upstream, stage-3 arbitration and switch
  always @(negedge clk) begin
    if (rand_on) begin
      link_t l;
      int v;
      l = '0;
      // credits from the last cycle's pops
      if (credit_out.valid) credits[credit_out.vc[1:0]]++;
      // check and take what the switch took last cycle
      // (done below before choosing new pops)
      v = $urandom % NV;
      if (credits[v] > 0 && ($urandom % 3 != 0)) begin
        flit_type_e t;
        if (msg_len[v] == 1)                 t = FT_HEADTAIL;
        else if (sent_in_msg[v] == 0)        t = FT_HEAD;
        else if (sent_in_msg[v] == msg_len[v] - 1) t = FT_TAIL;
        else                                 t = FT_BODY;
        l = lk(v, t, is_head(t) ? make_header(8'(v + 4), 8'(v), 16'(next_flit[v] & 16'hFFF))
                                : {16'hF000 | 16'(v), 16'(next_flit[v])});
        next_flit[v]++;
        credits[v]--;
        sent_in_msg[v]++;
        if (sent_in_msg[v] == msg_len[v]) begin sent_in_msg[v] = 0; msg_len[v] = 1 + $urandom % 6; end
      end
      in_link = l;
      alloc_gnt = 0;
      pop = 0;
      for (int k = 0; k < NV; k++) begin
        if (vc_req[k]) begin
          n_req_events++;
          check(hol_valid[k] && is_head(hol_flit[k].flit.ftype), "request without head flit");
          check(int'(vc_out_port[k]) == k + 4 && int'(vc_out_vc[k]) == k, "route of random message");
          if ($urandom % 2) alloc_gnt[k] = 1;
        end
      end
      begin
        int k;
        k = $urandom % NV;
        if (vc_active[k] && hol_valid[k] && ($urandom % 2)) begin
          pop[k] = 1;
          if (is_head(hol_flit[k].flit.ftype))
            check(int'(hdr_vtick(hol_flit[k].flit.data)) == (exp_flit[k] & 16'hFFF), $sformatf("head order on VC %0d", k));
          else
            check(int'(hol_flit[k].flit.data[15:0]) == (exp_flit[k] & 16'hFFFF), $sformatf("flit order on VC %0d", k));
          exp_flit[k]++;
          if (is_tail(hol_flit[k].flit.ftype)) n_msgs_out++;
        end
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
