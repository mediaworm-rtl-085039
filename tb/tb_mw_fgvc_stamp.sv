// tb_mw_fgvc_stamp: checks the FGVC timestamps against the VirtualClock
// rules, written out independently here:
//   auxVC <= max(arrival time, auxVC); auxVC <= auxVC + Vtick; stamp = auxVC
// with Vtick taken from each head flit (real-time VCs) or the largest value
// (best-effort VCs), kept for the body and tail flits and dropped after the
// tail. Directed cases first: a head with Vtick 10 on an idle VC arriving at
// time T gets stamp T+10; a following back-to-back body flit gets T+20 (the
// clock runs ahead of real time when flits come faster than their rate);
// a best-effort head gets T+65535. Then random traffic on all 16 VCs.
`timescale 1ns/1ps
module tb_mw_fgvc_stamp;
  import mw_pkg::*;
  localparam int NV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  ts_t now;
  logic [NV-1:0] rt_vc_mask = 16'h0FFF;
  logic wr;
  logic [3:0] wr_vc;
  flit_type_e wr_ftype;
  logic [FLIT_W-1:0] wr_data;
  ts_t stamp;
  int checks = 0, failures = 0;
  longint aux [NV];
  longint vt  [NV];

  mw_fgvc_stamp #(.N_VCS(NV)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) now <= rst_n ? now + 1 : 0;

  // drive one flit during the coming cycle and check its stamp
  task automatic send(int v, flit_type_e t, int vtick, longint expect_stamp);
    longint base, tick, s;
    @(negedge clk);
    wr = 1; wr_vc = 4'(v); wr_ftype = t;
    wr_data = make_header(8'd0, 8'd0, 16'(vtick));
    #1;
    if (is_head(t)) tick = rt_vc_mask[v] ? vtick : 65535;
    else            tick = vt[v];
    base = (aux[v] > longint'(now)) ? aux[v] : longint'(now);
    s = base + tick;
    check(stamp == ts_t'(s), $sformatf("VC %0d stamp %0d expected %0d", v, stamp, s));
    if (expect_stamp >= 0) check(stamp == ts_t'(expect_stamp), $sformatf("directed stamp %0d expected %0d", stamp, expect_stamp));
    @(posedge clk);
    aux[v] = s;
    vt[v]  = is_tail(t) ? 65535 : tick;
    #1 wr = 0;
  endtask

  initial begin
    longint t0;
    wr = 0; wr_vc = 0; wr_ftype = FT_HEAD; wr_data = 0;
    for (int v = 0; v < NV; v++) begin aux[v] = 0; vt[v] = 65535; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    // directed
    @(negedge clk);
    t0 = longint'(now) + 1;             // now during the next cycle
    send(2, FT_HEAD, 10, t0 + 10);
    send(2, FT_BODY, 99, t0 + 20);
    send(2, FT_TAIL, 99, t0 + 30);
    repeat (100) @(posedge clk);
    @(negedge clk);
    t0 = longint'(now) + 1;
    send(13, FT_HEADTAIL, 5, t0 + 65535);
    // random
    for (int i = 0; i < 3000; i++) begin
      int v;
      flit_type_e t;
      v = $urandom % NV;
      t = flit_type_e'($urandom % 4);
      send(v, t, 1 + $urandom % 200, -1);
      repeat ($urandom % 4) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
