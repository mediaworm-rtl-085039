// mw_fgvc_stamp: Fine-Grained VirtualClock (FGVC) timestamping for the VCs
// of one input port.
//
// VirtualClock keeps one auxiliary clock auxVC per channel. For every
// arriving unit it sets auxVC <= max(AT, auxVC) and then auxVC <= auxVC +
// Vtick, and stamps the unit with the new auxVC; AT is the arrival time, here
// the router's free-running cycle counter. The fine-grained variant applies
// this per flit, with a Vtick that each message brings in its header (the
// flit inter-generation time of that message) instead of one fixed per
// connection. Flits with smaller stamps are served first by the crossbar
// input multiplexer, so a message that asked for more bandwidth (smaller
// Vtick) gets proportionally more of the link.
//
// Per VC this block holds auxVC and the current message's Vtick. A head flit
// loads Vtick from its header; body and tail flits reuse it; after the tail
// is stamped the Vtick is dropped (set to the best-effort value). VCs whose
// bit in rt_vc_mask is clear belong to the best-effort class and always use
// the largest Vtick, as the document prescribes for best-effort traffic.
// Following the document, auxVC is kept per VC across messages. Stamping at
// buffer entry, rather than when a flit reaches the multiplexer, is this
// design's choice: it lets several messages queue in one VC buffer, each with
// its own Vtick.
//
// Interface: when wr is high, stamp is the (combinational) timestamp of the
// flit described by wr_vc, wr_ftype and wr_data, and the state of that VC is
// updated at the clock edge. Reset clears auxVC and drops every Vtick.
module mw_fgvc_stamp
  import mw_pkg::*;
#(
  parameter int N_VCS = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ts_t                        now,
  input  logic [N_VCS-1:0]           rt_vc_mask,
  input  logic                       wr,
  input  logic [$clog2(N_VCS)-1:0]   wr_vc,
  input  flit_type_e                 wr_ftype,
  input  logic [FLIT_W-1:0]          wr_data,
  output ts_t                        stamp
);

  ts_t                aux_vc [N_VCS];
  logic [VTICK_W-1:0] vtick  [N_VCS];

  logic [VTICK_W-1:0] vt;
  ts_t                base;

  always_comb begin
    if (is_head(wr_ftype))
      vt = rt_vc_mask[wr_vc] ? hdr_vtick(wr_data) : VTICK_BE;
    else
      vt = vtick[wr_vc];
    base  = ts_before(aux_vc[wr_vc], now) ? now : aux_vc[wr_vc];
    stamp = base + TS_W'(vt);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VCS; v++) begin
        aux_vc[v] <= '0;
        vtick[v]  <= VTICK_BE;
      end
    end else if (wr) begin
      aux_vc[wr_vc] <= stamp;
      vtick[wr_vc]  <= is_tail(wr_ftype) ? VTICK_BE : vt;
    end
  end

endmodule
