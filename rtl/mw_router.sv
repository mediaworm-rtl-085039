// mw_router: the MediaWorm router, a pipelined wormhole router with
// Fine-Grained VirtualClock (FGVC) scheduling for mixed real-time and
// best-effort traffic.
//
// Structure (defaults are the document's main configuration: 8 ports, 16
// VCs per physical channel, 32-bit flits, 20-flit buffers, multiplexed
// crossbar):
//   stage 1  mw_input_port: VC demultiplexer, FGVC timestamping, input VC
//            buffers, header decode, credits upstream
//   stage 2  routing decision (mw_route_unit, inside each input port)
//   stage 3  mw_vc_alloc: message-level arbitration for output VCs
//   stage 4  mw_fgvc_switch_alloc + mw_crossbar: FGVC crossbar input
//            multiplexer, crossbar output conflict resolution, crossing
//   stage 5  mw_output_port: output VC buffers, VC multiplexer, link
// Head flits pass all five stages; body and tail flits of a message whose
// path is set up skip stages 2 and 3.
//
// The VCs are split into a real-time and a best-effort class at
// configuration time by rt_vc_mask (bit v set: VC v carries real-time
// traffic), the same split on every port. Real-time messages carry their
// Vtick in the header; best-effort ones are given the largest Vtick, so
// real-time flits win the crossbar input whenever their stamps are earlier.
//
// Ports: in_link[p]/credit_out[p] are the link from the upstream of input p
// and the credits returned to it; out_link[q]/credit_in[q] the link to the
// downstream of output q and its credits. All links run on clk. The sender
// on in_link must respect the credits (DEPTH flits per VC at reset).
//
// Latency through an idle router: a head flit on in_link in cycle t leaves
// on out_link in cycle t+6; each following flit of the message one cycle
// after the one before, when nothing contends.
//
// The FAT_MESH, MY_X and MY_Y parameters select the routing function of a
// switch in a 2x2 fat mesh (see mw_route_unit).
module mw_router
  import mw_pkg::*;
#(
  parameter int         N_PORTS  = 8,
  parameter int         N_VCS    = 16,
  parameter int         DEPTH    = 20,
  parameter bit         FAT_MESH = 1'b0,
  parameter logic [0:0] MY_X     = 1'b0,
  parameter logic [0:0] MY_Y     = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_VCS-1:0]   rt_vc_mask,
  input  link_t              in_link    [N_PORTS],
  output credit_t            credit_out [N_PORTS],
  output link_t              out_link   [N_PORTS],
  input  credit_t            credit_in  [N_PORTS]
);

  localparam int PW     = $clog2(N_PORTS);
  localparam int VW     = $clog2(N_VCS);
  localparam int LOAD_W = $clog2(N_VCS + 1);

  // Arrival-time clock of the FGVC algorithm.
  ts_t now;
  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  logic [N_VCS-1:0]   hol_valid   [N_PORTS];
  stamped_flit_t      hol_flit    [N_PORTS][N_VCS];
  logic [N_VCS-1:0]   vc_active   [N_PORTS];
  logic [N_VCS-1:0]   vc_req      [N_PORTS];
  logic [PW-1:0]      vc_out_port [N_PORTS][N_VCS];
  logic [VW-1:0]      vc_out_vc   [N_PORTS][N_VCS];
  logic [N_VCS-1:0]   alloc_gnt   [N_PORTS];
  logic [N_VCS-1:0]   pop         [N_PORTS];
  logic [LOAD_W-1:0]  port_load   [N_PORTS];

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    mw_input_port #(
      .N_PORTS(N_PORTS), .N_VCS(N_VCS), .DEPTH(DEPTH), .LOAD_W(LOAD_W),
      .FAT_MESH(FAT_MESH), .MY_X(MY_X), .MY_Y(MY_Y)
    ) u_in (
      .clk, .rst_n, .now, .rt_vc_mask,
      .in_link     (in_link[p]),
      .credit_out  (credit_out[p]),
      .port_load   (port_load),
      .hol_valid   (hol_valid[p]),
      .hol_flit    (hol_flit[p]),
      .vc_active   (vc_active[p]),
      .vc_req      (vc_req[p]),
      .vc_out_port (vc_out_port[p]),
      .vc_out_vc   (vc_out_vc[p]),
      .alloc_gnt   (alloc_gnt[p]),
      .pop         (pop[p])
    );
  end

  // Stage 3
  logic [N_PORTS*N_VCS-1:0] va_req, va_gnt;
  logic [PW-1:0]            va_port [N_PORTS*N_VCS];
  logic [VW-1:0]            va_ovc  [N_PORTS*N_VCS];
  logic [N_PORTS-1:0]       rel_valid;
  logic [VW-1:0]            rel_vc  [N_PORTS];

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      for (int v = 0; v < N_VCS; v++) begin
        va_req [p*N_VCS + v] = vc_req[p][v];
        va_port[p*N_VCS + v] = vc_out_port[p][v];
        va_ovc [p*N_VCS + v] = vc_out_vc[p][v];
        alloc_gnt[p][v]      = va_gnt[p*N_VCS + v];
      end
    end
  end

  mw_vc_alloc #(.N_PORTS(N_PORTS), .N_VCS(N_VCS), .LOAD_W(LOAD_W)) u_va (
    .clk, .rst_n,
    .req(va_req), .req_port(va_port), .req_ovc(va_ovc), .gnt(va_gnt),
    .rel_valid, .rel_vc, .ovc_busy(), .port_load
  );

  // Stage 4: FGVC scheduling and crossbar
  logic [N_VCS-1:0]   sa_ready [N_PORTS];
  ts_t                sa_stamp [N_PORTS][N_VCS];
  logic [N_VCS-1:0]   sa_tail  [N_PORTS];
  logic [N_VCS-1:0]   ovc_space [N_PORTS];
  logic [VW-1:0]      in_sel_vc [N_PORTS];
  logic [N_PORTS-1:0] x_valid;
  logic [PW-1:0]      x_src [N_PORTS];
  logic [VW-1:0]      x_vc  [N_PORTS];
  flit_t              xbar_in [N_PORTS];

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      sa_ready[p] = hol_valid[p] & vc_active[p];
      for (int v = 0; v < N_VCS; v++) begin
        sa_stamp[p][v] = hol_flit[p][v].stamp;
        sa_tail[p][v]  = is_tail(hol_flit[p][v].flit.ftype);
      end
      // crossbar input multiplexer
      xbar_in[p] = hol_flit[p][in_sel_vc[p]].flit;
    end
  end

  mw_fgvc_switch_alloc #(.N_PORTS(N_PORTS), .N_VCS(N_VCS)) u_sa (
    .ready(sa_ready), .stamp(sa_stamp), .tail(sa_tail),
    .out_port(vc_out_port), .out_vc(vc_out_vc), .ovc_space,
    .pop, .in_sel_vc, .x_valid, .x_src, .x_vc, .rel_valid, .rel_vc
  );

  logic [N_PORTS-1:0] xo_valid;
  logic [VW-1:0]      xo_vc   [N_PORTS];
  flit_t              xo_flit [N_PORTS];

  mw_crossbar #(.N_PORTS(N_PORTS), .N_VCS(N_VCS)) u_xbar (
    .clk, .rst_n,
    .in_flit(xbar_in), .x_valid, .x_src, .x_vc,
    .out_valid(xo_valid), .out_vc(xo_vc), .out_flit(xo_flit)
  );

  // Stage 5
  for (genvar q = 0; q < N_PORTS; q++) begin : g_out
    mw_output_port #(.N_VCS(N_VCS), .DEPTH(DEPTH), .DN_DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .xin_valid     (xo_valid[q]),
      .xin_vc        (xo_vc[q]),
      .xin_flit      (xo_flit[q]),
      .reserve_valid (x_valid[q]),
      .reserve_vc    (x_vc[q]),
      .ovc_space     (ovc_space[q]),
      .out_link      (out_link[q]),
      .credit_in     (credit_in[q])
    );
  end

endmodule
