// mw_input_port: one input physical channel of the router (pipeline stage 1,
// plus the per-VC state that stages 2 and 3 work on).
//
// A flit arriving on the link is demultiplexed by its VC field into that
// VC's flit buffer, timestamped on the way in by the FGVC unit. The flit at
// the head of each buffer is decoded: a head flit of an idle VC is sent to
// the routing unit (stage 2, one VC per cycle, chosen round robin), which
// fixes the output port; the output VC is the one named in the header. The
// VC then asks the stage-3 arbitration for that output VC and, once granted,
// becomes active: its flits, the head included, compete in the crossbar
// input multiplexer. Body and tail flits of an active VC need no routing or
// arbitration of their own (they bypass stages 2 and 3). When the tail flit
// is taken the VC returns to idle.
//
// Per-VC states: IDLE (nothing routed), ROUTED (waiting for stage-3 grant),
// ACTIVE (path held until the tail leaves).
//
// Flow control is credit based, this design's choice where the document
// only speaks of hand-shaking: each flit taken from a buffer returns one
// credit for its VC upstream, registered, one cycle later. The upstream
// sender must never overrun a buffer. The link and the router share one
// clock; the synchroniser the document puts in stage 1 is not needed.
//
// Timing: a flit on in_link in cycle t is in its buffer in cycle t+1; a
// head flit is routed in t+1 (ROUTED in t+2) and may be granted in t+2
// (ACTIVE in t+3).
module mw_input_port
  import mw_pkg::*;
#(
  parameter int         N_PORTS  = 8,
  parameter int         N_VCS    = 16,
  parameter int         DEPTH    = 20,
  parameter int         LOAD_W   = 5,
  parameter bit         FAT_MESH = 1'b0,
  parameter logic [0:0] MY_X     = 1'b0,
  parameter logic [0:0] MY_Y     = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ts_t                         now,
  input  logic [N_VCS-1:0]            rt_vc_mask,
  // link from upstream and credits back to it
  input  link_t                       in_link,
  output credit_t                     credit_out,
  // load of each output port, for the routing decision
  input  logic [LOAD_W-1:0]           port_load [N_PORTS],
  // head of each VC buffer
  output logic [N_VCS-1:0]            hol_valid,
  output stamped_flit_t               hol_flit  [N_VCS],
  // per-VC route and state
  output logic [N_VCS-1:0]            vc_active,
  output logic [N_VCS-1:0]            vc_req,
  output logic [$clog2(N_PORTS)-1:0]  vc_out_port [N_VCS],
  output logic [$clog2(N_VCS)-1:0]    vc_out_vc   [N_VCS],
  // stage-3 grant for a ROUTED VC
  input  logic [N_VCS-1:0]            alloc_gnt,
  // crossbar input multiplexer takes the head flit of a VC
  input  logic [N_VCS-1:0]            pop
);

  localparam int PW = $clog2(N_PORTS);
  localparam int VW = $clog2(N_VCS);
  localparam int SW = $bits(stamped_flit_t);

  typedef enum logic [1:0] {VC_IDLE, VC_ROUTED, VC_ACTIVE} vc_state_e;

  vc_state_e     state [N_VCS];
  ts_t           stamp;
  logic [N_VCS-1:0] fifo_empty;
  logic [N_VCS-1:0] fifo_full;
  logic [VW-1:0] in_vc;

  assign in_vc = in_link.vc[VW-1:0];

  mw_fgvc_stamp #(.N_VCS(N_VCS)) u_fgvc (
    .clk, .rst_n, .now, .rt_vc_mask,
    .wr       (in_link.valid),
    .wr_vc    (in_vc),
    .wr_ftype (in_link.flit.ftype),
    .wr_data  (in_link.flit.data),
    .stamp
  );

  for (genvar v = 0; v < N_VCS; v++) begin : g_vc
    logic [SW-1:0] rdata;
    mw_flit_fifo #(.WIDTH(SW), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (in_link.valid && (in_vc == VW'(v))),
      .wdata ({in_link.flit, stamp}),
      .pop   (pop[v]),
      .rdata,
      .empty (fifo_empty[v]),
      .full  (fifo_full[v]),
      .count ()
    );
    assign hol_flit[v]  = stamped_flit_t'(rdata);
    assign hol_valid[v] = !fifo_empty[v];
    assign vc_active[v] = (state[v] == VC_ACTIVE);
    assign vc_req[v]    = (state[v] == VC_ROUTED);
  end

  // Stage 2: one idle VC with a head flit at the front is routed per cycle.
  logic [N_VCS-1:0] rt_req;
  logic [N_VCS-1:0] rt_gnt;
  logic [VW-1:0]    rt_idx;
  logic             rt_any;
  logic [PW-1:0]    rt_port;

  always_comb begin
    for (int v = 0; v < N_VCS; v++)
      rt_req[v] = hol_valid[v] && (state[v] == VC_IDLE) && is_head(hol_flit[v].flit.ftype);
  end

  mw_rr_arbiter #(.N(N_VCS)) u_rt_arb (
    .clk, .rst_n, .req(rt_req), .advance(1'b1),
    .gnt(rt_gnt), .gnt_idx(rt_idx), .gnt_any(rt_any)
  );

  mw_route_unit #(
    .N_PORTS(N_PORTS), .LOAD_W(LOAD_W), .FAT_MESH(FAT_MESH), .MY_X(MY_X), .MY_Y(MY_Y)
  ) u_route (
    .dest      (hdr_dest(hol_flit[rt_idx].flit.data)),
    .port_load (port_load),
    .out_port  (rt_port)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VCS; v++) begin
        state[v]       <= VC_IDLE;
        vc_out_port[v] <= '0;
        vc_out_vc[v]   <= '0;
      end
    end else begin
      for (int v = 0; v < N_VCS; v++) begin
        unique case (state[v])
          VC_IDLE:   if (rt_any && rt_gnt[v]) begin
                       state[v]       <= VC_ROUTED;
                       vc_out_port[v] <= rt_port;
                       vc_out_vc[v]   <= VW'(hdr_ovc(hol_flit[v].flit.data));
                     end
          VC_ROUTED: if (alloc_gnt[v]) state[v] <= VC_ACTIVE;
          VC_ACTIVE: if (pop[v] && is_tail(hol_flit[v].flit.ftype)) state[v] <= VC_IDLE;
          default:   state[v] <= VC_IDLE;
        endcase
      end
    end
  end

  // One credit per flit taken; at most one VC is popped per cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credit_out <= '0;
    end else begin
      credit_out.valid <= |pop;
      credit_out.vc    <= '0;
      for (int v = 0; v < N_VCS; v++)
        if (pop[v]) credit_out.vc <= VCID_W'(v);
    end
  end

  a_one_pop:      assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pop));
  a_pop_active:   assert property (@(posedge clk) disable iff (!rst_n) (pop & ~(vc_active & hol_valid)) == '0);
  a_no_overrun:   assert property (@(posedge clk) disable iff (!rst_n)
                                   !(in_link.valid && fifo_full[in_vc] && !pop[in_vc]));
  a_gnt_routed:   assert property (@(posedge clk) disable iff (!rst_n) (alloc_gnt & ~vc_req) == '0);

endmodule
