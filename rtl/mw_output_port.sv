// mw_output_port: one output physical channel of the router (pipeline
// stage 5).
//
// Flits leaving the crossbar are demultiplexed into per-VC output flit
// buffers (one message, 20 flits, deep by default, as in the document). The
// VC multiplexer then shares the physical link among the VCs: each cycle it
// sends at most one flit, from a VC that has a flit and a credit for the
// downstream buffer, chosen round robin. Round robin at this point is this
// design's choice: in the document's main configuration the rate-based
// scheduler sits at the crossbar input, and the VC multiplexer is a plain
// one.
//
// Two credit counters per VC: local credits count free slots of the output
// buffer and are taken when the switch allocator grants a flit to that VC
// (reserve_*), one cycle before the flit arrives from the registered
// crossbar, and returned when the flit leaves; ovc_space tells the allocator
// which VCs may receive. Downstream credits count free slots of the next
// router's (or endpoint's) input buffer of the same VC; they are taken on
// sending and returned by credit_in.
//
// Timing: a flit written in cycle t can be on out_link in cycle t+1 (the
// link output is registered). Reset empties the buffers and fills both kinds
// of credit counters.
module mw_output_port
  import mw_pkg::*;
#(
  parameter int N_VCS    = 16,
  parameter int DEPTH    = 20,
  parameter int DN_DEPTH = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // from the crossbar
  input  logic                      xin_valid,
  input  logic [$clog2(N_VCS)-1:0]  xin_vc,
  input  flit_t                     xin_flit,
  // grant of the switch allocator, one cycle ahead of xin
  input  logic                      reserve_valid,
  input  logic [$clog2(N_VCS)-1:0]  reserve_vc,
  output logic [N_VCS-1:0]          ovc_space,
  // link to downstream and its credits
  output link_t                     out_link,
  input  credit_t                   credit_in
);

  localparam int VW  = $clog2(N_VCS);
  localparam int CW  = $clog2(DEPTH + 1);
  localparam int DCW = $clog2(DN_DEPTH + 1);
  localparam int FW  = $bits(flit_t);

  logic [N_VCS-1:0] fifo_empty;
  logic [N_VCS-1:0] fifo_pop;
  flit_t            fifo_head [N_VCS];
  logic [CW-1:0]    local_cred [N_VCS];
  logic [DCW-1:0]   dn_cred    [N_VCS];

  for (genvar v = 0; v < N_VCS; v++) begin : g_vc
    logic [FW-1:0] rdata;
    mw_flit_fifo #(.WIDTH(FW), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .push  (xin_valid && (xin_vc == VW'(v))),
      .wdata (xin_flit),
      .pop   (fifo_pop[v]),
      .rdata,
      .empty (fifo_empty[v]),
      .full  (),
      .count ()
    );
    assign fifo_head[v] = flit_t'(rdata);
    assign ovc_space[v] = (local_cred[v] != '0);
  end

  // VC multiplexer
  logic [N_VCS-1:0] mux_req;
  logic [N_VCS-1:0] mux_gnt;
  logic [VW-1:0]    mux_idx;
  logic             mux_any;

  always_comb begin
    for (int v = 0; v < N_VCS; v++)
      mux_req[v] = !fifo_empty[v] && (dn_cred[v] != '0);
  end

  mw_rr_arbiter #(.N(N_VCS)) u_vcmux (
    .clk, .rst_n, .req(mux_req), .advance(1'b1),
    .gnt(mux_gnt), .gnt_idx(mux_idx), .gnt_any(mux_any)
  );

  assign fifo_pop = mux_gnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_link <= '0;
    end else begin
      out_link.valid <= mux_any;
      out_link.vc    <= VCID_W'(mux_idx);
      out_link.flit  <= fifo_head[mux_idx];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < N_VCS; v++) begin
        local_cred[v] <= CW'(DEPTH);
        dn_cred[v]    <= DCW'(DN_DEPTH);
      end
    end else begin
      for (int v = 0; v < N_VCS; v++) begin
        local_cred[v] <= local_cred[v]
                         - CW'(reserve_valid && (reserve_vc == VW'(v)))
                         + CW'(fifo_pop[v]);
        dn_cred[v]    <= dn_cred[v]
                         - DCW'(fifo_pop[v])
                         + DCW'(credit_in.valid && (credit_in.vc == VCID_W'(v)));
      end
    end
  end

  a_reserve_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                 reserve_valid |-> ovc_space[reserve_vc]);
  a_credit_bounded: assert property (@(posedge clk) disable iff (!rst_n)
                                     credit_in.valid |-> (dn_cred[credit_in.vc[VW-1:0]] < DCW'(DN_DEPTH)) || fifo_pop[credit_in.vc[VW-1:0]]);

endmodule
