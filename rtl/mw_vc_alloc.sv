// mw_vc_alloc: arbitration for crossbar outputs (pipeline stage 3).
//
// A routed head flit asks for one output VC of one output port: the port
// chosen by the routing unit and the VC named in its header. An output VC is
// held by one message from the grant until that message's tail flit has
// crossed the crossbar, so this arbitration works at message granularity, as
// the document describes for the crossbar output ports. For each output port
// one round-robin arbiter picks, per cycle, one of the requesters whose
// requested VC is free; requesters waiting for a busy VC are left out, so
// they do not block others heading to the same port.
//
// The number of held VCs of each port is reported as its load; the routing
// unit of a fat mesh uses it to choose between the two links of a fat link.
//
// Interface: requester r = input_port * N_VCS + input_vc. gnt is
// combinational and the busy state updates at the clock edge. rel_valid/
// rel_vc free one VC of an output port (from the tail flit's crossing);
// a released VC can be granted again from the next cycle. Reset frees all.
module mw_vc_alloc #(
  parameter int N_PORTS = 8,
  parameter int N_VCS   = 16,
  parameter int LOAD_W  = $clog2(N_VCS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_PORTS*N_VCS-1:0]    req,
  input  logic [$clog2(N_PORTS)-1:0]  req_port [N_PORTS*N_VCS],
  input  logic [$clog2(N_VCS)-1:0]    req_ovc  [N_PORTS*N_VCS],
  output logic [N_PORTS*N_VCS-1:0]    gnt,
  input  logic [N_PORTS-1:0]          rel_valid,
  input  logic [$clog2(N_VCS)-1:0]    rel_vc   [N_PORTS],
  output logic [N_VCS-1:0]            ovc_busy [N_PORTS],
  output logic [LOAD_W-1:0]           port_load [N_PORTS]
);

  localparam int NR = N_PORTS * N_VCS;
  localparam int RW = $clog2(NR);
  localparam int PW = $clog2(N_PORTS);

  logic [NR-1:0] port_gnt [N_PORTS];
  logic [RW-1:0] port_idx [N_PORTS];
  logic          port_any [N_PORTS];

  for (genvar q = 0; q < N_PORTS; q++) begin : g_port
    logic [NR-1:0] mreq;
    always_comb begin
      for (int r = 0; r < NR; r++)
        mreq[r] = req[r] && (req_port[r] == PW'(q)) && !ovc_busy[q][req_ovc[r]];
    end
    mw_rr_arbiter #(.N(NR)) u_arb (
      .clk, .rst_n, .req(mreq), .advance(1'b1),
      .gnt(port_gnt[q]), .gnt_idx(port_idx[q]), .gnt_any(port_any[q])
    );
    always_comb begin
      port_load[q] = '0;
      for (int v = 0; v < N_VCS; v++)
        port_load[q] = port_load[q] + LOAD_W'(ovc_busy[q][v]);
    end
  end

  always_comb begin
    gnt = '0;
    for (int q = 0; q < N_PORTS; q++)
      gnt = gnt | port_gnt[q];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q < N_PORTS; q++) ovc_busy[q] <= '0;
    end else begin
      for (int q = 0; q < N_PORTS; q++) begin
        if (rel_valid[q]) ovc_busy[q][rel_vc[q]] <= 1'b0;
        if (port_any[q])  ovc_busy[q][req_ovc[port_idx[q]]] <= 1'b1;
      end
    end
  end

  a_release_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                   rel_valid[0] |-> ovc_busy[0][rel_vc[0]]);

endmodule
