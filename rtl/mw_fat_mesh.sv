// mw_fat_mesh: a 2x2 fat mesh of four 8-port MediaWorm switches.
//
// Cluster networks often attach several endpoints to each switch, which
// calls for more bandwidth between switches than between a switch and an
// endpoint. In a fat mesh each pair of neighbouring switches is therefore
// joined by a fat link of two physical links (the document's evaluated
// network: four 8x8 switches S0..S3, two physical links per pair).
// Switch s sits at x = s[0], y = s[1]: S0 (0,0), S1 (1,0), S2 (0,1),
// S3 (1,1). Each switch uses ports 4 and 5 for the fat link to its X
// neighbour, ports 6 and 7 for the fat link to its Y neighbour and ports
// 0..3 for four endpoints; this port assignment is this design's choice.
// Endpoint e of switch s is node s*4+e, and that number is the destination
// field of the header. Routing is deterministic dimension order (X, then
// Y); on each hop the message takes the less loaded link of the fat link.
// A message keeps the VC named in its header on every hop.
//
// Ports: ep_in_link[n]/ep_credit_out[n] connect the sender of node n,
// ep_out_link[n]/ep_credit_in[n] its receiver; the flow control is the
// routers' credit protocol. Everything runs on one clock.
module mw_fat_mesh
  import mw_pkg::*;
#(
  parameter int N_VCS = 16,
  parameter int DEPTH = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_VCS-1:0] rt_vc_mask,
  input  link_t            ep_in_link    [16],
  output credit_t          ep_credit_out [16],
  output link_t            ep_out_link   [16],
  input  credit_t          ep_credit_in  [16]
);

  localparam int NP = 8;

  link_t   r_in_link    [4][NP];
  credit_t r_credit_out [4][NP];
  link_t   r_out_link   [4][NP];
  credit_t r_credit_in  [4][NP];

  for (genvar s = 0; s < 4; s++) begin : g_sw
    localparam int SX = s ^ 1;   // neighbour in X
    localparam int SY = s ^ 2;   // neighbour in Y

    mw_router #(
      .N_PORTS(NP), .N_VCS(N_VCS), .DEPTH(DEPTH), .FAT_MESH(1'b1),
      .MY_X(1'(s & 1)), .MY_Y(1'((s >> 1) & 1))
    ) u_sw (
      .clk, .rst_n, .rt_vc_mask,
      .in_link    (r_in_link[s]),
      .credit_out (r_credit_out[s]),
      .out_link   (r_out_link[s]),
      .credit_in  (r_credit_in[s])
    );

    for (genvar e = 0; e < 4; e++) begin : g_ep
      assign r_in_link[s][e]         = ep_in_link[s*4 + e];
      assign ep_credit_out[s*4 + e]  = r_credit_out[s][e];
      assign ep_out_link[s*4 + e]    = r_out_link[s][e];
      assign r_credit_in[s][e]       = ep_credit_in[s*4 + e];
    end

    for (genvar k = 4; k < 6; k++) begin : g_x
      assign r_in_link[s][k]   = r_out_link[SX][k];
      assign r_credit_in[s][k] = r_credit_out[SX][k];
    end
    for (genvar k = 6; k < 8; k++) begin : g_y
      assign r_in_link[s][k]   = r_out_link[SY][k];
      assign r_credit_in[s][k] = r_credit_out[SY][k];
    end
  end

endmodule
