// mw_route_unit: routing decision (pipeline stage 2).
//
// Maps the destination field of a header flit to an output port of the
// switch. Routing is deterministic, as in the document.
//
// FAT_MESH = 0 (the default, a single 8x8 switch): every port leads to an
// endpoint and the destination is the output port number (its low bits).
//
// FAT_MESH = 1: the switch is one of the four of a 2x2 fat mesh, in which
// each pair of neighbouring switches is joined by a fat link of two
// physical links. This design's port map: ports 0..3 lead to endpoints,
// ports 4 and 5 form the fat link to the neighbour in X, ports 6 and 7 the
// fat link to the neighbour in Y. A destination is {switch y, switch x,
// endpoint}. The message goes first along X, then along Y, then to the
// endpoint (dimension order). Of the two links of a fat link it takes the
// less loaded one, the document's "based on the current load"; the load of a
// port is supplied by the caller (the router uses the number of output VCs
// of that port held by messages) and a tie picks the lower port.
//
// Purely combinational.
module mw_route_unit
  import mw_pkg::*;
#(
  parameter int         N_PORTS  = 8,
  parameter int         LOAD_W   = 5,
  parameter bit         FAT_MESH = 1'b0,
  parameter logic [0:0] MY_X     = 1'b0,
  parameter logic [0:0] MY_Y     = 1'b0
) (
  input  logic [DEST_W-1:0]          dest,
  input  logic [LOAD_W-1:0]          port_load [N_PORTS],
  output logic [$clog2(N_PORTS)-1:0] out_port
);

  localparam int PW = $clog2(N_PORTS);

  function automatic logic [PW-1:0] pick(logic [PW-1:0] a, logic [PW-1:0] b);
    return (port_load[b] < port_load[a]) ? b : a;
  endfunction

  always_comb begin
    if (!FAT_MESH) begin
      out_port = dest[PW-1:0];
    end else if (dest[2] != MY_X) begin
      out_port = pick(PW'(4), PW'(5));
    end else if (dest[3] != MY_Y) begin
      out_port = pick(PW'(6), PW'(7));
    end else begin
      out_port = PW'(dest[1:0]);
    end
  end

  if (FAT_MESH) begin : g_check
    initial assert (N_PORTS == 8) else $error("fat mesh routing needs 8-port switches");
  end

endmodule
