// mw_fgvc_switch_alloc: per-cycle flit scheduling with Fine-Grained
// VirtualClock (the FGVC blocks of pipeline stage 4).
//
// In a multiplexed crossbar the VCs of one input port share one crossbar
// input, so they contend at the crossbar input multiplexer; the document
// places the rate-based scheduler there. Each cycle, for every input port,
// this block looks at the VCs whose path is set up (active), that have a flit
// at the front of their buffer and whose output VC buffer has room, and
// picks the one whose flit carries the smallest FGVC timestamp (ties: lowest
// VC). The winners of the input ports may then collide on a crossbar output;
// among those, the flit with the smallest timestamp crosses (ties: lowest
// input port) and the others retry in the next cycle. Using the timestamp
// here too is this design's choice; the document fixes only the input
// multiplexer policy.
//
// Timestamps are compared wrap-safe (see mw_pkg::ts_before).
//
// Interface, all combinational: pop[p] is one-hot (or zero) and removes the
// chosen flit from input p; in_sel_vc[p] steers the input multiplexer of
// input p; for every output q, x_valid/x_src/x_vc say which input crosses to
// it and into which output VC. rel_valid/rel_vc report a tail flit crossing
// to output q, which frees that output VC for the stage-3 arbitration.
module mw_fgvc_switch_alloc
  import mw_pkg::*;
#(
  parameter int N_PORTS = 8,
  parameter int N_VCS   = 16
) (
  input  logic [N_VCS-1:0]            ready      [N_PORTS],
  input  ts_t                         stamp      [N_PORTS][N_VCS],
  input  logic [N_VCS-1:0]            tail       [N_PORTS],
  input  logic [$clog2(N_PORTS)-1:0]  out_port   [N_PORTS][N_VCS],
  input  logic [$clog2(N_VCS)-1:0]    out_vc     [N_PORTS][N_VCS],
  input  logic [N_VCS-1:0]            ovc_space  [N_PORTS],
  output logic [N_VCS-1:0]            pop        [N_PORTS],
  output logic [$clog2(N_VCS)-1:0]    in_sel_vc  [N_PORTS],
  output logic [N_PORTS-1:0]          x_valid,
  output logic [$clog2(N_PORTS)-1:0]  x_src      [N_PORTS],
  output logic [$clog2(N_VCS)-1:0]    x_vc       [N_PORTS],
  output logic [N_PORTS-1:0]          rel_valid,
  output logic [$clog2(N_VCS)-1:0]    rel_vc     [N_PORTS]
);

  localparam int PW = $clog2(N_PORTS);
  localparam int VW = $clog2(N_VCS);

  // Stage A: crossbar input multiplexer, smallest stamp per input port.
  logic [N_PORTS-1:0] a_valid;
  ts_t                a_stamp [N_PORTS];
  logic [PW-1:0]      a_port  [N_PORTS];
  logic [VW-1:0]      a_ovc   [N_PORTS];
  logic               a_tail  [N_PORTS];

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      a_valid[p]   = 1'b0;
      a_stamp[p]   = '0;
      in_sel_vc[p] = '0;
      for (int v = 0; v < N_VCS; v++) begin
        if (ready[p][v] && ovc_space[out_port[p][v]][out_vc[p][v]] &&
            (!a_valid[p] || ts_before(stamp[p][v], a_stamp[p]))) begin
          a_valid[p]   = 1'b1;
          a_stamp[p]   = stamp[p][v];
          in_sel_vc[p] = VW'(v);
        end
      end
      a_port[p] = out_port[p][in_sel_vc[p]];
      a_ovc[p]  = out_vc[p][in_sel_vc[p]];
      a_tail[p] = tail[p][in_sel_vc[p]];
    end
  end

  // Stage B: crossbar output conflicts, smallest stamp per output port.
  ts_t best [N_PORTS];

  always_comb begin
    for (int q = 0; q < N_PORTS; q++) begin
      x_valid[q]   = 1'b0;
      x_src[q]     = '0;
      best[q]      = '0;
      for (int p = 0; p < N_PORTS; p++) begin
        if (a_valid[p] && (a_port[p] == PW'(q)) &&
            (!x_valid[q] || ts_before(a_stamp[p], best[q]))) begin
          x_valid[q] = 1'b1;
          x_src[q]   = PW'(p);
          best[q]    = a_stamp[p];
        end
      end
      x_vc[q]      = a_ovc[x_src[q]];
      rel_valid[q] = x_valid[q] && a_tail[x_src[q]];
      rel_vc[q]    = x_vc[q];
    end
  end

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      pop[p] = '0;
      if (a_valid[p] && x_valid[a_port[p]] && (x_src[a_port[p]] == PW'(p)))
        pop[p][in_sel_vc[p]] = 1'b1;
    end
  end

endmodule
