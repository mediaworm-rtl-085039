// mw_crossbar: the n x n multiplexed crossbar (pipeline stage 4).
//
// In a multiplexed crossbar each physical channel has one crossbar port,
// shared by its VCs through the input multiplexer in front and the output
// demultiplexer behind; the document's main configuration. Each output q
// takes the flit of input x_src[q] when x_valid[q] is high and passes it,
// with the output VC it is bound for, to the output port. The selection
// comes from the FGVC switch allocator (the "crossbar control" of the
// architecture). The crossing is registered: a flit selected in cycle t is on
// the outputs in cycle t+1. Reset clears the valid bits.
module mw_crossbar
  import mw_pkg::*;
#(
  parameter int N_PORTS = 8,
  parameter int N_VCS   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  flit_t                       in_flit  [N_PORTS],
  input  logic [N_PORTS-1:0]          x_valid,
  input  logic [$clog2(N_PORTS)-1:0]  x_src    [N_PORTS],
  input  logic [$clog2(N_VCS)-1:0]    x_vc     [N_PORTS],
  output logic [N_PORTS-1:0]          out_valid,
  output logic [$clog2(N_VCS)-1:0]    out_vc   [N_PORTS],
  output flit_t                       out_flit [N_PORTS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
    end else begin
      out_valid <= x_valid;
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < N_PORTS; q++) begin
      out_flit[q] <= in_flit[x_src[q]];
      out_vc[q]   <= x_vc[q];
    end
  end

endmodule
