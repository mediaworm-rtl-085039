// mw_rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle. The search for a requester starts
// at a priority pointer and wraps around; when advance is high and a grant is
// made, the pointer moves to the requester after the winner, so every
// requester that keeps asking is served within N grants. The router uses it
// for the stage-3 arbitration of header flits, for picking which VC's header
// the routing unit sees, and in the output VC multiplexer. The document names
// these arbitration points but not their policy; round robin is this
// design's choice.
//
// Interface: req is sampled combinationally and gnt (one-hot), gnt_idx and
// gnt_any are combinational. Reset sets the pointer to requester 0.
module mw_rr_arbiter #(
  parameter int N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_any
);

  localparam int IW = $clog2(N);

  logic [IW-1:0] ptr;

  // Requester k steps after the pointer, wrapping at N.
  function automatic logic [IW-1:0] rotate(logic [IW-1:0] base, int k);
    logic [IW:0] sum;
    sum = {1'b0, base} + (IW+1)'(k);
    return (sum >= (IW+1)'(N)) ? IW'(sum - (IW+1)'(N)) : sum[IW-1:0];
  endfunction

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    gnt_any = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (!gnt_any && req[rotate(ptr, k)]) begin
        gnt_any  = 1'b1;
        gnt_idx  = rotate(ptr, k);
      end
    end
    if (gnt_any) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && gnt_any)
      ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_granted_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
