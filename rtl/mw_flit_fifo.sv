// mw_flit_fifo: the flit buffer of one virtual channel.
//
// A first-in first-out buffer of DEPTH entries of WIDTH bits, used for the
// input VC buffers (stage 1) and the output VC buffers (stage 5) of the
// router. The document makes both buffers one message long: 20 flits, the
// default DEPTH. It is a circular array with read and write pointers and an
// occupancy count.
//
// Interface: push/wdata write an entry at the clock edge; the oldest entry is
// always visible on rdata while empty is low (show-ahead), and pop removes it
// at the clock edge. Push and pop may happen in the same cycle, also when the
// buffer is full. Pushing into a full buffer or popping an empty one is a
// protocol error, flagged by assertions; the flow control around the buffer
// (credits) prevents both. Reset (active low, synchronous) empties the
// buffer; the entries themselves are not cleared.
module mw_flit_fifo #(
  parameter int WIDTH = 66,
  parameter int DEPTH = 20
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
