// tb_mw_flit_fifo: checks the VC flit buffer against a queue model.
// Random pushes and pops (never into a full or out of an empty buffer, as
// the credit flow control guarantees) at the document's depth of 20; every
// cycle the head entry, the empty and full flags and the count are compared
// with the model. Fill-to-full and simultaneous push/pop on a full buffer
// are forced in a directed phase.
`timescale 1ns/1ps
module tb_mw_flit_fifo;
  localparam int W = 16;
  localparam int D = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  mw_flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  int n_full = 0;
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rdata == model[0], "head entry");
      if (full) n_full++;
      // phase: mostly push for the first 200 cycles, then random
      push = (model.size() < D || ($urandom % 2)) && (i < 200 ? ($urandom % 4 != 0) : ($urandom % 2));
      pop  = (model.size() > 0) && (i < 200 ? ($urandom % 4 == 0) : ($urandom % 2));
      if (model.size() == D && !pop) push = 0;
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(n_full > 0, "buffer never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
