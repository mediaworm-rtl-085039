// tb_mw_rr_arbiter: checks the round-robin arbiter against a model.
// Random request vectors over 5 requesters; the grant must be the first
// requester at or after the model's pointer, and the pointer must move past
// the winner only when advance is high. A directed phase with all requests
// high checks that the grant rotates 0,1,2,3,4,0.
`timescale 1ns/1ps
module tb_mw_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, gnt;
  logic advance, gnt_any;
  logic [$clog2(N)-1:0] gnt_idx;
  int checks = 0, failures = 0;
  int ptr = 0;

  mw_rr_arbiter #(.N(N)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    req = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int exp;
      @(negedge clk);
      req = (i < 10) ? '1 : N'($urandom);
      advance = (i < 10) ? 1'b1 : ($urandom % 4 != 0);
      #1;
      exp = -1;
      for (int k = 0; k < N; k++)
        if (exp < 0 && req[(ptr + k) % N]) exp = (ptr + k) % N;
      check(gnt_any == (exp >= 0), "gnt_any");
      if (exp >= 0) begin
        check(int'(gnt_idx) == exp, $sformatf("grant %0d, expected %0d", gnt_idx, exp));
        check(gnt == N'(1 << exp), "one-hot grant");
        if (i < 10) check(exp == i % N, "rotation with all requests");
      end else check(gnt == 0, "no grant without requests");
      @(posedge clk);
      if (advance && exp >= 0) ptr = (exp + 1) % N;
    end
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
