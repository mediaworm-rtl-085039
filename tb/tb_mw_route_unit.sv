// tb_mw_route_unit: checks the routing decision.
// A single 8-port switch must send destination d to port d. A switch at
// (x=1, y=0) of the 2x2 fat mesh must send destinations on the other column
// to the X fat link (ports 4/5, the less loaded, port 4 on a tie), those on
// its column but the other row to the Y fat link (ports 6/7), and its own
// endpoints {y=0,x=1,e} to port e. All destinations and random loads are
// tried.
`timescale 1ns/1ps
module tb_mw_route_unit;
  import mw_pkg::*;
  localparam int NP = 8;
  localparam int LW = 5;
  logic [DEST_W-1:0] dest;
  logic [LW-1:0]     load [NP];
  logic [2:0]        port_single, port_mesh;
  int checks = 0, failures = 0;

  mw_route_unit #(.N_PORTS(NP), .LOAD_W(LW)) u_single (.dest, .port_load(load), .out_port(port_single));
  mw_route_unit #(.N_PORTS(NP), .LOAD_W(LW), .FAT_MESH(1'b1), .MY_X(1'b1), .MY_Y(1'b0))
    u_mesh (.dest, .port_load(load), .out_port(port_mesh));

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int d, exp;
      d = (i < 16) ? i : $urandom % 16;
      dest = DEST_W'(d);
      for (int p = 0; p < NP; p++) load[p] = LW'($urandom % 17);
      if (i % 7 == 0) begin load[4] = load[5]; load[6] = load[7]; end
      #1;
      if (d < NP) check(int'(port_single) == d, "single switch port");
      if (((d >> 2) & 1) != 1)        exp = (load[5] < load[4]) ? 5 : 4;
      else if (((d >> 3) & 1) != 0)   exp = (load[7] < load[6]) ? 7 : 6;
      else                            exp = d & 3;
      check(int'(port_mesh) == exp, $sformatf("mesh dest %0d: port %0d expected %0d", d, port_mesh, exp));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
