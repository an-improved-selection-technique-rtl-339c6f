// tb_oe_route: the odd-even route function over every source/destination
// pair of a 4x4 and of a 6x6 mesh.
//
// From each source the testbench follows every route the function allows,
// tile by tile, and checks at each step that: at least one direction is
// allowed; every allowed direction shortens the distance to the
// destination; no allowed direction makes a forbidden turn (east to north
// or south in an even column, north or south to west in an odd column); the
// local port is chosen exactly on arrival; and the chosen direction is an
// allowed one that honours the availability mask (a free allowed direction
// is taken before a busy one, X before Y). It also checks the worked
// example: from (0,3) to (2,2) exactly the paths (0,3)->(0,2)->(1,2)->(2,2)
// and (0,3)->(1,3)->(1,2)->(2,2) exist.
module tb_oe_route;
  import cagis_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, src_x, dst_x, dst_y;
  logic [NPORTS-1:0] avail, allowed, out_port;
  int checks = 0, failures = 0, paths_ex = 0;

  oe_route dut (.*);

  task automatic fail(string m);
    failures++;
    $display("FAIL %s: src col %0d at (%0d,%0d) to (%0d,%0d) allowed %b out %b avail %b",
             m, src_x, cur_x, cur_y, dst_x, dst_y, allowed, out_port, avail);
  endtask

  // states to visit: x, y, direction of the last move (0 = injected)
  int sx_q [$], sy_q [$], sd_q [$];

  task automatic explore(int mesh, int sx, int sy, int dx, int dy);
    int x, y, din, nx, ny, dcur, dnext;
    paths_ex = 0;
    sx_q.delete(); sy_q.delete(); sd_q.delete();
    sx_q.push_back(sx); sy_q.push_back(sy); sd_q.push_back(0);
    while (sx_q.size() != 0) begin
      x = sx_q.pop_front(); y = sy_q.pop_front(); din = sd_q.pop_front();
      cur_x = 4'(x); cur_y = 4'(y); src_x = 4'(sx); dst_x = 4'(dx); dst_y = 4'(dy);
      avail = 5'($urandom);
      #1;
      checks++;
      if (allowed == '0) fail("nothing allowed");
      if ((allowed[0] != 0) != (x == dx && y == dy)) fail("local");
      if ((out_port & allowed) != out_port || !$onehot(out_port)) fail("choice not allowed");
      if (!allowed[0]) begin
        logic [NPORTS-1:0] xa = allowed & 5'b00110, ya = allowed & 5'b11000;
        logic [NPORTS-1:0] want;
        if ((xa & avail) != 0) want = xa;
        else if ((ya & avail) != 0) want = ya;
        else if (xa != 0) want = xa;
        else want = ya;
        if (out_port != want) fail("selection rule");
      end
      if (x == dx && y == dy) paths_ex++;
      else begin
        dcur = (dx > x ? dx - x : x - dx) + (dy > y ? dy - y : y - dy);
        for (int p = 1; p < 5; p++) if (allowed[p]) begin
          nx = x + (p == 1) - (p == 2);
          ny = y + (p == 3) - (p == 4);
          dnext = (dx > nx ? dx - nx : nx - dx) + (dy > ny ? dy - ny : ny - dy);
          if (nx < 0 || ny < 0 || nx >= mesh || ny >= mesh || dnext != dcur - 1) fail("not minimal");
          if (din == 1 && (p == 3 || p == 4) && (x % 2 == 0)) fail("EN/ES turn in even column");
          if ((din == 3 || din == 4) && p == 2 && (x % 2 == 1)) fail("NW/SW turn in odd column");
          sx_q.push_back(nx); sy_q.push_back(ny); sd_q.push_back(p);
        end
      end
    end
  endtask

  initial begin
    for (int mesh = 4; mesh <= 6; mesh += 2)
      for (int s = 0; s < mesh*mesh; s++)
        for (int d = 0; d < mesh*mesh; d++)
          explore(mesh, s % mesh, s / mesh, d % mesh, d / mesh);
    explore(4, 0, 3, 2, 2);
    checks++;
    if (paths_ex != 2) begin failures++; $display("FAIL example: %0d paths", paths_ex); end
    // and which two: from (0,3) both south and east are legal first moves
    cur_x = 0; cur_y = 3; src_x = 0; dst_x = 2; dst_y = 2; avail = '0; #1;
    checks++;
    if (allowed != 5'b10010) begin failures++; $display("FAIL example first hop %b", allowed); end
    // at (1,3) only south; at (2,3) the east-south turn is never offered
    cur_x = 1; #1; checks++;
    if (allowed != 5'b10000) begin failures++; $display("FAIL example (1,3) %b", allowed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
