// tb_xy_route: every current/destination pair of a 4x4 mesh.
//
// The expected port is worked out from the coordinates (X first, then Y,
// local on arrival), and the route of the example packet from (0,3) to
// (2,2) is walked hop by hop: (0,3)->(1,3)->(2,3)->(2,2).
module tb_xy_route;
  import cagis_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [NPORTS-1:0] out_port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  function automatic int expect_port(int cx, int cy, int dx, int dy);
    if (dx != cx) return dx > cx ? 1 : 2;
    if (dy != cy) return dy > cy ? 3 : 4;
    return 0;
  endfunction

  initial begin
    int x, y;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        cur_x = 4'(a % 4); cur_y = 4'(a / 4); dst_x = 4'(b % 4); dst_y = 4'(b / 4);
        #1;
        checks++;
        if (out_port != 5'(1 << expect_port(a % 4, a / 4, b % 4, b / 4))) begin
          failures++;
          $display("FAIL (%0d,%0d)->(%0d,%0d): %b", cur_x, cur_y, dst_x, dst_y, out_port);
        end
      end
    // the worked example
    x = 0; y = 3; dst_x = 2; dst_y = 2;
    for (int hop = 0; hop < 4; hop++) begin
      cur_x = 4'(x); cur_y = 4'(y); #1;
      checks++;
      case (hop)
        0, 1: if (out_port != 5'b00010) failures++;
        2:    if (out_port != 5'b10000) failures++;
        3:    if (out_port != 5'b00001) failures++;
      endcase
      if (out_port[1]) x++;
      if (out_port[4]) y--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
