// xy_route: deterministic dimension-order output selection.
//
// A packet first travels along X until its column matches the destination,
// then along Y; at the destination it leaves through the local port. This
// is the deterministic output selection the CAGIS proposal evaluates. For a
// packet from (0,3) to (2,2) it yields the hops (0,3)->(1,3)->(2,3)->(2,2).
// Purely combinational; the result is a one-hot vector over the five ports
// in cagis_pkg order (LOCAL, EAST, WEST, NORTH, SOUTH).
module xy_route
  import cagis_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [NPORTS-1:0]  out_port   // one-hot
);

  always_comb begin
    out_port = '0;
    if (dst_x > cur_x)      out_port[PORT_EAST]  = 1'b1;
    else if (dst_x < cur_x) out_port[PORT_WEST]  = 1'b1;
    else if (dst_y > cur_y) out_port[PORT_NORTH] = 1'b1;
    else if (dst_y < cur_y) out_port[PORT_SOUTH] = 1'b1;
    else                    out_port[PORT_LOCAL] = 1'b1;
  end

endmodule
