// oe_route: minimal odd-even adaptive output selection.
//
// The odd-even turn model avoids deadlock without virtual channels by
// forbidding east-to-north and east-to-south turns at tiles in even columns
// and north-to-west and south-to-west turns at tiles in odd columns. The
// route function below lists every minimal direction that respects those
// rules (the usual formulation, which needs the source column):
//   - same column:          north or south only;
//   - eastbound, same row:  east only;
//   - eastbound otherwise:  Y move allowed if the current column is odd or is
//                           the source column; east allowed if the
//                           destination column is odd or lies more than one
//                           column away;
//   - westbound:            west always; Y move allowed in even columns.
// From (0,3) to (2,2) this gives (0,3)->(0,2)->(1,2)->(2,2) or
// (0,3)->(1,3)->(1,2)->(2,2), never the turn east-to-south at (2,3).
//
// Choosing among the allowed directions is this design's own rule: take the
// first allowed direction whose output is free (avail), trying the X
// direction before the Y direction; if none is free, take the X direction
// if allowed, else the Y one. Purely combinational.
module oe_route
  import cagis_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] src_x,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic [NPORTS-1:0]  avail,      // output free and downstream has room
  output logic [NPORTS-1:0]  allowed,    // every permitted minimal direction
  output logic [NPORTS-1:0]  out_port    // the chosen one, one-hot
);

  logic [NPORTS-1:0] x_dir, y_dir;   // the X and Y candidates, one-hot or 0

  always_comb begin
    allowed = '0;
    y_dir   = '0;
    if (dst_y > cur_y)      y_dir[PORT_NORTH] = 1'b1;
    else if (dst_y < cur_y) y_dir[PORT_SOUTH] = 1'b1;

    if (dst_x == cur_x && dst_y == cur_y) begin
      allowed[PORT_LOCAL] = 1'b1;
    end else if (dst_x == cur_x) begin
      allowed = y_dir;
    end else if (dst_x > cur_x) begin
      if (cur_x[0] || (cur_x == src_x)) allowed = allowed | y_dir;
      if (dst_x[0] || (dst_x - cur_x != COORD_W'(1)) || (y_dir == '0))
        allowed[PORT_EAST] = 1'b1;
    end else begin
      allowed[PORT_WEST] = 1'b1;
      if (!cur_x[0]) allowed = allowed | y_dir;
    end

    x_dir = allowed & ((NPORTS'(1) << PORT_EAST) | (NPORTS'(1) << PORT_WEST));

    if (allowed[PORT_LOCAL])              out_port = allowed;
    else if ((x_dir & avail) != '0)       out_port = x_dir;
    else if ((allowed & y_dir & avail) != '0) out_port = allowed & y_dir;
    else if (x_dir != '0)                 out_port = x_dir;
    else                                  out_port = allowed & y_dir;
  end

endmodule
