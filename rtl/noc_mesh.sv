// noc_mesh: a MESH_X x MESH_Y network on chip of CAGIS switches.
//
// Tiles are numbered n = y*MESH_X + x with (0,0) at the lower left; each
// tile has one switch, and the switch's LOCAL port is brought out to the
// IP core of the tile (core_*). Neighbouring switches are joined by a pair
// of opposite links, each carrying flits with valid/ready and, alongside,
// the contention level of the sending output channel, which the receiving
// input channel uses for input selection. Ports on the mesh boundary are
// tied off: no flits arrive there, and minimal routing never sends any.
//
// The evaluated configuration is a 4x4 mesh with input buffers of five
// flits; ROUTING chooses XY (default) or odd-even output selection, the two
// routing schemes the CAGIS proposal combines with contention-age input
// selection. Packets enter from the cores as worms of flits (head, bodies,
// tail) and leave at the destination core in order.
//
// contest and blocked are per-tile, per-output event strobes from the
// switches, for observation only.
module noc_mesh
  import cagis_pkg::*;
#(
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter route_alg_e  ROUTING = ROUTE_XY,
  parameter int unsigned DEPTH   = BUF_FLITS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  flit_t [MESH_X*MESH_Y-1:0]           core_in_flit,
  input  logic  [MESH_X*MESH_Y-1:0]           core_in_valid,
  output logic  [MESH_X*MESH_Y-1:0]           core_in_ready,
  output flit_t [MESH_X*MESH_Y-1:0]           core_out_flit,
  output logic  [MESH_X*MESH_Y-1:0]           core_out_valid,
  input  logic  [MESH_X*MESH_Y-1:0]           core_out_ready,
  output logic  [MESH_X*MESH_Y-1:0][NPORTS-1:0] contest,
  output logic  [MESH_X*MESH_Y-1:0][NPORTS-1:0] blocked
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  flit_t [NODES-1:0][NPORTS-1:0]           in_flit, out_flit;
  logic  [NODES-1:0][NPORTS-1:0]           in_valid, in_ready, out_valid, out_ready;
  logic  [NODES-1:0][NPORTS-1:0][CL_W-1:0] in_cl, out_cl;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N  = y*MESH_X + x;
      localparam int unsigned NE = y*MESH_X + x + 1;
      localparam int unsigned NW = y*MESH_X + x - 1;
      localparam int unsigned NN = (y+1)*MESH_X + x;
      localparam int unsigned NS = (y-1)*MESH_X + x;

      cagis_switch #(.ROUTING(ROUTING), .DEPTH(DEPTH)) u_sw (
        .clk       (clk),
        .rst_n     (rst_n),
        .cur_x     (COORD_W'(x)),
        .cur_y     (COORD_W'(y)),
        .in_flit   (in_flit[N]),
        .in_valid  (in_valid[N]),
        .in_ready  (in_ready[N]),
        .in_cl     (in_cl[N]),
        .out_flit  (out_flit[N]),
        .out_valid (out_valid[N]),
        .out_ready (out_ready[N]),
        .out_cl    (out_cl[N]),
        .contest   (contest[N]),
        .blocked   (blocked[N])
      );

      // local port <-> core
      assign in_flit[N][PORT_LOCAL]   = core_in_flit[N];
      assign in_valid[N][PORT_LOCAL]  = core_in_valid[N];
      assign in_cl[N][PORT_LOCAL]     = '0;
      assign core_in_ready[N]         = in_ready[N][PORT_LOCAL];
      assign core_out_flit[N]         = out_flit[N][PORT_LOCAL];
      assign core_out_valid[N]        = out_valid[N][PORT_LOCAL];
      assign out_ready[N][PORT_LOCAL] = core_out_ready[N];

      // east side: from/to tile (x+1, y)
      if (x + 1 < MESH_X) begin : g_e
        assign in_flit[N][PORT_EAST]   = out_flit[NE][PORT_WEST];
        assign in_valid[N][PORT_EAST]  = out_valid[NE][PORT_WEST];
        assign in_cl[N][PORT_EAST]     = out_cl[NE][PORT_WEST];
        assign out_ready[N][PORT_EAST] = in_ready[NE][PORT_WEST];
      end else begin : g_e_edge
        assign in_flit[N][PORT_EAST]   = '0;
        assign in_valid[N][PORT_EAST]  = 1'b0;
        assign in_cl[N][PORT_EAST]     = '0;
        assign out_ready[N][PORT_EAST] = 1'b0;
      end

      // west side: from/to tile (x-1, y)
      if (x > 0) begin : g_w
        assign in_flit[N][PORT_WEST]   = out_flit[NW][PORT_EAST];
        assign in_valid[N][PORT_WEST]  = out_valid[NW][PORT_EAST];
        assign in_cl[N][PORT_WEST]     = out_cl[NW][PORT_EAST];
        assign out_ready[N][PORT_WEST] = in_ready[NW][PORT_EAST];
      end else begin : g_w_edge
        assign in_flit[N][PORT_WEST]   = '0;
        assign in_valid[N][PORT_WEST]  = 1'b0;
        assign in_cl[N][PORT_WEST]     = '0;
        assign out_ready[N][PORT_WEST] = 1'b0;
      end

      // north side: from/to tile (x, y+1)
      if (y + 1 < MESH_Y) begin : g_n
        assign in_flit[N][PORT_NORTH]   = out_flit[NN][PORT_SOUTH];
        assign in_valid[N][PORT_NORTH]  = out_valid[NN][PORT_SOUTH];
        assign in_cl[N][PORT_NORTH]     = out_cl[NN][PORT_SOUTH];
        assign out_ready[N][PORT_NORTH] = in_ready[NN][PORT_SOUTH];
      end else begin : g_n_edge
        assign in_flit[N][PORT_NORTH]   = '0;
        assign in_valid[N][PORT_NORTH]  = 1'b0;
        assign in_cl[N][PORT_NORTH]     = '0;
        assign out_ready[N][PORT_NORTH] = 1'b0;
      end

      // south side: from/to tile (x, y-1)
      if (y > 0) begin : g_s
        assign in_flit[N][PORT_SOUTH]   = out_flit[NS][PORT_NORTH];
        assign in_valid[N][PORT_SOUTH]  = out_valid[NS][PORT_NORTH];
        assign in_cl[N][PORT_SOUTH]     = out_cl[NS][PORT_NORTH];
        assign out_ready[N][PORT_SOUTH] = in_ready[NS][PORT_NORTH];
      end else begin : g_s_edge
        assign in_flit[N][PORT_SOUTH]   = '0;
        assign in_valid[N][PORT_SOUTH]  = 1'b0;
        assign in_cl[N][PORT_SOUTH]     = '0;
        assign out_ready[N][PORT_SOUTH] = 1'b0;
      end
    end
  end

endmodule
