// cagis_pkg: types and constants shared by the contention-age (CAGIS) mesh.
//
// A packet is a worm of flits. The head flit carries the routing
// information (source and destination tile coordinates); body flits follow
// the path the head reserved and the tail flit releases it. Every flit is
// KIND_W + DATA_W bits wide. The port numbering is LOCAL (the IP core),
// EAST (+x), WEST (-x), NORTH (+y), SOUTH (-y), with (0,0) at the lower
// left tile. The flit layout, widths and port order are this design's own
// choices; the packet length and buffer depth of five flits are the
// figures used in the evaluated configuration.
package cagis_pkg;

  localparam int unsigned NPORTS  = 5;   // local + four mesh directions
  localparam int unsigned PORT_W  = 3;   // enough to number NPORTS ports
  localparam int unsigned COORD_W = 4;   // tile coordinate, meshes up to 16x16
  localparam int unsigned DATA_W  = 32;  // flit payload
  localparam int unsigned CL_W    = 3;   // contention level: 0..NPORTS requests
  localparam int unsigned AGE_W   = 4;   // saturating count of lost competitions
  localparam int unsigned PKT_FLITS = 5; // flits per packet in the evaluation
  localparam int unsigned BUF_FLITS = 5; // input buffer depth in the evaluation

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_EAST  = 3'd1,
    PORT_WEST  = 3'd2,
    PORT_NORTH = 3'd3,
    PORT_SOUTH = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    FLIT_BODY = 2'd0,
    FLIT_HEAD = 2'd1,
    FLIT_TAIL = 2'd2,
    FLIT_SOLO = 2'd3   // single-flit packet: head and tail at once
  } flit_kind_e;

  typedef enum logic {
    ROUTE_XY = 1'b0,   // deterministic dimension order
    ROUTE_OE = 1'b1    // minimal odd-even turn model, adaptive
  } route_alg_e;

  // Payload layout of a head flit.
  typedef struct packed {
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [DATA_W-4*COORD_W-1:0] tag;   // free for the sender (packet id)
  } head_t;

  typedef struct packed {
    flit_kind_e         kind;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  function automatic logic is_head(flit_t f);
    return (f.kind == FLIT_HEAD) || (f.kind == FLIT_SOLO);
  endfunction

  function automatic logic is_tail(flit_t f);
    return (f.kind == FLIT_TAIL) || (f.kind == FLIT_SOLO);
  endfunction

endpackage
