// input_port: one input channel of a CAGIS switch.
//
// Holds the parts the architecture places in each input channel: the input
// buffer, the output selection (OS) that routes the head flit, the AGE
// register and the CF register, which here stores the contention level
// received from the upstream switch over IN-CL (the CAGIS proposal does not
// spell out CF; holding the received CL is this design's reading).
//
// The head flit at the front of the buffer requests one output (req_new)
// until an input selection unit grants it (win). From then the channel is
// locked to that output: the route is frozen and every flit, up to and
// including the tail, is popped whenever the crossbar forwards it (pop).
// req_all shows the output the channel wants or holds whenever it has a
// flit waiting, for the contention count. ROUTING picks XY or odd-even
// output selection; for odd-even, avail tells which outputs are free.
//
// Timing: route, requests and the front flit are combinational from
// registers; win, lose and pop take effect at the next edge. The CF
// register adds one cycle to the upstream CL.
module input_port
  import cagis_pkg::*;
#(
  parameter route_alg_e  ROUTING = ROUTE_XY,
  parameter int unsigned DEPTH   = BUF_FLITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COORD_W-1:0]  cur_x,
  input  logic [COORD_W-1:0]  cur_y,
  // link from upstream (IN-DATA, IN-CL)
  input  flit_t               in_flit,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [CL_W-1:0]     in_cl,
  // towards the input selection units
  input  logic [NPORTS-1:0]   avail,
  output logic [NPORTS-1:0]   req_new,
  output logic [NPORTS-1:0]   req_all,
  output logic [CL_W-1:0]     cl,
  output logic [AGE_W-1:0]    age,
  input  logic                win,
  input  logic                lose,
  // towards the crossbar
  output flit_t               front,
  output logic                front_valid,
  input  logic                pop
);

  logic [NPORTS-1:0]          route, locked_dir;
  logic                       locked;
  head_t                      hd;

  input_buffer #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_flit),
    .out_valid (front_valid),
    .out_ready (pop),
    .out_data  (front),
    .count     ()
  );

  assign hd = head_t'(front.data);

  if (ROUTING == ROUTE_XY) begin : g_xy
    xy_route u_os (
      .cur_x (cur_x), .cur_y (cur_y),
      .dst_x (hd.dst_x), .dst_y (hd.dst_y),
      .out_port (route)
    );
  end else begin : g_oe
    logic [NPORTS-1:0] allowed_unused;
    oe_route u_os (
      .cur_x (cur_x), .cur_y (cur_y), .src_x (hd.src_x),
      .dst_x (hd.dst_x), .dst_y (hd.dst_y),
      .avail (avail),
      .allowed (allowed_unused),
      .out_port (route)
    );
  end

  age_counter #(.WIDTH(AGE_W)) u_age (
    .clk (clk), .rst_n (rst_n), .win (win), .lose (lose), .age (age)
  );

  // CF: contention level acquired from the upstream switch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cl <= '0;
    else        cl <= in_cl;
  end

  assign req_new = (front_valid && !locked && is_head(front)) ? route : '0;
  assign req_all = !front_valid ? '0 : (locked ? locked_dir : req_new);

  // Wormhole lock: from the grant of the head up to the tail leaving.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      locked_dir <= '0;
    end else if (pop && is_tail(front)) begin
      locked     <= 1'b0;
      locked_dir <= '0;
    end else if (win) begin
      locked     <= 1'b1;
      locked_dir <= route;
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> front_valid);
  a_win_req:   assert property (@(posedge clk) disable iff (!rst_n) win |-> req_new != '0);
  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    front_valid && !locked |-> is_head(front));

endmodule
