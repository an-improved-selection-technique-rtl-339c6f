// cagis_switch: a five-port wormhole switch with contention-age input
// selection (CAGIS).
//
// Ports are numbered LOCAL, EAST, WEST, NORTH, SOUTH (cagis_pkg). Each
// input channel (input_port) buffers flits, routes the head flit with XY or
// odd-even output selection and keeps its AGE and the contention level
// (CL) it receives from upstream. Each output channel has an input
// selection unit (input_selection) that counts the requests it sees, sends
// that count downstream as its CL, and, when free, grants the requesting
// input at the root of the CL/AGE treap: highest AGE first, then highest
// CL. The crossbar connects every owned output to its input. The input
// channel from the core has no upstream switch, so its CL is held at zero
// and packets already in the network are preferred over new ones, as the
// CAGIS proposal specifies.
//
// Link protocol (this design's choice): valid/ready per flit. out_ready is
// the downstream buffer's "not full", a register output, so nothing
// combinational crosses a link; the CL wires carry a registered count.
// Latency: a head flit written into an empty input buffer can leave on the
// next cycle, so a flit crosses one switch per cycle when nothing blocks.
module cagis_switch
  import cagis_pkg::*;
#(
  parameter route_alg_e  ROUTING = ROUTE_XY,
  parameter int unsigned DEPTH   = BUF_FLITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [COORD_W-1:0]           cur_x,
  input  logic [COORD_W-1:0]           cur_y,
  input  flit_t [NPORTS-1:0]           in_flit,
  input  logic  [NPORTS-1:0]           in_valid,
  output logic  [NPORTS-1:0]           in_ready,
  input  logic  [NPORTS-1:0][CL_W-1:0] in_cl,
  output flit_t [NPORTS-1:0]           out_flit,
  output logic  [NPORTS-1:0]           out_valid,
  input  logic  [NPORTS-1:0]           out_ready,
  output logic  [NPORTS-1:0][CL_W-1:0] out_cl,
  // event strobes for observation: a competition among several inputs was
  // decided at an output, and a waiting head was refused because its output
  // was owned by another worm
  output logic  [NPORTS-1:0]           contest,
  output logic  [NPORTS-1:0]           blocked
);

  // per input
  logic  [NPORTS-1:0][NPORTS-1:0] req_new, req_all;   // [in][out]
  logic  [NPORTS-1:0][CL_W-1:0]   cl;
  logic  [NPORTS-1:0][AGE_W-1:0]  age;
  logic  [NPORTS-1:0]             win, lose, pop, front_valid;
  flit_t [NPORTS-1:0]             front;
  // per output
  logic  [NPORTS-1:0][NPORTS-1:0] req_new_t, req_all_t; // [out][in]
  logic  [NPORTS-1:0][NPORTS-1:0] sel, grant_evt;       // [out][in]
  logic  [NPORTS-1:0]             busy, avail, out_fire;
  logic  [NPORTS-1:0][CL_W-1:0]   cl_rx;

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++) begin
        req_new_t[o][i] = req_new[i][o];
        req_all_t[o][i] = req_all[i][o];
      end
  end

  always_comb begin
    cl_rx = in_cl;
    cl_rx[PORT_LOCAL] = '0;   // cores have no upstream switch
  end

  assign avail    = ~busy & out_ready;
  assign out_fire = out_valid & out_ready;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port #(.ROUTING(ROUTING), .DEPTH(DEPTH)) u_in (
      .clk         (clk),
      .rst_n       (rst_n),
      .cur_x       (cur_x),
      .cur_y       (cur_y),
      .in_flit     (in_flit[p]),
      .in_valid    (in_valid[p]),
      .in_ready    (in_ready[p]),
      .in_cl       (cl_rx[p]),
      .avail       (avail),
      .req_new     (req_new[p]),
      .req_all     (req_all[p]),
      .cl          (cl[p]),
      .age         (age[p]),
      .win         (win[p]),
      .lose        (lose[p]),
      .front       (front[p]),
      .front_valid (front_valid[p]),
      .pop         (pop[p])
    );
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    input_selection #(.N(NPORTS), .CL_W(CL_W), .AGE_W(AGE_W)) u_is (
      .clk       (clk),
      .rst_n     (rst_n),
      .req_new   (req_new_t[p]),
      .req_all   (req_all_t[p]),
      .cl        (cl),
      .age       (age),
      .out_fire  (out_fire[p]),
      .out_tail  (is_tail(out_flit[p])),
      .sel       (sel[p]),
      .grant_evt (grant_evt[p]),
      .busy      (busy[p]),
      .cl_out    (out_cl[p])
    );
    assign contest[p] = (grant_evt[p] != '0) &&
                        ((req_new_t[p] & (req_new_t[p] - 1'b1)) != '0);
    assign blocked[p] = busy[p] && (req_new_t[p] != '0);
  end

  crossbar #(.N(NPORTS), .WIDTH(FLIT_W)) u_xbar (
    .in_data   (front),
    .in_valid  (front_valid),
    .sel       (sel),
    .out_data  (out_flit),
    .out_valid (out_valid)
  );

  // Win, lose and pop for every input, from the decisions of all outputs.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      win[i]  = 1'b0;
      lose[i] = 1'b0;
      pop[i]  = 1'b0;
      for (int o = 0; o < NPORTS; o++) begin
        win[i]  = win[i]  | grant_evt[o][i];
        lose[i] = lose[i] | (req_new[i][o] && (grant_evt[o] != '0) && !grant_evt[o][i]);
        pop[i]  = pop[i]  | (sel[o][i] && out_ready[o] && front_valid[i]);
      end
    end
  end

endmodule
