// input_selection: the input selection (IS) unit of one output channel.
//
// While the output is idle, the contention-age arbiter picks one of the
// input channels whose head flit requests this output; that input then owns
// the output, and the crossbar connects it, until its tail flit has passed
// (wormhole switching: the body flits follow the path the head reserved).
// A grant is a competition: the winner's AGE is cleared and every other
// input that requested this output in that cycle ages by one (the caller
// does that from grant_evt and its own requests). The cl_observer reports
// how many input channels want this output, for the downstream switch.
//
// Timing: the grant is combinational, so the head flit can leave in the
// same cycle it wins if the downstream buffer has room; the ownership
// register is set at the next edge and cleared at the edge after the tail
// flit leaves. An output whose owner was granted but could not send yet
// keeps that owner.
module input_selection #(
  parameter int unsigned N     = 5,
  parameter int unsigned CL_W  = 3,
  parameter int unsigned AGE_W = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            req_new,   // heads waiting for this output
  input  logic [N-1:0]            req_all,   // every input that wants it (for CL)
  input  logic [N-1:0][CL_W-1:0]  cl,        // CL each input received from upstream
  input  logic [N-1:0][AGE_W-1:0] age,       // AGE of each input
  input  logic                    out_fire,  // a flit leaves through this output
  input  logic                    out_tail,  // ... and it is a tail flit
  output logic [N-1:0]            sel,       // crossbar select, one-hot or 0
  output logic [N-1:0]            grant_evt, // one-hot when a competition is decided
  output logic                    busy,      // output owned by a worm
  output logic [CL_W-1:0]         cl_out     // contention level sent downstream
);

  logic [N-1:0] owner, arb_grant;

  cagis_arbiter #(.N(N), .CL_W(CL_W), .AGE_W(AGE_W)) u_arb (
    .req   (req_new),
    .cl    (cl),
    .age   (age),
    .grant (arb_grant)
  );

  cl_observer #(.N(N), .CL_W(CL_W)) u_cl (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req_all),
    .cl_out (cl_out)
  );

  assign grant_evt = busy ? '0 : arb_grant;
  assign sel       = busy ? owner : arb_grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (out_fire && out_tail) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (!busy && (arb_grant != '0)) begin
      busy  <= 1'b1;
      owner <= arb_grant;
    end
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
  a_owner_held: assert property (@(posedge clk) disable iff (!rst_n)
    busy && !(out_fire && out_tail) |=> busy && $stable(owner));

endmodule
