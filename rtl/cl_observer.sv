// cl_observer: contention level of one output channel.
//
// Each output channel counts how many input channels are requesting it
// this cycle; that count is its contention level (CL), which is sent to the
// input channel of the downstream switch on the far end of the link and
// used there by the input selection. Counting the requests follows the
// CAGIS proposal; registering the count, so that the value the downstream switch
// sees is one cycle old and no combinational path crosses a link, is this
// design's choice.
module cl_observer #(
  parameter int unsigned N    = 5,
  parameter int unsigned CL_W = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    req,     // input channels requesting this output
  output logic [CL_W-1:0] cl_out   // registered request count
);

  logic [CL_W-1:0] cnt;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < N; i++) cnt = cnt + CL_W'(req[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cl_out <= '0;
    else        cl_out <= cnt;
  end

endmodule
