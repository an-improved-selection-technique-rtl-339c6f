// crossbar: the switch fabric between the input and output channels.
//
// Every output channel is driven by the input channel that currently owns
// it (sel, one-hot over the inputs, or zero when the output is idle). The
// output carries that input's front flit and its valid bit; an output with
// no owner is idle. Purely combinational multiplexers, one per output.
module crossbar #(
  parameter int unsigned N     = 5,
  parameter int unsigned WIDTH = 34
) (
  input  logic [N-1:0][WIDTH-1:0] in_data,
  input  logic [N-1:0]            in_valid,
  input  logic [N-1:0][N-1:0]     sel,       // sel[out][in], one-hot or 0
  output logic [N-1:0][WIDTH-1:0] out_data,
  output logic [N-1:0]            out_valid
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_data[o]  = '0;
      out_valid[o] = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (sel[o][i]) begin
          out_data[o]  = out_data[o] | in_data[i];
          out_valid[o] = out_valid[o] | in_valid[i];
        end
      end
    end
  end

endmodule
