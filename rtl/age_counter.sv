// age_counter: the AGE register of one input channel.
//
// AGE counts how often the channel has lost a competition for the output it
// wants (not how long its packet has waited). It starts at zero, returns to
// zero when the channel wins, and grows by one each time the channel takes
// part in a competition and another channel is granted. That is the
// rule of the CAGIS proposal. Saturating at its maximum instead of wrapping is this
// design's choice; with five inputs and AGE taking precedence, a channel
// cannot lose more than a few times in a row, so the limit is never reached
// in practice. Updates take effect at the next clock edge.
module age_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             win,    // granted an output this cycle
  input  logic             lose,   // competed, another input was granted
  output logic [WIDTH-1:0] age
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    age <= '0;
    else if (win)                  age <= '0;
    else if (lose && (age != '1))  age <= age + 1'b1;
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(win && lose));

endmodule
