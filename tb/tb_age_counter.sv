// tb_age_counter: random wins and losses against a model.
//
// AGE must clear on a win, grow by one on each loss and hold otherwise; a
// long run of losses shows that it saturates instead of wrapping.
module tb_age_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic win, lose;
  logic [3:0] age;
  int model = 0, checks = 0, failures = 0;

  age_counter #(.WIDTH(4)) dut (.*);

  initial begin
    win = 0; lose = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      checks++;
      if (age != 4'(model)) begin
        failures++; $display("FAIL cycle %0d: age %0d expected %0d", cyc, age, model);
      end
      if (cyc >= 300 && cyc < 330) begin win = 0; lose = 1; end   // long losing streak
      else begin
        case ($urandom % 4)
          0: begin win = 1; lose = 0; end
          1, 2: begin win = 0; lose = 1; end
          default: begin win = 0; lose = 0; end
        endcase
      end
      if (win) model = 0;
      else if (lose && model < 15) model++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
