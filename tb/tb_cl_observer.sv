// tb_cl_observer: the contention level is the number of requesting inputs,
// seen one cycle later. Random request vectors over five inputs.
module tb_cl_observer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [4:0] req;
  logic [2:0] cl_out;
  int checks = 0, failures = 0, expected = 0;

  cl_observer #(.N(5), .CL_W(3)) dut (.*);

  initial begin
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 500; cyc++) begin
      req = 5'($urandom);
      expected = 0;
      for (int i = 0; i < 5; i++) if (req[i]) expected++;
      @(negedge clk);
      checks++;
      if (cl_out != 3'(expected)) begin
        failures++; $display("FAIL req %b: cl %0d expected %0d", req, cl_out, expected);
      end
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
