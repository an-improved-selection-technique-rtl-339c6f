// tb_input_buffer: random pushes and pops against a queue model.
//
// Checks every cycle that ready means "not full", valid "not empty", that
// the front word is the oldest one pushed and that the occupancy count is
// right, at the five-flit depth of the evaluated configuration. Counts how
// often the buffer was full with a push waiting, so back-pressure is known
// to have been exercised.
module tb_input_buffer;
  localparam int W = 34, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, full_seen = 0;
  logic [W-1:0] model [$];

  input_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // phases: fill-heavy, drain-heavy, balanced
      in_valid  = ($urandom % 100) < ((cyc / 500) % 3 == 0 ? 80 : (cyc / 500) % 3 == 1 ? 20 : 50);
      out_ready = ($urandom % 100) < ((cyc / 500) % 3 == 0 ? 20 : (cyc / 500) % 3 == 1 ? 80 : 50);
      in_data   = {$urandom, 2'($urandom)};
      #1;
      chk(in_ready == (model.size() < D), "ready");
      chk(out_valid == (model.size() != 0), "valid");
      chk(count == 3'(model.size()), "count");
      if (model.size() != 0) chk(out_data == model[0], "data");
      if (in_valid && !in_ready) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    chk(full_seen > 0, "buffer never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
