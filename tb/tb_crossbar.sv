// tb_crossbar: random input words and one-hot (or empty) selections; every
// output must carry exactly the selected input's word and valid bit.
module tb_crossbar;
  localparam int N = 5, W = 34;
  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0] in_valid, out_valid;
  logic [N-1:0][N-1:0] sel;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .WIDTH(W)) dut (.*);

  initial begin
    int s [N];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) begin
        in_data[i] = {$urandom, 2'($urandom)};
        in_valid[i] = 1'($urandom);
      end
      for (int o = 0; o < N; o++) begin
        s[o] = $urandom % (N + 1);          // N means idle
        sel[o] = (s[o] == N) ? '0 : N'(1 << s[o]);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (s[o] == N) begin
          if (out_valid[o] || out_data[o] != '0) failures++;
        end else if (out_valid[o] != in_valid[s[o]] || out_data[o] != in_data[s[o]]) begin
          failures++; $display("FAIL output %0d from input %0d", o, s[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
