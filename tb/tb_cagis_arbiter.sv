// tb_cagis_arbiter: the granted input is the root of the CL/AGE treap.
//
// First the five channels of the sample data (keys 5,1,3,10,8 with
// priorities 0,2,4,7,9): the treap built from them has the node with key 8,
// priority 9 at its root, so that channel is granted. Then random requests,
// contention levels and ages against a reference that ranks the requesters
// by AGE, then CL, then lowest index; and the first-attempt case (all ages
// zero), where the highest CL must win.
module tb_cagis_arbiter;
  localparam int N = 5;
  logic [N-1:0] req, grant;
  logic [N-1:0][3:0] cl;   // four bits here so the sample keys fit
  logic [N-1:0][3:0] age;
  int checks = 0, failures = 0;

  cagis_arbiter #(.N(N), .CL_W(4), .AGE_W(4)) dut (.*);

  function automatic logic [N-1:0] reference();
    int best = -1, best_score = -1;
    for (int i = 0; i < N; i++)
      if (req[i]) begin
        int score = int'(age[i]) * 1000 + int'(cl[i]) * 10 + (N - i);
        if (score > best_score) begin best_score = score; best = i; end
      end
    return best < 0 ? '0 : N'(1 << best);
  endfunction

  initial begin
    // sample data: key = CL, priority = AGE
    req = '1;
    cl  = {4'd8, 4'd10, 4'd3, 4'd1, 4'd5};
    age = {4'd9, 4'd7, 4'd4, 4'd2, 4'd0};
    #1; checks++;
    if (grant != 5'b10000) begin failures++; $display("FAIL sample: %b", grant); end
    // without the root, the next highest priority (key 10, priority 7)
    req = 5'b01111; #1; checks++;
    if (grant != 5'b01000) begin failures++; $display("FAIL sample 2: %b", grant); end

    for (int t = 0; t < 2000; t++) begin
      req = N'($urandom);
      for (int i = 0; i < N; i++) begin
        cl[i]  = 4'($urandom % 6);
        age[i] = (t < 500) ? 4'd0 : 4'($urandom % ((t % 3 == 0) ? 2 : 16));
      end
      #1; checks++;
      if (grant != reference()) begin
        failures++; $display("FAIL req %b cl %h age %h: %b", req, cl, age, grant);
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
