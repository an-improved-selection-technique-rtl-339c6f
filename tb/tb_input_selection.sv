// tb_input_selection: grant, wormhole ownership and contention level of one
// output channel.
//
// Directed cases first: two heads with equal AGE (the higher CL wins), the
// output kept by its owner until the tail flit leaves and no competition
// meanwhile, an older head beating a higher CL, a grant held while the
// downstream buffer is full, and a one-flit packet that frees the output in
// the cycle it wins. Then random traffic against a model of the rules. The
// contention level sent downstream must be last cycle's number of requests.
module tb_input_selection;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] req_new, req_all, sel, grant_evt;
  logic [N-1:0][2:0] cl;
  logic [N-1:0][3:0] age;
  logic out_fire, out_tail, busy;
  logic [2:0] cl_out;
  int checks = 0, failures = 0;
  logic         m_busy;
  logic [N-1:0] m_owner;
  int           m_cl;

  input_selection #(.N(N), .CL_W(3), .AGE_W(4)) dut (.*);

  function automatic logic [N-1:0] root();
    int best = -1;
    for (int i = 0; i < N; i++)
      if (req_new[i] && (best < 0 || age[i] > age[best] ||
                         (age[i] == age[best] && cl[i] > cl[best]))) best = i;
    return best < 0 ? '0 : N'(1 << best);
  endfunction

  task automatic expect_sel(logic [N-1:0] s, logic [N-1:0] g, string what);
    #1; checks++;
    if (sel != s || grant_evt != g) begin
      failures++;
      $display("FAIL %s: sel %b grant %b, expected %b %b", what, sel, grant_evt, s, g);
    end
  endtask

  initial begin
    req_new = '0; req_all = '0; cl = '0; age = '0; out_fire = 0; out_tail = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // equal ages: highest CL
    @(negedge clk);
    req_new = 5'b00110; req_all = 5'b00110; cl[1] = 2; cl[2] = 4; out_fire = 1;
    expect_sel(5'b00100, 5'b00100, "CL decides");
    // worm in progress: owner kept, no competition
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      req_new = 5'b00010; req_all = 5'b00110; out_fire = 1; out_tail = (k == 2);
      expect_sel(5'b00100, 5'b00000, "owner kept");
    end
    @(negedge clk);
    checks++;
    if (busy || cl_out != 3'd2) begin failures++; $display("FAIL release/cl %b %0d", busy, cl_out); end
    // an aged channel beats a higher CL
    req_new = 5'b01010; age[1] = 1; cl[1] = 0; cl[3] = 5; out_fire = 0; out_tail = 0;
    expect_sel(5'b00010, 5'b00010, "AGE decides");
    // granted but blocked downstream: stays owner
    repeat (3) begin
      @(negedge clk);
      req_new = 5'b01000; age[1] = 0; age[3] = 1;
      expect_sel(5'b00010, 5'b00000, "held while blocked");
    end
    @(negedge clk); out_fire = 1; out_tail = 1; req_new = 5'b01000;
    expect_sel(5'b00010, 5'b00000, "tail");
    // one-flit packet: won and released in one cycle
    @(negedge clk); req_new = 5'b01000; out_fire = 1; out_tail = 1;
    expect_sel(5'b01000, 5'b01000, "solo grant");
    @(negedge clk); req_new = 5'b00001; out_fire = 0; out_tail = 0;
    expect_sel(5'b00001, 5'b00001, "free after solo");
    // random against the model
    @(negedge clk); out_fire = 1; out_tail = 1; req_new = '0;
    @(negedge clk);
    m_busy = 0; m_owner = '0; m_cl = -1;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] r;
      req_new = N'($urandom); req_all = req_new | N'($urandom);
      for (int i = 0; i < N; i++) begin cl[i] = 3'($urandom % 6); age[i] = 4'($urandom % 4); end
      out_fire = 1'($urandom); out_tail = (($urandom % 4) == 0);
      r = root();
      expect_sel(m_busy ? m_owner : r, m_busy ? '0 : r, "random");
      if (m_cl >= 0) begin
        checks++;
        if (cl_out != 3'(m_cl)) begin failures++; $display("FAIL cl %0d exp %0d", cl_out, m_cl); end
      end
      m_cl = $countones(req_all);
      if (out_fire && out_tail) begin m_busy = 0; m_owner = '0; end
      else if (!m_busy && r != '0) begin m_busy = 1; m_owner = r; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
