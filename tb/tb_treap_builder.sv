// tb_treap_builder: the tree built from contending channels is the treap.
//
// First the sample data of five channels (keys 5,1,3,10,8 with priorities
// 0,2,4,7,9), which must give exactly the tree of the worked example:
// root key 8; its left child key 3, with children key 1 (left) and key 5
// (right); its right child key 10. Then random sets, with small value ranges
// so that ties are common. Each is checked against the properties that define
// a treap uniquely:
//   - one root, and it has the highest priority;
//   - every other node has a parent of higher priority;
//   - the parent and child links agree;
//   - an in-order walk from the root visits every valid node exactly once,
//     in increasing key order.
// Ties are broken as documented in the module: keys as {key, index},
// priorities as {priority, key, lowest index first}.
module tb_treap_builder;
  localparam int N = 5;
  localparam int IDX_W = 3;
  logic [N-1:0]            valid, root, has_parent, has_left, has_right;
  logic [N-1:0][3:0]       key, pri;
  logic [N-1:0][IDX_W-1:0] parent, left, right;
  int checks = 0, failures = 0;

  treap_builder #(.N(N), .KEY_W(4), .PRI_W(4)) dut (.*);

  function automatic int kval(int i);
    return int'(key[i]) * 8 + i;
  endfunction

  function automatic int pval(int i);
    return int'(pri[i]) * 1000 + int'(key[i]) * 10 + (N - i);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: valid %b key %h pri %h", what, valid, key, pri);
    end
  endtask

  // in-order walk with an explicit stack; returns 1 when the walk visits
  // every valid node once and in increasing key order
  function automatic logic walk_ok(int r);
    int stack[N];
    int sp, node, visited, last, steps;
    logic ok;
    logic [N-1:0] seen;
    sp = 0; node = r; visited = 0; last = -1; steps = 0; ok = 1'b1; seen = '0;
    while ((node >= 0 || sp > 0) && steps < 4 * N) begin
      steps++;
      if (node >= 0) begin
        if (sp >= N) begin ok = 1'b0; node = -1; sp = 0; end
        else begin
          stack[sp] = node; sp++;
          node = has_left[node] ? int'(left[node]) : -1;
        end
      end else begin
        sp--; node = stack[sp];
        if (!valid[node] || seen[node] || kval(node) <= last) ok = 1'b0;
        seen[node] = 1'b1; last = kval(node); visited++;
        node = has_right[node] ? int'(right[node]) : -1;
      end
    end
    if (visited != $countones(valid) || node >= 0 || sp > 0) ok = 1'b0;
    return ok;
  endfunction

  task automatic check_treap();
    int r, best;
    r = -1; best = -1;
    for (int i = 0; i < N; i++)
      if (valid[i] && (best < 0 || pval(i) > pval(best))) best = i;
    for (int i = 0; i < N; i++) if (root[i]) r = i;
    check("root", (valid == '0) ? (root == '0) : (root == N'(1 << best)));
    for (int i = 0; i < N; i++) begin
      if (!valid[i]) begin
        check("invalid node has no links", !has_left[i] && !has_right[i] && !root[i]);
      end else if (!root[i]) begin
        check("parent", has_parent[i] && int'(parent[i]) < N && valid[parent[i]] &&
              pval(int'(parent[i])) > pval(i));
        check("child link", (has_left[parent[i]]  && left[parent[i]]  == IDX_W'(i)) ||
                            (has_right[parent[i]] && right[parent[i]] == IDX_W'(i)));
      end else begin
        check("root has no parent", !has_parent[i]);
      end
    end
    if (r >= 0) check("in-order walk", walk_ok(r));
  endtask

  initial begin
    // sample data
    valid = '1;
    key   = {4'd8, 4'd10, 4'd3, 4'd1, 4'd5};
    pri   = {4'd9, 4'd7, 4'd4, 4'd2, 4'd0};
    #1;
    check("sample root is key 8", root == 5'b10000);
    check("key 8: left key 3, right key 10",
          has_left[4] && left[4] == 3'd2 && has_right[4] && right[4] == 3'd3);
    check("key 3: left key 1, right key 5",
          has_left[2] && left[2] == 3'd1 && has_right[2] && right[2] == 3'd0);
    check("leaves", !has_left[0] && !has_right[0] && !has_left[1] && !has_right[1] &&
                    !has_left[3] && !has_right[3]);
    check_treap();

    for (int t = 0; t < 3000; t++) begin
      valid = N'($urandom);
      for (int i = 0; i < N; i++) begin
        key[i] = 4'($urandom % ((t % 2 == 0) ? 4 : 16));
        pri[i] = 4'($urandom % ((t % 3 == 0) ? 2 : 16));
      end
      #1;
      check_treap();
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
