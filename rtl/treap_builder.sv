// treap_builder: the treap of the contending input channels, built in one
// cycle.
//
// The CAGIS proposal arranges the channels that contend for an output as a
// treap: a binary tree that is in search-tree order by key (the contention
// level, CL) and in heap order by priority (AGE). The treap of a set of
// distinct keys and priorities is unique. It is the Cartesian tree of the
// set, so it can be computed directly instead of by the insert and rotate
// procedures of the software description. For every node the parent is,
// of the two nearest higher-priority nodes on either side in key order,
// the one with the lower priority. The node becomes that parent's left
// child if its key is smaller, and its right child otherwise. The root is
// the node without a parent, which is the node of highest priority.
//
// Keys and priorities are made distinct by a tie-break that is this design's
// choice: keys are compared as {key, index}, and priorities as
// {priority, key, lowest index first}. Equal AGEs are therefore decided by the
// higher CL, and then by the lower port index.
//
// Purely combinational. Only nodes with valid set take part. For node i,
// left[i]/right[i] give the child index with has_left[i]/has_right[i], and
// parent[i] gives the parent index with has_parent[i]. root is one-hot over
// the nodes, or zero when no node is valid.
module treap_builder #(
  parameter int unsigned N     = 5,
  parameter int unsigned KEY_W = 3,
  parameter int unsigned PRI_W = 4,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]             valid,
  input  logic [N-1:0][KEY_W-1:0]  key,
  input  logic [N-1:0][PRI_W-1:0]  pri,
  output logic [N-1:0]             root,
  output logic [N-1:0]             has_parent,
  output logic [N-1:0][IDX_W-1:0]  parent,
  output logic [N-1:0]             has_left,
  output logic [N-1:0][IDX_W-1:0]  left,
  output logic [N-1:0]             has_right,
  output logic [N-1:0][IDX_W-1:0]  right
);

  // strict orders, total over distinct indices
  function automatic logic key_lt(int unsigned a, int unsigned b);
    return {key[a], IDX_W'(a)} < {key[b], IDX_W'(b)};
  endfunction

  function automatic logic pri_gt(int unsigned a, int unsigned b);
    return {pri[a], key[a], ~IDX_W'(a)} > {pri[b], key[b], ~IDX_W'(b)};
  endfunction

  logic [N-1:0]            has_l, has_r;     // nearest higher-priority neighbours
  logic [N-1:0][IDX_W-1:0] near_l, near_r;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      has_l[i] = 1'b0; near_l[i] = '0;
      has_r[i] = 1'b0; near_r[i] = '0;
      for (int j = 0; j < N; j++) begin
        if (valid[i] && valid[j] && j != i && pri_gt(j, i)) begin
          // left side: the largest key below key i
          if (key_lt(j, i) && (!has_l[i] || key_lt(int'(near_l[i]), j))) begin
            has_l[i] = 1'b1; near_l[i] = IDX_W'(j);
          end
          // right side: the smallest key above key i
          if (key_lt(i, j) && (!has_r[i] || key_lt(j, int'(near_r[i])))) begin
            has_r[i] = 1'b1; near_r[i] = IDX_W'(j);
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      has_parent[i] = has_l[i] || has_r[i];
      if (has_l[i] && has_r[i])
        parent[i] = pri_gt(int'(near_l[i]), int'(near_r[i])) ? near_r[i] : near_l[i];
      else
        parent[i] = has_l[i] ? near_l[i] : near_r[i];
      root[i] = valid[i] && !has_parent[i];
    end
    for (int p = 0; p < N; p++) begin
      has_left[p] = 1'b0; left[p] = '0;
      has_right[p] = 1'b0; right[p] = '0;
      for (int i = 0; i < N; i++) begin
        if (valid[i] && has_parent[i] && parent[i] == IDX_W'(p)) begin
          if (key_lt(i, p)) begin has_left[p] = 1'b1;  left[p]  = IDX_W'(i); end
          else              begin has_right[p] = 1'b1; right[p] = IDX_W'(i); end
        end
      end
    end
  end

endmodule
