// tb_cagis_switch: one CAGIS switch at tile (1,1) with XY routing.
//
// Scenario 1, starvation: the west input (CL 5 from upstream) and the core
// input (whose CL counts as zero, whatever its wire carries) both stream
// packets east. With contention level alone the core would wait as long as
// the west input keeps sending; with AGE the loser of each competition wins
// the next, so the packets on the east output must alternate
// west, core, west, core... starting with west (higher CL at equal AGE).
// Scenario 2: west (CL 4), east (CL 2) and south (CL 1) stream north; the
// order must be west, east, south, repeated, as the ages rise and clear.
// Throughout, sinks apply random back-pressure and every worm is checked to
// arrive whole and unmixed. Also checked: the contention level the east
// output reports while two inputs want it, and the one-cycle pass through
// an idle switch.
module tb_cagis_switch;
  import cagis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready, contest, blocked;
  logic  [NPORTS-1:0][CL_W-1:0] in_cl, out_cl;
  int checks = 0, failures = 0, n_contest = 0, n_blocked = 0, cl2_seen = 0;

  cagis_switch dut (
    .clk, .rst_n, .cur_x(4'd1), .cur_y(4'd1), .in_flit, .in_valid, .in_ready, .in_cl,
    .out_flit, .out_valid, .out_ready, .out_cl, .contest, .blocked
  );

  flit_t q [NPORTS][$];
  int    seen_src [NPORTS][$];   // source port of each packet per output
  int    cur_src [NPORTS], cur_idx [NPORTS];

  function automatic void add_packets(int p, int n, int dx, int dy);
    head_t h;
    for (int k = 0; k < n; k++)
      for (int i = 0; i < PKT_FLITS; i++) begin
        h = '{src_x: 4'd0, src_y: 4'd0, dst_x: 4'(dx), dst_y: 4'(dy), tag: 16'(p * 256 + k)};
        if (i == 0) q[p].push_back('{kind: FLIT_HEAD, data: h});
        else q[p].push_back('{kind: (i == PKT_FLITS-1) ? FLIT_TAIL : FLIT_BODY,
                              data: {16'(p * 256 + k), 16'(i)}});
      end
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // observe the handshakes at the rising edge, drive at the falling edge
  int cyc = 0, t_acc = -1, t_out = -1;
  always @(posedge clk) if (rst_n) begin
    head_t h;
    cyc++;
    if (t_acc < 0 && in_valid[PORT_LOCAL] && in_ready[PORT_LOCAL]) t_acc = cyc;
    if (t_out < 0 && out_valid[PORT_SOUTH]) t_out = cyc;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) void'(q[p].pop_front());
      if (out_valid[p] && out_ready[p]) begin
        if (is_head(out_flit[p])) begin
          h = head_t'(out_flit[p].data);
          cur_src[p] = int'(h.tag) / 256;
          cur_idx[p] = int'(h.tag) % 256;
          seen_src[p].push_back(cur_src[p]);
        end else begin
          chk(out_flit[p].data[31:16] == 16'(cur_src[p] * 256 + cur_idx[p]), "worm intact");
        end
      end
      if (contest[p]) n_contest++;
      if (blocked[p]) n_blocked++;
    end
    if (out_cl[PORT_EAST] == 3'd2) cl2_seen++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p]  = (q[p].size() != 0);
      in_flit[p]   = in_valid[p] ? q[p][0] : '0;
      out_ready[p] = ($urandom % 4) != 0;
    end
  end

  initial begin
    in_flit = '0; in_valid = '0; in_cl = '0; out_ready = '1;
    for (int p = 0; p < NPORTS; p++) begin cur_src[p] = 0; cur_idx[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // one-cycle pass: a head shown before edge t leaves in the cycle after t
    @(negedge clk);
    add_packets(PORT_LOCAL, 1, 1, 0);
    wait (q[PORT_LOCAL].size() == 0);
    chk(t_out == t_acc + 1, "one cycle through the switch");
    repeat (10) @(negedge clk);
    seen_src[PORT_SOUTH].delete();

    // scenario 1
    in_cl[PORT_WEST] = 3'd5; in_cl[PORT_LOCAL] = 3'd7;
    repeat (2) @(negedge clk);
    add_packets(PORT_WEST, 8, 3, 1);
    add_packets(PORT_LOCAL, 8, 3, 1);
    wait (q[PORT_WEST].size() == 0 && q[PORT_LOCAL].size() == 0);
    repeat (20) @(negedge clk);
    chk(seen_src[PORT_EAST].size() == 16, "scenario 1 count");
    for (int k = 0; k < seen_src[PORT_EAST].size(); k++)
      chk(seen_src[PORT_EAST][k] == ((k % 2 == 0) ? PORT_WEST : PORT_LOCAL), "alternation");
    $display("east output order: %p", seen_src[PORT_EAST]);
    chk(cl2_seen > 0, "east CL of two requests");

    // scenario 2
    in_cl[PORT_WEST] = 3'd4; in_cl[PORT_EAST] = 3'd2; in_cl[PORT_SOUTH] = 3'd1;
    repeat (2) @(negedge clk);
    add_packets(PORT_WEST, 6, 1, 3);
    add_packets(PORT_EAST, 6, 1, 3);
    add_packets(PORT_SOUTH, 6, 1, 3);
    wait (q[PORT_WEST].size() == 0 && q[PORT_EAST].size() == 0 && q[PORT_SOUTH].size() == 0);
    repeat (20) @(negedge clk);
    chk(seen_src[PORT_NORTH].size() == 18, "scenario 2 count");
    for (int k = 0; k < seen_src[PORT_NORTH].size(); k++)
      chk(seen_src[PORT_NORTH][k] == ((k % 3 == 0) ? PORT_WEST : (k % 3 == 1) ? PORT_EAST : PORT_SOUTH),
          "rotation");
    $display("north output order: %p", seen_src[PORT_NORTH]);
    chk(n_contest > 0 && n_blocked > 0, "contests and blocked heads");
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
