// tb_noc_mesh: end-to-end test of the 4x4 CAGIS mesh at its default
// parameters.
//
// Two meshes run side by side, one with XY and one with odd-even output
// selection (the XY one with no parameter overrides at all). Each runs the
// three synthetic traffic patterns in turn (uniform, transpose, hot spot),
// at an injection rate high enough to make channels contend, with random
// back-pressure from the sinks. Every packet is checked on arrival by the
// environment (mesh_env); at the end the testbench checks that every packet
// was delivered and that each mechanism of the switch was exercised: input
// contention decided by the arbiter, wins by inputs with a non-zero AGE,
// heads blocked behind a worm, non-zero contention levels on the links,
// back-pressure at injection and ejection, and odd-even heads that had a
// choice of direction. A single packet on an idle mesh is also timed:
// one cycle per hop plus one per flit of serialization.
module tb_noc_mesh;
  import cagis_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- zero-load latency on an idle default mesh ----
  logic rst0_n;
  flit_t [15:0] z_in, z_out;
  logic [15:0] z_iv, z_ir, z_ov;
  logic [15:0][NPORTS-1:0] z_c, z_b;
  noc_mesh u_idle (
    .clk, .rst_n(rst0_n),
    .core_in_flit(z_in), .core_in_valid(z_iv), .core_in_ready(z_ir),
    .core_out_flit(z_out), .core_out_valid(z_ov), .core_out_ready(16'hFFFF),
    .contest(z_c), .blocked(z_b)
  );

  task automatic single_packet(int sx, int sy, int dx, int dy);
    head_t h;
    int t0, t_head, t_tail, hops, got, waited, stalled;
    int dst = dx + 4*dy, src = sx + 4*sy;
    h = '{src_x: 4'(sx), src_y: 4'(sy), dst_x: 4'(dx), dst_y: 4'(dy), tag: 16'h1234};
    hops = (dx > sx ? dx - sx : sx - dx) + (dy > sy ? dy - sy : sy - dy);
    t0 = -1; t_head = -1; t_tail = -1; got = 0; waited = 0; stalled = 0;
    // Inputs change and are sampled at the falling edge: a flit shown
    // while ready is high is taken at the next rising edge, and an output
    // flit seen valid is consumed at the next rising edge.
    @(negedge clk);
    fork
      begin
        for (int i = 0; i < PKT_FLITS; i++) begin
          z_in[src] = '{kind: (i == 0) ? FLIT_HEAD : (i == PKT_FLITS-1) ? FLIT_TAIL : FLIT_BODY,
                        data: (i == 0) ? DATA_W'(h) : DATA_W'(i)};
          z_iv[src] = 1'b1;
          while (!z_ir[src] && stalled < 100) begin
            @(negedge clk);
            stalled++;
          end
          if (i == 0) t0 = $time / 10;
          @(negedge clk);
        end
        z_iv[src] = 1'b0;
      end
      begin
        // a packet that has not arrived after 100 cycles is counted as lost
        while (got < PKT_FLITS && waited < 100) begin
          @(negedge clk);
          waited++;
          if (z_ov[dst]) begin
            if (got == 0) t_head = $time / 10;
            if (got == PKT_FLITS-1) t_tail = $time / 10;
            got++;
          end
        end
      end
    join
    // One cycle in each switch on the way (hops+1 switches), then one flit
    // per cycle.
    checks++;
    if (t_head - t0 != hops + 1 || t_tail - t_head != PKT_FLITS - 1) begin
      failures++;
      $display("latency (%0d,%0d)->(%0d,%0d): head %0d tail %0d, expected %0d %0d",
               sx, sy, dx, dy, t_head - t0, t_tail - t_head, hops + 1, PKT_FLITS - 1);
    end
  endtask

  // ---- traffic runs ----
  localparam int NRUN = 6;
  logic [NRUN-1:0] rst_n;
  logic [NRUN-1:0] done;
  int     c [NRUN], f [NRUN], ln [NRUN], dl [NRUN];
  longint ls [NRUN];
  int     e_con [NRUN], e_blk [NRUN], e_inj [NRUN], e_snk [NRUN], e_age [NRUN],
          e_cl [NRUN], e_ad [NRUN];

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    mesh_env #(.ROUTING(r < 3 ? ROUTE_XY : ROUTE_OE), .PATTERN(r % 3),
               .RATE(6000), .NPKT(60), .WARMUP(0), .SINK_STALL(1'b1)) u_env (
      .clk, .rst_n(rst_n[r]), .done(done[r]),
      .checks(c[r]), .failures(f[r]), .lat_sum(ls[r]), .lat_n(ln[r]), .delivered(dl[r]),
      .n_contest(e_con[r]), .n_blocked(e_blk[r]), .n_inj_stall(e_inj[r]),
      .n_sink_stall(e_snk[r]), .n_age_win(e_age[r]), .n_cl_nonzero(e_cl[r]),
      .n_adaptive(e_ad[r])
    );
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    z_in = '0; z_iv = '0; rst0_n = 1'b0; rst_n = '0;
    repeat (3) @(posedge clk);
    rst0_n = 1'b1;
    @(posedge clk);
    single_packet(0, 3, 2, 2);
    single_packet(3, 0, 0, 2);
    single_packet(1, 1, 1, 1 + 2);
    single_packet(2, 2, 1, 0);

    rst_n = '1;
    wait (&done);
    repeat (5) @(posedge clk);
    for (int r = 0; r < NRUN; r++) begin
      $display("run %0d (%s, pattern %0d): %0d packets, mean latency %0.1f cycles",
               r, r < 3 ? "XY" : "OE", r % 3, dl[r], ln[r] ? real'(ls[r]) / ln[r] : 0.0);
      checks += c[r];
      failures += f[r];
      checks++;
      if (dl[r] == 0) failures++;
    end
    need("contested grants",    e_con.sum());
    need("age wins",            e_age.sum());
    need("blocked heads",       e_blk.sum());
    need("non-zero link CL",    e_cl.sum());
    need("injection stalls",    e_inj.sum());
    need("sink stalls",         e_snk.sum());
    need("odd-even choices",    e_ad.sum());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two watchdogs: a fixed limit on the whole test, and a deadlock check
  // that fails once the traffic runs have delivered nothing for 5000 cycles.
  int idle_cycles, last_dl;
  initial begin
    idle_cycles = 0; last_dl = 0;
    for (int t = 0; t < 200000 && idle_cycles < 5000; t++) begin
      @(posedge clk);
      if (&rst_n && !(&done)) begin
        if (dl.sum() == last_dl) idle_cycles++;
        else idle_cycles = 0;
        last_dl = dl.sum();
      end
    end
    failures++;
    $display("watchdog: traffic did not drain (done=%b, %0d cycles without a delivery)",
             done, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
