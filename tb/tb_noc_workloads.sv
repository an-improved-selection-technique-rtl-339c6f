// tb_noc_workloads: the evaluation workloads on the default 4x4 mesh.
//
// Uniform, transpose and hot-spot traffic, each with XY and with odd-even
// output selection (six meshes side by side). As in the evaluation,
// packets are five flits long, input buffers hold five flits, at least
// 50,000 packets are sent per run and latencies of packets created in the
// first 5,000 cycles are not counted. The injection rate, 0.02 packets per
// cycle per tile (0.1 flit per cycle per tile), is this testbench's choice.
// Every packet is checked on arrival (see mesh_env); the run must drain and
// deliver every packet, and the mean latency of each run is printed.
module tb_noc_workloads;
  import cagis_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  localparam int NRUN = 6;
  localparam int RATE = 1311;            // 0.02 * 65536
  // per-tile packet counts giving at least 50,000 packets per run
  // (transpose: 12 of the 16 tiles send; hot spot: the hot tile's own
  // share is dropped)
  localparam int NPKT_UNI = 3125, NPKT_TR = 4167, NPKT_HOT = 3400;

  logic [NRUN-1:0] done;
  int     c [NRUN], f [NRUN], ln [NRUN], dl [NRUN];
  longint ls [NRUN];
  int     e_con [NRUN], e_blk [NRUN], e_inj [NRUN], e_snk [NRUN], e_age [NRUN],
          e_cl [NRUN], e_ad [NRUN];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    localparam int PAT = r % 3;
    mesh_env #(.ROUTING(r < 3 ? ROUTE_XY : ROUTE_OE), .PATTERN(PAT), .RATE(RATE),
               .NPKT(PAT == 0 ? NPKT_UNI : PAT == 1 ? NPKT_TR : NPKT_HOT),
               .WARMUP(5000), .SINK_STALL(1'b0)) u_env (
      .clk, .rst_n, .done(done[r]),
      .checks(c[r]), .failures(f[r]), .lat_sum(ls[r]), .lat_n(ln[r]), .delivered(dl[r]),
      .n_contest(e_con[r]), .n_blocked(e_blk[r]), .n_inj_stall(e_inj[r]),
      .n_sink_stall(e_snk[r]), .n_age_win(e_age[r]), .n_cl_nonzero(e_cl[r]),
      .n_adaptive(e_ad[r])
    );
  end

  initial begin
    string pat [3] = '{"uniform", "transpose", "hot spot"};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    repeat (5) @(posedge clk);
    for (int r = 0; r < NRUN; r++) begin
      $display("%s + CAGIS, %-9s: %0d packets, mean latency %0.2f cycles over %0d, %0d contests, %0d age wins",
               r < 3 ? "XY" : "OE", pat[r % 3], dl[r], real'(ls[r]) / ln[r], ln[r],
               e_con[r], e_age[r]);
      checks += c[r];
      failures += f[r];
      checks++;
      if (dl[r] < 50000 || ln[r] == 0) begin
        failures++;
        $display("run %0d delivered only %0d packets", r, dl[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: runs did not drain (done=%b)", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
