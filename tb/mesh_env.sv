// mesh_env: traffic sources, sinks and checkers around one noc_mesh.
//
// Used by the mesh testbenches. Every tile's core is modelled here: it
// creates packets of PKT flits as a Bernoulli process (probability
// RATE/65536 per cycle) up to NPKT packets, queues them without limit and
// injects them flit by flit whenever the switch accepts. Destinations follow
// the synthetic patterns of the evaluation:
//   PATTERN 0 uniform   - any other tile, equally likely;
//   PATTERN 1 transpose - tile (i,j) sends to (MX-1-j, MY-1-i); tiles that
//                         map to themselves send nothing;
//   PATTERN 2 hot spot  - uniform, plus an extra 10% of packets sent to the
//                         tile (MX-1, MY-1).
// The sinks check that each worm arrives whole at the right tile, with the
// body flits of its own packet in order, and, for XY routing, that packets
// between a pair of tiles arrive in the order sent. Latency runs from the
// creation of the packet to the arrival of its tail flit and is collected
// for packets created after WARMUP cycles. Mechanism counters report how
// often the things the design is built around actually happened.
module mesh_env
  import cagis_pkg::*;
#(
  parameter route_alg_e  ROUTING    = ROUTE_XY,
  parameter int unsigned PATTERN    = 0,
  parameter int unsigned RATE       = 2000,   // per 65536 per cycle per tile
  parameter int unsigned NPKT       = 20,     // packets created per tile
  parameter int unsigned PKT        = PKT_FLITS,
  parameter int unsigned WARMUP     = 0,
  parameter bit          SINK_STALL = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    done,
  output int      checks,
  output int      failures,
  output longint  lat_sum,
  output int      lat_n,
  output int      delivered,
  output int      n_contest,
  output int      n_blocked,
  output int      n_inj_stall,
  output int      n_sink_stall,
  output int      n_age_win,
  output int      n_cl_nonzero,
  output int      n_adaptive
);

  localparam int unsigned MX = 4, MY = 4, NODES = MX*MY;

  flit_t [NODES-1:0]             in_flit, out_flit;
  logic  [NODES-1:0]             in_valid, in_ready, out_valid, out_ready;
  logic  [NODES-1:0][NPORTS-1:0] contest, blocked;

  if (ROUTING == ROUTE_XY) begin : g_dut
    noc_mesh u_dut (
      .clk, .rst_n,
      .core_in_flit (in_flit),  .core_in_valid (in_valid), .core_in_ready (in_ready),
      .core_out_flit(out_flit), .core_out_valid(out_valid), .core_out_ready(out_ready),
      .contest, .blocked
    );
  end else begin : g_dut
    noc_mesh #(.ROUTING(ROUTING)) u_dut (
      .clk, .rst_n,
      .core_in_flit (in_flit),  .core_in_valid (in_valid), .core_in_ready (in_ready),
      .core_out_flit(out_flit), .core_out_valid(out_valid), .core_out_ready(out_ready),
      .contest, .blocked
    );
  end

  // ---------------- sources ----------------
  int          q_dst [NODES][$];
  int          q_seq [NODES][$];
  int          created [NODES];
  int          fidx [NODES];
  int          sent_pkts;
  longint      gen_time [NODES*4096];
  longint      cyc;

  function automatic int pick_dst(int src);
    int d;
    int sx = src % MX, sy = src / MX;
    if (PATTERN == 1) return (MX-1-sy) + MX*(MY-1-sx);
    if (PATTERN == 2 && ($urandom % 100) < 10) return NODES-1;
    do d = $urandom % NODES; while (d == src);
    return d;
  endfunction

  function automatic flit_t make_flit(int src, int dst, int seq, int idx);
    flit_t f;
    head_t h;
    logic [15:0] tag = {seq[11:0], src[3:0]};
    if (idx == 0) begin
      h.src_x = COORD_W'(src % MX); h.src_y = COORD_W'(src / MX);
      h.dst_x = COORD_W'(dst % MX); h.dst_y = COORD_W'(dst / MX);
      h.tag   = tag;
      f.data  = h;
      f.kind  = (PKT == 1) ? FLIT_SOLO : FLIT_HEAD;
    end else begin
      f.data = {tag, 8'(idx), 8'(dst)};
      f.kind = (idx == PKT-1) ? FLIT_TAIL : FLIT_BODY;
    end
    return f;
  endfunction


  // ---------------- sinks ----------------
  int     cur_tag [NODES];
  int     cur_idx [NODES];
  int     cur_src [NODES];
  logic   in_worm [NODES];
  int     last_seq [NODES][NODES];
  int     exp_pkts;

  always_ff @(posedge clk) begin
    for (int n = 0; n < NODES; n++)
      out_ready[n] <= SINK_STALL ? (($urandom % 4) != 0) : 1'b1;
  end

  initial begin
    in_valid = '0; in_flit = '0;
    cyc = 0; sent_pkts = 0; delivered = 0; checks = 0; failures = 0;
    lat_sum = 0; lat_n = 0; exp_pkts = 0;
    n_contest = 0; n_blocked = 0; n_inj_stall = 0; n_sink_stall = 0;
    n_age_win = 0; n_cl_nonzero = 0; n_adaptive = 0;
    for (int n = 0; n < NODES; n++) begin
      created[n] = 0; fidx[n] = 0; in_worm[n] = 0;
      cur_tag[n] = 0; cur_idx[n] = 0; cur_src[n] = 0;
      for (int m = 0; m < NODES; m++) last_seq[n][m] = -1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int n = 0; n < NODES; n++) begin
        // create
        if (created[n] < NPKT && ($urandom % 65536) < RATE) begin
          int d;
          d = pick_dst(n);
          if (d != n) begin
            q_dst[n].push_back(d);
            q_seq[n].push_back(created[n]);
            gen_time[n*4096 + (created[n] % 4096)] = cyc;
            exp_pkts++;
          end
          created[n]++;
        end
        // inject
        if (in_valid[n] && !in_ready[n]) n_inj_stall++;
        if (in_valid[n] && in_ready[n]) begin
          if (fidx[n] == PKT-1) begin
            fidx[n] = 0;
            void'(q_dst[n].pop_front());
            void'(q_seq[n].pop_front());
            sent_pkts++;
          end else fidx[n]++;
        end
        // present the next flit of the queue for the coming cycle
        in_valid[n] <= (q_dst[n].size() != 0);
        in_flit[n]  <= (q_dst[n].size() != 0) ?
                       make_flit(n, q_dst[n][0], q_seq[n][0], fidx[n]) : '0;
        // deliver
        if (out_valid[n] && !out_ready[n]) n_sink_stall++;
        if (out_valid[n] && out_ready[n]) begin
          flit_t f;
          f = out_flit[n];
          if (!in_worm[n]) begin
            head_t h;
            h = head_t'(f.data);
            if (!is_head(f)) begin
              failures++; $display("node %0d: flit without head", n);
            end
            if (int'(h.dst_x) + MX*int'(h.dst_y) != n) begin
              failures++; $display("node %0d: head for (%0d,%0d)", n, h.dst_x, h.dst_y);
            end
            cur_tag[n] = int'(h.tag);
            cur_src[n] = int'(h.src_x) + MX*int'(h.src_y);
            cur_idx[n] = 1;
            in_worm[n] = !is_tail(f);
          end else begin
            if (f.kind != ((cur_idx[n] == PKT-1) ? FLIT_TAIL : FLIT_BODY) ||
                f.data != {16'(cur_tag[n]), 8'(cur_idx[n]), 8'(n)}) begin
              failures++;
              $display("node %0d: bad body flit %h (tag %h idx %0d)", n, f, cur_tag[n], cur_idx[n]);
            end
            cur_idx[n]++;
            if (is_tail(f)) in_worm[n] = 1'b0;
          end
          if (is_tail(f)) begin
            int s, q;
            s = cur_src[n];
            q = cur_tag[n] >> 4;
            checks++;
            delivered++;
            if ((cur_tag[n] & 15) != s) begin
              failures++; $display("node %0d: tag/source mismatch", n);
            end
            if (ROUTING == ROUTE_XY && last_seq[s][n] >= 0 &&
                ((q - last_seq[s][n]) & 4095) == 0) begin
              failures++; $display("node %0d: packet %0d from %0d repeated", n, q, s);
            end
            if (ROUTING == ROUTE_XY && last_seq[s][n] >= 0 &&
                ((q - last_seq[s][n]) & 4095) > 2048) begin
              failures++; $display("node %0d: packet %0d from %0d out of order", n, q, s);
            end
            last_seq[s][n] = q;
            if (gen_time[s*4096 + q] >= WARMUP) begin
              lat_sum += cyc - gen_time[s*4096 + q] + 1;
              lat_n++;
            end
          end
        end
      end
      for (int n = 0; n < NODES; n++)
        for (int p = 0; p < NPORTS; p++) begin
          n_contest += int'(contest[n][p]);
          n_blocked += int'(blocked[n][p]);
        end
    end
  end

  // Inside the switches: wins by an input that had lost before, non-zero
  // contention levels on the links, and heads that had two legal
  // directions under odd-even routing.
  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      for (genvar p = 0; p < NPORTS; p++) begin : g_mp
        always_ff @(posedge clk) begin
          if (rst_n) begin
            if (g_dut.u_dut.g_y[y].g_x[x].u_sw.g_in[p].u_in.win &&
                g_dut.u_dut.g_y[y].g_x[x].u_sw.g_in[p].u_in.age != 0) n_age_win++;
            if (p != 0 && g_dut.u_dut.g_y[y].g_x[x].u_sw.out_cl[p] != 0) n_cl_nonzero++;
          end
        end
        if (ROUTING == ROUTE_OE) begin : g_oe
          always_ff @(posedge clk) begin
            if (rst_n && g_dut.u_dut.g_y[y].g_x[x].u_sw.g_in[p].u_in.win &&
                $countones(g_dut.u_dut.g_y[y].g_x[x].u_sw.g_in[p].u_in.g_oe.u_os.allowed) > 1)
              n_adaptive++;
          end
        end
      end
    end
  end

  assign done = rst_n && (created.sum() == NODES*NPKT) && (delivered == exp_pkts) &&
                (sent_pkts == exp_pkts);

endmodule
