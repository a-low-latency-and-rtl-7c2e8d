// tb_hsmbft_noc -- end-to-end test of the 64-node H-SMBFT network at its
// default sizes (16-flit buffers, 8 VCs, 32-bit flits).
//
// Every node has a packet source and a sink. A source keeps one credit
// counter per injection VC, interleaves up to two packets on different VCs
// and stamps the current cycle into the head flit; body flits carry
// {packet id, sequence}. A sink has BUF_DEPTH slots per VC, drains them and
// returns credits; it checks that each packet reaches the right node
// complete and in order, and computes the latency as arrival cycle minus
// the stamped generation time.
//
// Phases:
//   1. zero load: single packets from node 0 crossing 1, 2, 3 and 4 routers
//      (nodes 1, 5, 17, 21) must arrive after exactly 5 cycles per router;
//   2. the five synthetic patterns (uniform random, hotspot, transpose,
//      shuffle, neighbour on an 8x8 arrangement of the nodes), all nodes
//      injecting at once, 150-flit packets mixed with short ones;
//   3. a random phase with slow sinks to force back-pressure.
// Mechanisms counted, each must occur: paths over 1/2/3/4 routers, sibling
// and parent links, switch conflicts, VC-allocation waits, credit stalls,
// 150-flit packets. Average latency per pattern is printed.
module tb_hsmbft_noc;
  import hsmbft_pkg::*;

  localparam int N         = NUM_NODES;
  localparam int V         = NUM_VC;
  localparam int BUF_DEPTH = 16;
  localparam int MAXPKT    = 16384;
  localparam int LONG_PKT  = 150;

  logic clk = 1'b0;
  logic rst = 1'b1;
  flit_t   node_in_flit    [N];
  credit_t node_in_credit  [N];
  flit_t   node_out_flit   [N];
  credit_t node_out_credit [N];

  hsmbft_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // ---------------------------------------------------------- scoreboard
  int pk_src  [MAXPKT];
  int pk_dest [MAXPKT];
  int pk_len  [MAXPKT];
  bit pk_done [MAXPKT];
  int pk_sent [MAXPKT];
  int pk_lat  [MAXPKT];
  int n_pkts = 0, n_done = 0;
  int path_hist [5];
  int long_pkts = 0;

  typedef struct { int id; } pkt_req_t;
  pkt_req_t src_q [N][$];

  // routers crossed between two nodes in this topology
  function automatic int routers_between(int s, int d);
    int rs, rd;
    rs = s / 4; rd = d / 4;
    if (rs == rd) return 1;
    if (rs / 4 == rd / 4) return 2;
    if (rs % 4 == rd % 4) return 3;
    return 4;
  endfunction

  function automatic void add_packet(int s, int d, int len);
    pkt_req_t r;
    r.id = n_pkts;
    pk_src[n_pkts] = s; pk_dest[n_pkts] = d; pk_len[n_pkts] = len; pk_done[n_pkts] = 0;
    n_pkts++;
    src_q[s].push_back(r);
  endfunction

  // ------------------------------------------------------------- sources
  int  src_cred  [N][V];
  bit  slot_busy [N][2];
  int  slot_id   [N][2];
  int  slot_seq  [N][2];
  int  slot_vc   [N][2];
  bit  vc_used   [N][V];
  int  next_vc   [N];
  int  rr_slot   [N];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int n = 0; n < N; n++) begin
      flit_t f;
      int s;
      f = '0;
      if (rst) begin
        for (int v = 0; v < V; v++) begin src_cred[n][v] = BUF_DEPTH; vc_used[n][v] = 0; end
        slot_busy[n][0] = 0; slot_busy[n][1] = 0; next_vc[n] = 0; rr_slot[n] = 0;
      end else begin
        if (node_in_credit[n].valid) src_cred[n][node_in_credit[n].vc]++;
        for (int k = 0; k < 2; k++) begin
          if (!slot_busy[n][k] && src_q[n].size() > 0) begin
            int vsel;
            vsel = -1;
            for (int t = 0; t < V; t++)
              if (vsel < 0 && !vc_used[n][(next_vc[n] + t) % V]) vsel = (next_vc[n] + t) % V;
            if (vsel >= 0) begin
              pkt_req_t r;
              r = src_q[n].pop_front();
              slot_busy[n][k] = 1; slot_id[n][k] = r.id; slot_seq[n][k] = 0; slot_vc[n][k] = vsel;
              vc_used[n][vsel] = 1; next_vc[n] = (vsel + 1) % V;
            end
          end
        end
        for (int t = 0; t < 2; t++) begin
          s = (rr_slot[n] + t) % 2;
          if (!f.valid && slot_busy[n][s] && src_cred[n][slot_vc[n][s]] > 0) begin
            int id, sq, len;
            id = slot_id[n][s]; sq = slot_seq[n][s]; len = pk_len[id];
            f.valid = 1'b1;
            f.vc    = VC_W'(slot_vc[n][s]);
            if (sq == 0)            f.ftype = FLIT_HEAD;
            else if (sq == len - 1) f.ftype = FLIT_TAIL;
            else                    f.ftype = FLIT_BODY;
            if (sq == 0) begin
              head_t h;
              h.dest = NODE_W'(pk_dest[id]); h.src = NODE_W'(n); h.gen_time = TIME_W'(cyc);
              f.data = FLIT_W'(h);
              pk_sent[id] = cyc;
            end else begin
              f.data = {16'(id), 16'(sq)};
            end
            src_cred[n][slot_vc[n][s]]--;
            slot_seq[n][s]++;
            if (slot_seq[n][s] == len) begin
              slot_busy[n][s] = 0; vc_used[n][slot_vc[n][s]] = 0;
            end
            rr_slot[n] = (s + 1) % 2;
          end
        end
      end
      node_in_flit[n] <= f;
    end
  end

  // --------------------------------------------------------------- sinks
  int  snk_cnt  [N][V];
  int  snk_state[N][V];   // 0 idle, 1 head seen, 2 in body
  int  snk_src  [N][V];
  int  snk_time [N][V];
  int  snk_hcyc [N][V];
  int  snk_id   [N][V];
  int  snk_seq  [N][V];
  int  drain_pct = 100;

  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      credit_t c;
      c = '0;
      if (rst) begin
        for (int v = 0; v < V; v++) begin snk_cnt[n][v] = 0; snk_state[n][v] = 0; end
      end else begin
        flit_t f;
        f = node_out_flit[n];
        if (f.valid) begin
          int v;
          v = int'(f.vc);
          snk_cnt[n][v]++;
          checks++;
          if (snk_cnt[n][v] > BUF_DEPTH) begin failures++; $display("node %0d vc %0d overflow", n, v); end
          if (is_head(f.ftype)) begin
            head_t h;
            h = head_t'(f.data);
            checks++;
            if (snk_state[n][v] != 0 || int'(h.dest) != n || f.ftype != FLIT_HEAD) begin
              failures++;
              $display("bad head at node %0d vc %0d dest %0d", n, v, h.dest);
            end
            snk_state[n][v] = 1; snk_src[n][v] = int'(h.src); snk_time[n][v] = int'(h.gen_time);
            snk_hcyc[n][v] = cyc - 1;   // cycle the head was on the link
          end else if (snk_state[n][v] == 1) begin
            int id;
            id = int'(f.data[31:16]);
            checks++;
            if (id >= n_pkts || pk_done[id] || pk_dest[id] != n || pk_src[id] != snk_src[n][v]
                || int'(f.data[15:0]) != 1 || TIME_W'(pk_sent[id]) != TIME_W'(snk_time[n][v])) begin
              failures++;
              $display("bad first body at node %0d vc %0d: %h", n, v, f.data);
              snk_state[n][v] = 0;
            end else begin
              snk_id[n][v] = id; snk_seq[n][v] = 2; snk_state[n][v] = 2;
              // latency as the receiving node sees it: now minus stamped time
              pk_lat[id] = int'(TIME_W'(snk_hcyc[n][v]) - TIME_W'(snk_time[n][v]));
              if (f.ftype == FLIT_TAIL) begin
                checks++;
                if (pk_len[id] != 2) begin failures++; $display("short packet %0d", id); end
                pk_done[id] = 1; n_done++; snk_state[n][v] = 0;
                path_hist[routers_between(pk_src[id], n)]++;
              end
            end
          end else begin
            checks++;
            if (snk_state[n][v] != 2 || f.data != {16'(snk_id[n][v]), 16'(snk_seq[n][v])}) begin
              failures++;
              $display("bad body at node %0d vc %0d: %h", n, v, f.data);
              snk_state[n][v] = 0;
            end else begin
              snk_seq[n][v]++;
              if (f.ftype == FLIT_TAIL) begin
                int id;
                id = snk_id[n][v];
                checks++;
                if (snk_seq[n][v] != pk_len[id]) begin failures++; $display("length mismatch %0d", id); end
                pk_done[id] = 1; n_done++; snk_state[n][v] = 0;
                path_hist[routers_between(pk_src[id], n)]++;
                if (pk_len[id] == LONG_PKT) long_pkts++;
              end
            end
          end
        end
        if (($urandom % 100) < drain_pct) begin
          int st;
          st = $urandom % V;
          for (int t = 0; t < V; t++) begin
            int v;
            v = (st + t) % V;
            if (!c.valid && snk_cnt[n][v] > 0) begin
              snk_cnt[n][v]--; c.valid = 1'b1; c.vc = VC_W'(v);
            end
          end
        end
      end
      node_out_credit[n] <= c;
    end
  end

  // ------------------------------------------------------------ coverage
  int sw_conflicts = 0, va_waits = 0, credit_stalls = 0;
  int sibling_flits = 0, parent_flits = 0, l2_flits = 0;

  for (genvar i = 0; i < NUM_L1; i++) begin : g_cov_l1
    always @(posedge clk) if (!rst) begin
      for (int o = 0; o < L1_PORTS; o++)
        if ($countones(dut.g_l1[i].u_router.sa2_req[o]) > 1) sw_conflicts++;
      for (int p = 0; p < L1_PORTS; p++)
        for (int v = 0; v < V; v++) begin
          if (dut.g_l1[i].u_router.vc_state[p][v] == 2'd1
              && !dut.g_l1[i].u_router.va_grant[dut.g_l1[i].u_router.vc_port[p][v]][p*V+v]) va_waits++;
          if (dut.g_l1[i].u_router.vc_state[p][v] == 2'd2 && !dut.g_l1[i].u_router.fifo_empty[p][v]
              && dut.g_l1[i].u_router.credits[dut.g_l1[i].u_router.vc_port[p][v]][dut.g_l1[i].u_router.vc_ovc[p][v]] == 0)
            credit_stalls++;
        end
      for (int o = L1_PORT_RIGHT; o <= L1_PORT_LEFT; o++)
        if (dut.g_l1[i].u_router.out_flit[o].valid) sibling_flits++;
      if (dut.g_l1[i].u_router.out_flit[L1_PORT_PARENT].valid) parent_flits++;
    end
  end
  for (genvar j = 0; j < NUM_L2; j++) begin : g_cov_l2
    always @(posedge clk) if (!rst) begin
      for (int o = 0; o < L2_PORTS; o++) begin
        if ($countones(dut.g_l2[j].u_router.sa2_req[o]) > 1) sw_conflicts++;
        if (dut.g_l2[j].u_router.out_flit[o].valid) l2_flits++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d packets delivered", n_done, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_all(int limit);
    int t;
    t = 0;
    while (n_done < n_pkts && t < limit) begin @(posedge clk); t++; end
    checks++;
    if (n_done != n_pkts) begin failures++; $display("only %0d of %0d packets delivered", n_done, n_pkts); end
  endtask

  function automatic int pattern_dest(int pat, int s);
    int x, y;
    x = s % 8; y = s / 8;
    case (pat)
      0: begin int d; do d = $urandom % N; while (d == s); return d; end           // uniform random
      1: begin                                                                     // hotspot
           int d;
           if ($urandom % 100 < 20) begin d = (($urandom % 4) * 16) + 5; if (d != s) return d; end
           do d = $urandom % N; while (d == s);
           return d;
         end
      2: return x * 8 + y;                                                         // transpose
      3: return ((s << 1) | (s >> 5)) & 63;                                        // shuffle
      default: return ((x + 1) % 8) + y * 8;                                       // neighbour
    endcase
  endfunction

  initial begin
    string names [5] = '{"random", "hotspot", "transpose", "shuffle", "neighbor"};
    int hop_dst [4] = '{1, 5, 17, 21};
    for (int k = 0; k < 5; k++) path_hist[k] = 0;
    for (int n = 0; n < N; n++) node_in_flit[n] = '0;
    for (int n = 0; n < N; n++) node_out_credit[n] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // 1. zero-load latency: 5 cycles per router crossed
    for (int k = 0; k < 4; k++) begin
      int id;
      id = n_pkts;
      add_packet(0, hop_dst[k], 4);
      wait_all(500);
      checks++;
      if (pk_lat[id] != 5 * (k + 1)) begin
        failures++;
        $display("node 0 -> node %0d: latency %0d, expected %0d", hop_dst[k], pk_lat[id], 5 * (k + 1));
      end else
        $display("node 0 -> node %0d: %0d routers, latency %0d cycles", hop_dst[k], k + 1, pk_lat[id]);
    end

    // 2. synthetic patterns, all nodes at once
    for (int pat = 0; pat < 5; pat++) begin
      int first, cnt;
      longint sum;
      first = n_pkts;
      for (int rep = 0; rep < 3; rep++)
        for (int s = 0; s < N; s++) begin
          int d, len;
          d = pattern_dest(pat, s);
          if (d == s) continue;
          len = (rep == 0) ? LONG_PKT : 2 + $urandom % 16;
          add_packet(s, d, len);
        end
      wait_all(60000);
      sum = 0; cnt = 0;
      for (int id = first; id < n_pkts; id++) if (pk_done[id]) begin sum += pk_lat[id]; cnt++; end
      $display("%-9s: %0d packets, average head latency %0d cycles", names[pat], cnt, cnt ? sum / cnt : 0);
    end

    // 3. slow sinks: back-pressure through the whole network
    drain_pct = 30;
    for (int k = 0; k < 600; k++) add_packet($urandom % N, $urandom % N, 2 + $urandom % 30);
    wait_all(100000);

    $display("paths over 1/2/3/4 routers: %0d %0d %0d %0d", path_hist[1], path_hist[2], path_hist[3], path_hist[4]);
    $display("flits on sibling links %0d, up links %0d, down links %0d", sibling_flits, parent_flits, l2_flits);
    $display("switch conflicts %0d, VC-allocation waits %0d, credit stalls %0d, 150-flit packets %0d",
             sw_conflicts, va_waits, credit_stalls, long_pkts);
    for (int k = 1; k <= 4; k++) begin
      checks++;
      if (path_hist[k] == 0) begin failures++; $display("no path over %0d routers", k); end
    end
    checks += 7;
    if (sibling_flits == 0) begin failures++; $display("sibling links unused"); end
    if (parent_flits == 0)  begin failures++; $display("up links unused"); end
    if (l2_flits == 0)      begin failures++; $display("level-2 routers unused"); end
    if (sw_conflicts == 0)  begin failures++; $display("no switch conflict"); end
    if (va_waits == 0)      begin failures++; $display("no VC-allocation wait"); end
    if (credit_stalls == 0) begin failures++; $display("no credit stall"); end
    if (long_pkts == 0)     begin failures++; $display("no 150-flit packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
