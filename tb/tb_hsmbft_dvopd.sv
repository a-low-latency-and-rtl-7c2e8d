// tb_hsmbft_dvopd -- runs the dual video object plane decoder (DVOPD)
// workload on the 64-node network at its default sizes.
//
// The 32 cores of the two decoder streams sit on nodes 0-31 in the
// placement below (four cores per level-1 router R0-R7). Every edge of the
// DVOPD core graph becomes a stream of 16-flit packets from its source core
// to its destination core; the number of packets is the edge's bandwidth in
// MB/s divided by 16, rounded up, so heavy edges carry proportionally more
// traffic. All streams start together. The same node sources and sinks as
// in tb_hsmbft_noc check every packet (destination, source, order, length,
// time stamp); the test requires that every packet arrives and prints the
// average head latency. Edges that carry two figures ("313/94") are taken
// as 313 one way and 94 the other.
module tb_hsmbft_dvopd;
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

  // core (1..32) -> node, router by router: R0 {31,1,2,3}, R1 {4,7,6,5},
  // R2 {8,9,10,12}, R3 {15,11,14,13}, R4 {16,17,18,19}, R5 {30,20,21,22},
  // R6 {23,24,26,27}, R7 {28,29,25,32}
  int placement [32] = '{31, 1, 2, 3,   4, 7, 6, 5,   8, 9, 10, 12,  15, 11, 14, 13,
                         16, 17, 18, 19, 30, 20, 21, 22, 23, 24, 26, 27, 28, 29, 25, 32};

  function automatic int node_of(int core);
    for (int n = 0; n < 32; n++) if (placement[n] == core) return n;
    return -1;
  endfunction

  // {source core, destination core, MB/s}
  int edges [][3] = '{
    '{1, 2, 70},   '{2, 3, 362},  '{3, 4, 362},  '{4, 5, 362},  '{4, 15, 49},  '{15, 5, 27},
    '{5, 6, 357},  '{6, 7, 353},  '{7, 8, 300},  '{8, 9, 313},  '{8, 10, 500}, '{10, 9, 313},
    '{9, 10, 94},  '{11, 9, 16},  '{11, 12, 16}, '{11, 6, 16},  '{12, 13, 157},'{13, 14, 16},
    '{14, 11, 16}, '{14, 12, 16}, '{1, 31, 500}, '{11, 32, 540},
    '{16, 17, 70}, '{17, 18, 362},'{18, 19, 362},'{19, 20, 362},'{19, 30, 49}, '{30, 20, 27},
    '{20, 21, 357},'{21, 22, 353},'{22, 23, 300},'{23, 24, 313},'{23, 25, 500},'{25, 24, 313},
    '{24, 25, 94}, '{26, 24, 16}, '{26, 27, 16}, '{26, 21, 16}, '{27, 28, 157},'{28, 29, 16},
    '{29, 26, 16}, '{29, 27, 16}, '{32, 26, 540}};

  initial begin
    longint sum;
    for (int k = 0; k < 5; k++) path_hist[k] = 0;
    for (int n = 0; n < N; n++) node_in_flit[n] = '0;
    for (int n = 0; n < N; n++) node_out_credit[n] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    foreach (edges[e]) begin
      int s, d;
      s = node_of(edges[e][0]);
      d = node_of(edges[e][1]);
      checks++;
      if (s < 0 || d < 0) begin failures++; $display("edge %0d: core not placed", e); end
      else for (int k = 0; k < (edges[e][2] + 15) / 16; k++) add_packet(s, d, 16);
    end
    wait_all(200000);
    sum = 0;
    for (int id = 0; id < n_pkts; id++) sum += pk_lat[id];
    $display("DVOPD: %0d packets of 16 flits, average head latency %0d cycles, finished at cycle %0d",
             n_done, n_done ? sum / n_done : 0, cyc);
    $display("paths over 1/2/3/4 routers: %0d %0d %0d %0d", path_hist[1], path_hist[2], path_hist[3], path_hist[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
