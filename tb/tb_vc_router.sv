// tb_vc_router -- self-checking test of one level-1 router (router 5, in
// group 1) at the default buffer depth and VC count.
//
// Each input has a packet source that keeps one credit counter per VC,
// interleaves up to two packets on different VCs and never sends without a
// credit. Each output has a sink with BUF_DEPTH slots per VC that drains
// at a random rate and returns one credit per drained flit, so the router
// sees back-pressure. Every packet carries its id in the head flit's time
// field and {id, sequence} in its body flits; the sink checks the output
// port against the routing rule worked out here from the sibling/parent
// equations, the order and integrity of the flits, that a VC carries one
// packet at a time, and that no buffer overflows. Timing checks: in an idle
// router a head flit takes exactly 5 cycles from input link to output link
// and the following body flits leave one per cycle. Coverage: switch
// conflicts, VC-allocation waits, credit stalls, every output port used.
module tb_vc_router;
  import hsmbft_pkg::*;

  localparam int P         = L1_PORTS;
  localparam int V         = NUM_VC;
  localparam int BUF_DEPTH = 16;
  localparam int RID       = 5;
  localparam int MAXPKT    = 4096;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [3:0] router_id = 4'(RID);
  flit_t   in_flit       [P];
  credit_t in_credit_out [P];
  flit_t   out_flit      [P];
  credit_t out_credit_in [P];

  vc_router #(.LEVEL(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // ---------------------------------------------------------- scoreboard
  int pk_dest [MAXPKT];
  int pk_len  [MAXPKT];
  int pk_port [MAXPKT];
  bit pk_done [MAXPKT];
  int pk_sent_head [MAXPKT];
  int pk_recv_head [MAXPKT];
  int pk_recv_last [MAXPKT];
  int n_pkts = 0, n_done = 0;

  typedef struct { int id; int dest; int len; } pkt_req_t;
  pkt_req_t src_q [P][$];

  function automatic int expected_port(int i, int d);
    int dr;
    dr = d / 4;
    if (dr == i) return d % 4;
    if (dr == (i / 4) * 4 + (i + 1) % 4) return 4;
    if (dr == (i / 4) * 4 + (i + 2) % 4) return 5;
    if (dr == (i / 4) * 4 + (i + 3) % 4) return 6;
    return 7;
  endfunction

  function automatic void add_packet(int p, int d, int len);
    pkt_req_t r;
    r.id = n_pkts; r.dest = d; r.len = len;
    pk_dest[n_pkts] = d;
    pk_len[n_pkts]  = len;
    pk_port[n_pkts] = expected_port(RID, d);
    pk_done[n_pkts] = 1'b0;
    n_pkts++;
    src_q[p].push_back(r);
  endfunction

  // ------------------------------------------------------------- sources
  int  src_cred [P][V];
  bit  slot_busy [P][2];
  int  slot_id   [P][2];
  int  slot_seq  [P][2];
  int  slot_vc   [P][2];
  bit  vc_used   [P][V];
  int  next_vc   [P];
  int  rr_slot   [P];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < P; p++) begin
      flit_t f;
      int s;
      f = '0;
      if (rst) begin
        for (int v = 0; v < V; v++) begin src_cred[p][v] = BUF_DEPTH; vc_used[p][v] = 0; end
        slot_busy[p][0] = 0; slot_busy[p][1] = 0; next_vc[p] = 0; rr_slot[p] = 0;
      end else begin
        if (in_credit_out[p].valid) src_cred[p][in_credit_out[p].vc]++;
        // start a packet in a free slot on a free VC
        for (int k = 0; k < 2; k++) begin
          if (!slot_busy[p][k] && src_q[p].size() > 0) begin
            int vsel;
            vsel = -1;
            for (int t = 0; t < V; t++)
              if (vsel < 0 && !vc_used[p][(next_vc[p] + t) % V]) vsel = (next_vc[p] + t) % V;
            if (vsel >= 0) begin
              pkt_req_t r;
              r = src_q[p].pop_front();
              slot_busy[p][k] = 1; slot_id[p][k] = r.id; slot_seq[p][k] = 0; slot_vc[p][k] = vsel;
              vc_used[p][vsel] = 1; next_vc[p] = (vsel + 1) % V;
            end
          end
        end
        // send one flit from one slot that has a credit
        for (int t = 0; t < 2; t++) begin
          s = (rr_slot[p] + t) % 2;
          if (!f.valid && slot_busy[p][s] && src_cred[p][slot_vc[p][s]] > 0) begin
            int id, sq, len;
            id = slot_id[p][s]; sq = slot_seq[p][s]; len = pk_len[id];
            f.valid = 1'b1;
            f.vc    = VC_W'(slot_vc[p][s]);
            if (len == 1)           f.ftype = FLIT_HEADTAIL;
            else if (sq == 0)       f.ftype = FLIT_HEAD;
            else if (sq == len - 1) f.ftype = FLIT_TAIL;
            else                    f.ftype = FLIT_BODY;
            if (sq == 0) begin
              head_t h;
              h.dest = NODE_W'(pk_dest[id]); h.src = NODE_W'(p); h.gen_time = TIME_W'(id);
              f.data = FLIT_W'(h);
              pk_sent_head[id] = cyc;
            end else begin
              f.data = {16'(id), 16'(sq)};
            end
            src_cred[p][slot_vc[p][s]]--;
            slot_seq[p][s]++;
            if (slot_seq[p][s] == len) begin
              slot_busy[p][s] = 0; vc_used[p][slot_vc[p][s]] = 0;
            end
            rr_slot[p] = (s + 1) % 2;
          end
        end
      end
      in_flit[p] <= f;
    end
  end

  // --------------------------------------------------------------- sinks
  int  snk_cnt  [P][V];
  bit  snk_busy [P][V];
  int  snk_id   [P][V];
  int  snk_seq  [P][V];
  int  drain_pct = 100;
  int  port_hits [P];
  int  full_sink_cycles = 0;

  always @(posedge clk) begin
    for (int o = 0; o < P; o++) begin
      credit_t c;
      c = '0;
      if (rst) begin
        for (int v = 0; v < V; v++) begin snk_cnt[o][v] = 0; snk_busy[o][v] = 0; end
      end else begin
        flit_t f;
        f = out_flit[o];
        if (f.valid) begin
          int v;
          v = int'(f.vc);
          snk_cnt[o][v]++;
          checks++;
          if (snk_cnt[o][v] > BUF_DEPTH) begin failures++; $display("sink %0d vc %0d overflow", o, v); end
          if (is_head(f.ftype)) begin
            head_t h;
            int id;
            h = head_t'(f.data);
            id = int'(h.gen_time);
            checks++;
            if (snk_busy[o][v] || id >= n_pkts || pk_port[id] != o || int'(h.dest) != pk_dest[id] || pk_done[id]) begin
              failures++;
              $display("bad head on port %0d vc %0d: id %0d dest %0d", o, v, id, h.dest);
            end else begin
              port_hits[o]++;
              pk_recv_head[id] = cyc;
              snk_id[o][v] = id; snk_seq[o][v] = 1; snk_busy[o][v] = (f.ftype == FLIT_HEAD);
              if (f.ftype == FLIT_HEADTAIL) begin pk_done[id] = 1; n_done++; pk_recv_last[id] = cyc; end
            end
          end else begin
            checks++;
            if (!snk_busy[o][v] || f.data != {16'(snk_id[o][v]), 16'(snk_seq[o][v])}) begin
              failures++;
              $display("bad body on port %0d vc %0d: %h", o, v, f.data);
            end else begin
              snk_seq[o][v]++;
              if (f.ftype == FLIT_TAIL) begin
                checks++;
                if (snk_seq[o][v] != pk_len[snk_id[o][v]]) begin failures++; $display("length mismatch"); end
                pk_done[snk_id[o][v]] = 1; n_done++; pk_recv_last[snk_id[o][v]] = cyc;
                snk_busy[o][v] = 0;
              end
            end
          end
        end
        // drain at most one flit per port and cycle
        if (($urandom % 100) < drain_pct) begin
          int st;
          st = $urandom % V;
          for (int t = 0; t < V; t++) begin
            int v;
            v = (st + t) % V;
            if (!c.valid && snk_cnt[o][v] > 0) begin
              snk_cnt[o][v]--; c.valid = 1'b1; c.vc = VC_W'(v);
            end
          end
        end
        for (int v = 0; v < V; v++) if (snk_cnt[o][v] == BUF_DEPTH) full_sink_cycles++;
      end
      out_credit_in[o] <= c;
    end
  end

  // ------------------------------------------------------------ coverage
  int sw_conflicts = 0, va_waits = 0, credit_stalls = 0;
  always @(posedge clk) if (!rst) begin
    for (int o = 0; o < P; o++) if ($countones(dut.sa2_req[o]) > 1) sw_conflicts++;
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++) begin
        if (dut.vc_state[p][v] == 2'd1 && !dut.va_grant[dut.vc_port[p][v]][p*V+v]) va_waits++;
        if (dut.vc_state[p][v] == 2'd2 && !dut.fifo_empty[p][v]
            && dut.credits[dut.vc_port[p][v]][dut.vc_ovc[p][v]] == 0) credit_stalls++;
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int id0;
    for (int o = 0; o < P; o++) port_hits[o] = 0;
    for (int p = 0; p < P; p++) in_flit[p] = '0;
    for (int o = 0; o < P; o++) out_credit_in[o] = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (4) @(posedge clk);

    // 1. latency of an idle router: 8-flit packet from input 0 to the parent
    id0 = n_pkts;
    add_packet(0, 63, 8);
    wait_all(200);
    checks++;
    if (pk_recv_head[id0] - 1 - pk_sent_head[id0] != 5) begin
      failures++;
      $display("head latency %0d cycles, expected 5", pk_recv_head[id0] - 1 - pk_sent_head[id0]);
    end
    checks++;
    if (pk_recv_last[id0] - pk_recv_head[id0] != 7) begin
      failures++;
      $display("8-flit packet spread over %0d cycles at the output, expected 7", pk_recv_last[id0] - pk_recv_head[id0]);
    end

    // 2. one packet to every output from every input
    for (int p = 0; p < P; p++)
      for (int d = 0; d < NUM_NODES; d += 3) add_packet(p, d, 1 + $urandom % 6);
    wait_all(20000);

    // 3. random traffic with back-pressure, 150-flit packets mixed in
    drain_pct = 40;
    for (int k = 0; k < 800; k++) begin
      int len;
      len = ($urandom % 20 == 0) ? 150 : 1 + $urandom % 24;
      add_packet($urandom % P, $urandom % NUM_NODES, len);
    end
    wait_all(150000);

    for (int o = 0; o < P; o++) begin
      checks++;
      if (port_hits[o] == 0) begin failures++; $display("output %0d never used", o); end
    end
    $display("switch conflicts %0d, VC-allocation waits %0d, credit stalls %0d, full sink buffers %0d",
             sw_conflicts, va_waits, credit_stalls, full_sink_cycles);
    checks += 3;
    if (sw_conflicts == 0)  begin failures++; $display("no switch conflict seen"); end
    if (va_waits == 0)      begin failures++; $display("no VC-allocation wait seen"); end
    if (credit_stalls == 0) begin failures++; $display("no credit stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
