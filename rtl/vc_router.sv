// vc_router -- input-buffered virtual-channel wormhole router of the H-SMBFT
// network. With LEVEL = 1 and NUM_PORTS = 8 it is a level-1 router (ports
// 0-3 local nodes, 4 right sibling, 5 next/cross sibling, 6 left sibling,
// 7 parent); with LEVEL = 2 and NUM_PORTS = 4 a level-2 router (port k is
// the child in group k).
//
// Every input port holds NUM_VC virtual-channel FIFOs of BUF_DEPTH flits.
// A packet passes five pipeline stages per router:
//   BW  buffer write: the flit on the input link is written into the FIFO
//       of the VC named in its sideband;
//   RC  route computation: a head flit at the front of an idle VC selects
//       its output port (route_compute);
//   VA  VC allocation: per output, a round-robin arbiter picks one waiting
//       input VC and hands it the lowest free downstream VC;
//   SA  switch allocation: each input picks one ready VC (round-robin), each
//       output then picks one input (round-robin); the winner is popped,
//       a credit goes back upstream and the flit enters the ST register;
//   ST  switch traversal: the crossbar moves ST registers into the output
//       registers, which drive the output links in the next cycle.
// A head flit on an input link in cycle t is on the output link in cycle
// t+5; body and tail flits skip RC and VA and follow one per cycle.
//
// Flow control is credit based: each output keeps one counter per
// downstream VC (reset to BUF_DEPTH), decremented when a flit wins SA and
// incremented when the downstream buffer returns a credit. A downstream VC
// stays allocated from VA until the packet's tail wins SA.
//
// The port counts, the 8 VCs, the 16-flit buffers and the five-stage depth
// are the published router's; the stage split, the credit protocol and the
// round-robin separable allocators are this design's choices. The router's
// position comes in on router_id, a constant strap, rather than as a
// parameter, so that all routers of a level share one module body. Reset is
// synchronous and active high.
module vc_router
  import hsmbft_pkg::*;
#(
  parameter int LEVEL     = 1,
  parameter int NUM_PORTS = L1_PORTS,
  parameter int BUF_DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic [3:0] router_id,             // position in the level (constant strap)
  input  flit_t   in_flit       [NUM_PORTS],
  output credit_t in_credit_out [NUM_PORTS],
  output flit_t   out_flit      [NUM_PORTS],
  input  credit_t out_credit_in [NUM_PORTS]
);

  localparam int P    = NUM_PORTS;
  localparam int V    = NUM_VC;
  localparam int PW   = $clog2(P);
  localparam int CW   = $clog2(BUF_DEPTH + 1);
  localparam int EW   = $bits(buf_entry_t);

  typedef enum logic [1:0] {
    VC_IDLE,      // waiting for a head flit; RC happens here
    VC_WAIT_VA,   // route known, waiting for a downstream VC
    VC_ACTIVE     // downstream VC held, flits compete for the switch
  } vc_state_e;

  // ---------------------------------------------------------------- state
  vc_state_e        vc_state [P][V];
  logic [PW-1:0]    vc_port  [P][V];     // output port of the current packet
  logic [VC_W-1:0]  vc_ovc   [P][V];     // downstream VC of the current packet
  logic [CW-1:0]    credits  [P][V];     // per output port, per downstream VC
  logic [V-1:0]     ovc_busy [P];        // per output port

  // ------------------------------------------------------- BW: input FIFOs
  buf_entry_t       fifo_front [P][V];
  logic             fifo_empty [P][V];
  logic             fifo_pop   [P][V];
  logic [PW-1:0]    rc_port    [P][V];

  for (genvar p = 0; p < P; p++) begin : g_in
    for (genvar v = 0; v < V; v++) begin : g_vc
      logic [EW-1:0] rdata;
      logic          full_unused;
      logic [CW-1:0] count_unused;
      logic [PORT_W-1:0] rc_raw;
      head_t         front_head;

      input_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(EW)) u_buf (
        .clk   (clk),
        .rst   (rst),
        .push  (in_flit[p].valid && (in_flit[p].vc == VC_W'(v))),
        .wdata ({in_flit[p].ftype, in_flit[p].data}),
        .pop   (fifo_pop[p][v]),
        .rdata (rdata),
        .empty (fifo_empty[p][v]),
        .full  (full_unused),
        .count (count_unused)
      );
      assign fifo_front[p][v] = buf_entry_t'(rdata);
      assign front_head       = head_t'(rdata[FLIT_W-1:0]);

      // RC: route of the head flit at the front
      route_compute #(.LEVEL(LEVEL)) u_rc (
        .router_id(router_id),
        .dest     (front_head.dest),
        .out_port (rc_raw)
      );
      assign rc_port[p][v] = PW'(rc_raw);
    end
  end

  // ------------------------------------------------------ VA: VC allocator
  logic [P*V-1:0]  va_req   [P];
  logic [P*V-1:0]  va_grant [P];
  logic            va_any   [P];
  logic            va_ok    [P];     // grant that really gets a VC
  logic [VC_W-1:0] va_free  [P];     // lowest free downstream VC

  always_comb begin
    for (int o = 0; o < P; o++) begin
      va_req[o] = '0;
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++)
          va_req[o][p*V+v] = (vc_state[p][v] == VC_WAIT_VA) && (int'(vc_port[p][v]) == o);
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_va
    logic [$clog2(P*V)-1:0] idx_unused;
    logic                   have_free;

    always_comb begin
      have_free  = 1'b0;
      va_free[o] = '0;
      for (int v = V - 1; v >= 0; v--) begin
        if (!ovc_busy[o][v]) begin
          have_free  = 1'b1;
          va_free[o] = VC_W'(v);
        end
      end
    end

    rr_arbiter #(.N(P*V)) u_va_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (have_free ? va_req[o] : '0),
      .update    (1'b1),
      .grant     (va_grant[o]),
      .grant_idx (idx_unused),
      .any_grant (va_any[o])
    );
    assign va_ok[o] = va_any[o] && have_free;
  end

  // --------------------------------------------------- SA: switch allocator
  logic [V-1:0]    sa1_req   [P];
  logic [V-1:0]    sa1_grant [P];
  logic [VC_W-1:0] sa1_vc    [P];
  logic            sa1_any   [P];
  logic [PW-1:0]   sa1_port  [P];
  logic [P-1:0]    sa2_req   [P];    // indexed by output
  logic [P-1:0]    sa2_grant [P];
  logic [PW-1:0]   sa2_in    [P];
  logic            sa2_any   [P];
  logic            sa_win    [P];    // indexed by input

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++)
        sa1_req[p][v] = (vc_state[p][v] == VC_ACTIVE) && !fifo_empty[p][v]
                        && (credits[vc_port[p][v]][vc_ovc[p][v]] != '0);
  end

  for (genvar p = 0; p < P; p++) begin : g_sa1
    logic unused_grant;
    rr_arbiter #(.N(V)) u_sa1_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (sa1_req[p]),
      .update    (sa_win[p]),
      .grant     (sa1_grant[p]),
      .grant_idx (sa1_vc[p]),
      .any_grant (sa1_any[p])
    );
    assign sa1_port[p] = vc_port[p][sa1_vc[p]];
  end

  always_comb begin
    for (int o = 0; o < P; o++)
      for (int p = 0; p < P; p++)
        sa2_req[o][p] = sa1_any[p] && (int'(sa1_port[p]) == o);
  end

  for (genvar o = 0; o < P; o++) begin : g_sa2
    rr_arbiter #(.N(P)) u_sa2_arb (
      .clk       (clk),
      .rst       (rst),
      .req       (sa2_req[o]),
      .update    (1'b1),
      .grant     (sa2_grant[o]),
      .grant_idx (sa2_in[o]),
      .any_grant (sa2_any[o])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++)
      sa_win[p] = sa1_any[p] && sa2_grant[sa1_port[p]][p];
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++)
        fifo_pop[p][v] = sa_win[p] && (sa1_vc[p] == VC_W'(v));
  end

  // ------------------------------------------------------ per-VC control
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++) begin
          vc_state[p][v] <= VC_IDLE;
          vc_port[p][v]  <= '0;
          vc_ovc[p][v]   <= '0;
        end
    end else begin
      for (int p = 0; p < P; p++)
        for (int v = 0; v < V; v++) begin
          unique case (vc_state[p][v])
            VC_IDLE: begin
              if (!fifo_empty[p][v] && is_head(fifo_front[p][v].ftype)) begin
                vc_port[p][v]  <= rc_port[p][v];
                vc_state[p][v] <= VC_WAIT_VA;
              end
            end
            VC_WAIT_VA: begin
              if (va_ok[vc_port[p][v]] && va_grant[vc_port[p][v]][p*V+v]) begin
                vc_ovc[p][v]   <= va_free[vc_port[p][v]];
                vc_state[p][v] <= VC_ACTIVE;
              end
            end
            VC_ACTIVE: begin
              if (fifo_pop[p][v] && is_tail(fifo_front[p][v].ftype))
                vc_state[p][v] <= VC_IDLE;
            end
            default: vc_state[p][v] <= VC_IDLE;
          endcase
        end
    end
  end

  // ------------------------------------- output VCs and credit counters
  logic [V-1:0] cred_dec  [P];     // a flit won SA towards (output, VC)
  logic [V-1:0] ovc_free  [P];     // the tail of a packet won SA
  logic [V-1:0] ovc_alloc [P];     // VA handed out this VC

  always_comb begin
    for (int o = 0; o < P; o++) begin
      cred_dec[o]  = '0;
      ovc_free[o]  = '0;
      ovc_alloc[o] = '0;
      if (va_ok[o]) ovc_alloc[o][va_free[o]] = 1'b1;
    end
    for (int p = 0; p < P; p++) begin
      if (sa_win[p]) begin
        cred_dec[sa1_port[p]][vc_ovc[p][sa1_vc[p]]] = 1'b1;
        if (is_tail(fifo_front[p][sa1_vc[p]].ftype))
          ovc_free[sa1_port[p]][vc_ovc[p][sa1_vc[p]]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < P; o++) begin
        ovc_busy[o] <= '0;
        for (int v = 0; v < V; v++) credits[o][v] <= CW'(BUF_DEPTH);
      end
    end else begin
      for (int o = 0; o < P; o++) begin
        ovc_busy[o] <= (ovc_busy[o] & ~ovc_free[o]) | ovc_alloc[o];
        for (int v = 0; v < V; v++) begin
          logic inc;
          inc = out_credit_in[o].valid && (out_credit_in[o].vc == VC_W'(v));
          credits[o][v] <= credits[o][v] + CW'(inc) - CW'(cred_dec[o][v]);
        end
      end
    end
  end

  // ------------------------------------------------ ST register and crossbar
  flit_t         st_flit [P];
  logic [PW-1:0] st_port [P];
  flit_t         xb_out  [P];
  logic [PW-1:0] xb_sel  [P];
  logic [P-1:0]  xb_sel_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < P; p++) begin
        st_flit[p]       <= '0;
        st_port[p]       <= '0;
        in_credit_out[p] <= '0;
      end
    end else begin
      for (int p = 0; p < P; p++) begin
        st_flit[p].valid   <= sa_win[p];
        st_flit[p].ftype   <= fifo_front[p][sa1_vc[p]].ftype;
        st_flit[p].vc      <= vc_ovc[p][sa1_vc[p]];
        st_flit[p].data    <= fifo_front[p][sa1_vc[p]].data;
        st_port[p]         <= sa1_port[p];
        in_credit_out[p].valid <= sa_win[p];
        in_credit_out[p].vc    <= sa1_vc[p];
      end
    end
  end

  always_comb begin
    for (int o = 0; o < P; o++) begin
      xb_sel[o]       = '0;
      xb_sel_valid[o] = 1'b0;
      for (int p = 0; p < P; p++) begin
        if (st_flit[p].valid && int'(st_port[p]) == o) begin
          xb_sel[o]       = PW'(p);
          xb_sel_valid[o] = 1'b1;
        end
      end
    end
  end

  crossbar #(.N_IN(P), .N_OUT(P)) u_xbar (
    .in_flit   (st_flit),
    .sel       (xb_sel),
    .sel_valid (xb_sel_valid),
    .out_flit  (xb_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int o = 0; o < P; o++) out_flit[o] <= '0;
    end else begin
      for (int o = 0; o < P; o++) out_flit[o] <= xb_out[o];
    end
  end

  // ---------------------------------------------------------- assertions
  for (genvar o = 0; o < P; o++) begin : g_chk
    for (genvar v = 0; v < V; v++) begin : g_chk_vc
      a_credit_bound: assert property (@(posedge clk) disable iff (rst)
        credits[o][v] <= CW'(BUF_DEPTH));
    end
  end
  for (genvar p = 0; p < P; p++) begin : g_chk_in
    for (genvar v = 0; v < V; v++) begin : g_chk_in_vc
      a_head_first: assert property (@(posedge clk) disable iff (rst)
        (vc_state[p][v] == VC_IDLE && !fifo_empty[p][v]) |-> is_head(fifo_front[p][v].ftype));
    end
  end

endmodule
