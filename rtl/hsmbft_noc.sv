// hsmbft_noc -- the 64-node Hybrid Scalable-Minimized-Butterfly-Fat-Tree
// (H-SMBFT) network-on-chip.
//
// Structure (two levels, as in the published 64-node network):
//   * 16 level-1 routers R0..R15 (8 ports). Router i serves nodes 4i..4i+3
//     on ports 0-3 (S-links), is linked to the three other routers of its
//     group of four (i/4) through its right (port 4), next/cross (port 5)
//     and left (port 6) sibling ports (M-links), and to its parent through
//     port 7 (L-link). The right output of router i enters the left input of
//     its right sibling, the next output enters the next input of its cross
//     sibling, the left output enters the right input of its left sibling.
//   * 4 level-2 routers L2R0..L2R3 (4 ports). L2Rj is the parent of level-1
//     routers j, j+4, j+8, j+12 (parent = i mod 4); its port k leads to the
//     child in group k, i.e. to router 4k+j.
// This gives 64 S-links, 24 sibling M-links and 16 L-links. No path crosses
// more than four routers.
//
// Interface: node n injects flits on node_in_flit[n] and gets credits for
// them on node_in_credit[n]; flits for node n leave on node_out_flit[n] and
// node n returns one credit per consumed flit on node_out_credit[n]. A node
// must track NUM_VC x BUF_DEPTH injection credits and must itself start with
// the same amount of ejection buffering. Every link carries one flit per
// cycle; a head flit needs five cycles per router. The topology and sizes
// follow the published network; the port numbering, flit format and link
// protocol are this design's choices. Reset is synchronous, active high.
module hsmbft_noc
  import hsmbft_pkg::*;
#(
  parameter int BUF_DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  flit_t   node_in_flit    [NUM_NODES],
  output credit_t node_in_credit  [NUM_NODES],
  output flit_t   node_out_flit   [NUM_NODES],
  input  credit_t node_out_credit [NUM_NODES]
);

  // Link bundles seen from each router
  flit_t   l1_in_flit   [NUM_L1][L1_PORTS];
  credit_t l1_in_cred   [NUM_L1][L1_PORTS];   // credits the router returns upstream
  flit_t   l1_out_flit  [NUM_L1][L1_PORTS];
  credit_t l1_out_cred  [NUM_L1][L1_PORTS];   // credits the router receives
  flit_t   l2_in_flit   [NUM_L2][L2_PORTS];
  credit_t l2_in_cred   [NUM_L2][L2_PORTS];
  flit_t   l2_out_flit  [NUM_L2][L2_PORTS];
  credit_t l2_out_cred  [NUM_L2][L2_PORTS];

  // --------------------------------------------------------- level 1
  for (genvar i = 0; i < NUM_L1; i++) begin : g_l1
    localparam int RIGHT = right_sibling(i);
    localparam int NEXT  = next_sibling(i);
    localparam int LEFT  = left_sibling(i);
    localparam int PAR   = parent_of(i);
    localparam int GRP   = i / 4;

    // S-links to the four local nodes
    for (genvar k = 0; k < NODES_PER_ROUTER; k++) begin : g_node
      assign l1_in_flit[i][k]      = node_in_flit[4*i+k];
      assign node_in_credit[4*i+k] = l1_in_cred[i][k];
      assign node_out_flit[4*i+k]  = l1_out_flit[i][k];
      assign l1_out_cred[i][k]     = node_out_credit[4*i+k];
    end

    // M-links to the siblings: what enters port 4 (right) comes from the
    // right sibling's left output, and so on; credits run the other way.
    assign l1_in_flit[i][L1_PORT_RIGHT]  = l1_out_flit[RIGHT][L1_PORT_LEFT];
    assign l1_in_flit[i][L1_PORT_NEXT]   = l1_out_flit[NEXT][L1_PORT_NEXT];
    assign l1_in_flit[i][L1_PORT_LEFT]   = l1_out_flit[LEFT][L1_PORT_RIGHT];
    assign l1_out_cred[i][L1_PORT_RIGHT] = l1_in_cred[RIGHT][L1_PORT_LEFT];
    assign l1_out_cred[i][L1_PORT_NEXT]  = l1_in_cred[NEXT][L1_PORT_NEXT];
    assign l1_out_cred[i][L1_PORT_LEFT]  = l1_in_cred[LEFT][L1_PORT_RIGHT];

    // L-link to the parent L2R(i mod 4), which sees this router on port i/4
    assign l1_in_flit[i][L1_PORT_PARENT]  = l2_out_flit[PAR][GRP];
    assign l1_out_cred[i][L1_PORT_PARENT] = l2_in_cred[PAR][GRP];

    vc_router #(
      .LEVEL     (1),
      .NUM_PORTS (L1_PORTS),
      .BUF_DEPTH (BUF_DEPTH)
    ) u_router (
      .clk           (clk),
      .rst           (rst),
      .router_id     (4'(i)),
      .in_flit       (l1_in_flit[i]),
      .in_credit_out (l1_in_cred[i]),
      .out_flit      (l1_out_flit[i]),
      .out_credit_in (l1_out_cred[i])
    );
  end

  // --------------------------------------------------------- level 2
  for (genvar j = 0; j < NUM_L2; j++) begin : g_l2
    for (genvar k = 0; k < L2_PORTS; k++) begin : g_child
      assign l2_in_flit[j][k]  = l1_out_flit[4*k+j][L1_PORT_PARENT];
      assign l2_out_cred[j][k] = l1_in_cred[4*k+j][L1_PORT_PARENT];
    end

    vc_router #(
      .LEVEL     (2),
      .NUM_PORTS (L2_PORTS),
      .BUF_DEPTH (BUF_DEPTH)
    ) u_router (
      .clk           (clk),
      .rst           (rst),
      .router_id     (4'(j)),
      .in_flit       (l2_in_flit[j]),
      .in_credit_out (l2_in_cred[j]),
      .out_flit      (l2_out_flit[j]),
      .out_credit_in (l2_out_cred[j])
    );
  end

endmodule
