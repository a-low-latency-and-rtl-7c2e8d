// hsmbft_pkg -- shared types, sizes and topology functions of the 64-node
// H-SMBFT (Hybrid Scalable-Minimized-Butterfly-Fat-Tree) network-on-chip.
//
// The network has two router levels. Sixteen level-1 routers each serve four
// nodes and are fully linked inside groups of four (right, next/cross and
// left sibling). Each level-1 router i also has one parent link to level-2
// router (i mod 4); each of the four level-2 routers therefore has one child
// in every group. The sizes (64 nodes, 16 + 4 routers, 8 virtual channels,
// 32-bit flits) follow the published configuration; the flit sideband, the
// head-flit field layout and the port numbering are choices of this design.
//
// Flit on a link: valid, 2-bit type, 3-bit virtual channel, 32-bit payload.
// Head payload: [5:0] destination node, [11:6] source node, [31:12]
// generation time (wrapping cycle count, used for latency measurement).
// Credit on a link: valid and the virtual channel whose buffer freed a slot.
package hsmbft_pkg;

  localparam int NUM_NODES        = 64;
  localparam int NODES_PER_ROUTER = 4;   // concentration factor
  localparam int GROUP_SIZE       = 4;   // level-1 routers fully linked as siblings
  localparam int NUM_L1           = NUM_NODES / 4;    // Eq 2, l = 1
  localparam int NUM_L2           = NUM_NODES / 16;   // Eq 2, l = 2
  localparam int NODE_W           = $clog2(NUM_NODES);

  localparam int FLIT_W  = 32;
  localparam int NUM_VC  = 8;
  localparam int VC_W    = $clog2(NUM_VC);
  localparam int TIME_W  = FLIT_W - 2 * NODE_W;

  // Level-1 router port numbers
  localparam int L1_PORTS       = 8;
  localparam int L1_PORT_RIGHT  = 4;
  localparam int L1_PORT_NEXT   = 5;
  localparam int L1_PORT_LEFT   = 6;
  localparam int L1_PORT_PARENT = 7;
  // Level-2 router: port k leads to the child in group k
  localparam int L2_PORTS       = 4;
  localparam int PORT_W         = 3;

  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3    // single-flit packet
  } flit_type_e;

  typedef struct packed {
    logic               valid;
    flit_type_e         ftype;
    logic [VC_W-1:0]    vc;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  typedef struct packed {
    logic               valid;
    logic [VC_W-1:0]    vc;
  } credit_t;

  // What an input buffer stores: type and payload (the VC is the buffer index)
  typedef struct packed {
    flit_type_e         ftype;
    logic [FLIT_W-1:0]  data;
  } buf_entry_t;

  typedef struct packed {
    logic [TIME_W-1:0]  gen_time;
    logic [NODE_W-1:0]  src;
    logic [NODE_W-1:0]  dest;
  } head_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_HEADTAIL);
  endfunction

  // Eq 3: parent of level-1 router i is level-2 router (i mod 4)
  function automatic int parent_of(int i);
    return i % 4;
  endfunction

  // Eqs 4-6: right, next (cross) and left sibling of level-1 router i
  function automatic int right_sibling(int i);
    return (i / 4) * 4 + (i + 1) % 4;
  endfunction

  function automatic int next_sibling(int i);
    return (i / 4) * 4 + (i + 2) % 4;
  endfunction

  function automatic int left_sibling(int i);
    return (i / 4) * 4 + (i + 3) % 4;
  endfunction

endpackage
