// route_compute -- output port of a head flit, from its destination node.
//
// Level-1 router i (group g = i/4): a destination on this router leaves on
// local port dest%4; a destination on a sibling router j of the same group
// leaves on the right, next/cross or left sibling port for (j - i) mod 4 =
// 1, 2, 3 (the sibling positions of the topology equations); any other
// destination climbs to the parent (level-2 router i mod 4). Level-2 router:
// the destination's group (dest/16) is the child port, which reaches the
// router of that group at the same position; from there a sibling hop
// finishes the path. Every path is a shortest path (at most four routers).
// Taking the parent before the sibling is this design's choice: it makes
// sibling inputs eject-only, which keeps the network free of deadlock.
// Combinational, no clock. The router's position arrives on router_id, a
// constant strap tied in the network, so that all routers of a level share
// one module body.
module route_compute
  import hsmbft_pkg::*;
#(
  parameter int LEVEL = 1
) (
  input  logic [3:0]        router_id,   // position of this router in its level
  input  logic [NODE_W-1:0] dest,
  output logic [PORT_W-1:0] out_port
);

  logic [3:0] dest_router;
  logic [1:0] sib_offset;

  assign dest_router = dest[NODE_W-1:2];
  assign sib_offset  = dest_router[1:0] - router_id[1:0];

  always_comb begin
    if (LEVEL == 2) begin
      out_port = PORT_W'(dest[NODE_W-1:4]);
    end else if (dest_router == router_id) begin
      out_port = PORT_W'(dest[1:0]);
    end else if (dest_router[3:2] == router_id[3:2]) begin
      unique case (sib_offset)
        2'd1:    out_port = PORT_W'(L1_PORT_RIGHT);
        2'd2:    out_port = PORT_W'(L1_PORT_NEXT);
        default: out_port = PORT_W'(L1_PORT_LEFT);
      endcase
    end else begin
      out_port = PORT_W'(L1_PORT_PARENT);
    end
  end

endmodule
