// tb_route_compute -- self-checking test of the routing function.
// One instance per router of the 64-node network (16 level-1, 4 level-2).
// For every router and destination the port must match the expectation
// built here from the topology equations (siblings at positions
// floor(i/4)*4 + (i+1|2|3) mod 4, parent i mod 4). Then every source node
// is walked to every destination through a model of the links: each walk
// must end at the destination node within four routers, and from node 0
// the number of routers crossed must be 1 (nodes 1-3), 2 (nodes 4-15), 3
// (routers 4, 8, 12) or 4 (all others), as the hop map of the network
// shows.
module tb_route_compute;
  import hsmbft_pkg::*;

  logic [NODE_W-1:0] dest;
  logic [PORT_W-1:0] port_l1 [NUM_L1];
  logic [PORT_W-1:0] port_l2 [NUM_L2];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NUM_L1; i++) begin : g_l1
    route_compute #(.LEVEL(1)) u_rc (.router_id(4'(i)), .dest(dest), .out_port(port_l1[i]));
  end
  for (genvar j = 0; j < NUM_L2; j++) begin : g_l2
    route_compute #(.LEVEL(2)) u_rc (.router_id(4'(j)), .dest(dest), .out_port(port_l2[j]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_l1(int i, int d);
    int dr;
    dr = d / 4;
    if (dr == i) return d % 4;
    if (dr == (i / 4) * 4 + (i + 1) % 4) return 4;
    if (dr == (i / 4) * 4 + (i + 2) % 4) return 5;
    if (dr == (i / 4) * 4 + (i + 3) % 4) return 6;
    return 7;
  endfunction

  // routers crossed from src to dst, following the computed ports
  task automatic walk(input int src, input int dst, output int routers, output int reached);
    int level, id, port;
    level = 1; id = src / 4; routers = 0; reached = -1;
    while (routers < 8) begin
      dest = NODE_W'(dst);
      #1;
      routers++;
      if (level == 1) begin
        port = int'(port_l1[id]);
        if (port < 4) begin reached = id * 4 + port; break; end
        else if (port == 4) id = (id / 4) * 4 + (id + 1) % 4;
        else if (port == 5) id = (id / 4) * 4 + (id + 2) % 4;
        else if (port == 6) id = (id / 4) * 4 + (id + 3) % 4;
        else begin level = 2; id = id % 4; end
      end else begin
        port = int'(port_l2[id]);
        level = 1;
        id = port * 4 + id;      // child in group 'port' at the same position
      end
    end
  endtask

  initial begin
    int routers, reached, exp_r;
    for (int d = 0; d < NUM_NODES; d++) begin
      dest = NODE_W'(d);
      #1;
      for (int i = 0; i < NUM_L1; i++) begin
        checks++;
        if (int'(port_l1[i]) != expected_l1(i, d)) begin
          failures++;
          $display("L1 router %0d dest %0d: port %0d expected %0d", i, d, port_l1[i], expected_l1(i, d));
        end
      end
      for (int j = 0; j < NUM_L2; j++) begin
        checks++;
        if (int'(port_l2[j]) != d / 16) begin
          failures++;
          $display("L2 router %0d dest %0d: port %0d expected %0d", j, d, port_l2[j], d / 16);
        end
      end
    end
    for (int s = 0; s < NUM_NODES; s++) begin
      for (int d = 0; d < NUM_NODES; d++) begin
        walk(s, d, routers, reached);
        checks++;
        if (reached != d || routers > 4) begin
          failures++;
          $display("walk %0d->%0d reached %0d after %0d routers", s, d, reached, routers);
        end
        if (s == 0 && d != 0) begin
          if (d < 4) exp_r = 1;
          else if (d < 16) exp_r = 2;
          else if ((d / 4) % 4 == 0) exp_r = 3;
          else exp_r = 4;
          checks++;
          if (routers != exp_r) begin
            failures++;
            $display("node 0 -> %0d crosses %0d routers, expected %0d", d, routers, exp_r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
