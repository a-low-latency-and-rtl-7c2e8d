// rr_arbiter -- round-robin arbiter used by the router's VC and switch
// allocators.
//
// Combinational grant: the first requester at or after the priority pointer
// wins (one-hot grant, plus its index). When update is high in a cycle with a
// grant, the pointer moves to the requester after the winner, so every
// persistent requester is served within N grants. The round-robin policy is
// this design's choice; the published router only names an arbiter.
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [N-1:0]                 req,
  input  logic                         update,
  output logic [N-1:0]                 grant,
  output logic [$clog2(N>1?N:2)-1:0]   grant_idx,
  output logic                         any_grant
);

  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any_grant = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (!any_grant && req[(int'(ptr) + k) % N]) begin
        any_grant                  = 1'b1;
        grant[(int'(ptr) + k) % N] = 1'b1;
        grant_idx                  = IW'((int'(ptr) + k) % N);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (update && any_grant)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
