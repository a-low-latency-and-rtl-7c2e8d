// crossbar -- the router's switch: each output takes the flit of the input
// its switch-allocator selection names.
//
// Purely combinational: one N_IN-to-1 multiplexer per output. An output
// whose sel_valid is low carries an invalid flit. The switch allocator
// guarantees each input feeds at most one output per cycle. Port counts
// default to the 8-port level-1 router; the multiplexer structure is this
// design's choice, the published router only names its crossbar.
module crossbar
  import hsmbft_pkg::*;
#(
  parameter int N_IN  = 8,
  parameter int N_OUT = 8
) (
  input  flit_t                           in_flit  [N_IN],
  input  logic [$clog2(N_IN)-1:0]         sel      [N_OUT],
  input  logic [N_OUT-1:0]                sel_valid,
  output flit_t                           out_flit [N_OUT]
);

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_flit[o] = '0;
      if (sel_valid[o]) begin
        out_flit[o] = in_flit[sel[o]];
      end
    end
  end

endmodule
