// tb_crossbar -- self-checking test of the router crossbar. Random flits
// on all inputs and random selections (each input used by at most one
// output, some outputs idle) are applied; every output must carry exactly
// the selected input's flit, or an all-zero invalid flit when idle.
module tb_crossbar;
  import hsmbft_pkg::*;
  localparam int N = 8;

  flit_t in_flit [N];
  logic [$clog2(N)-1:0] sel [N];
  logic [N-1:0] sel_valid;
  flit_t out_flit [N];
  int checks = 0, failures = 0;

  crossbar #(.N_IN(N), .N_OUT(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    for (int t = 0; t < 2000; t++) begin
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        sel[i]     = $clog2(N)'(perm[i]);
      end
      sel_valid = N'($urandom);
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (sel_valid[o] ? (out_flit[o] != in_flit[perm[o]]) : (out_flit[o] != '0)) begin
          failures++;
          $display("output %0d wrong: got %h", o, out_flit[o]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
