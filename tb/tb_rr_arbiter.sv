// tb_rr_arbiter -- self-checking test of the round-robin arbiter. A
// reference pointer is kept in the testbench; for random request vectors
// the grant must be the first requester at or after the pointer, one-hot,
// with the matching index. With all inputs requesting and update held
// high, every input must be granted exactly once per N cycles (fairness).
module tb_rr_arbiter;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [N-1:0] req;
  logic update;
  logic [N-1:0] grant;
  logic [$clog2(N)-1:0] grant_idx;
  logic any_grant;
  int checks = 0, failures = 0;
  int ref_ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int exp_idx;
    exp_idx = -1;
    for (int k = 0; k < N; k++) begin
      int i;
      i = (ref_ptr + k) % N;
      if (exp_idx < 0 && req[i]) exp_idx = i;
    end
    checks++;
    if (exp_idx < 0) begin
      if (any_grant || grant != 0) begin failures++; $display("grant without request"); end
    end else if (!any_grant || grant != (N'(1) << exp_idx) || int'(grant_idx) != exp_idx) begin
      failures++;
      $display("req=%b ptr=%0d exp=%0d got grant=%b idx=%0d", req, ref_ptr, exp_idx, grant, grant_idx);
    end
    if (update && exp_idx >= 0) ref_ptr = (exp_idx + 1) % N;
  endtask

  initial begin
    int seen[N];
    req = '0; update = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // fairness: all request, update every cycle
    req = '1; update = 1'b1;
    for (int r = 0; r < 3; r++) begin
      foreach (seen[i]) seen[i] = 0;
      for (int c = 0; c < N; c++) begin
        #1 check_now();
        seen[grant_idx]++;
        @(posedge clk);
        #1;
      end
      foreach (seen[i]) begin
        checks++;
        if (seen[i] != 1) begin failures++; $display("input %0d granted %0d times in a round", i, seen[i]); end
      end
    end
    // random requests and updates
    for (int c = 0; c < 5000; c++) begin
      req    = N'($urandom);
      update = ($urandom % 4) != 0;
      #1 check_now();
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
