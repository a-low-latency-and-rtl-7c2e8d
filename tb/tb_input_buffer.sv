// tb_input_buffer -- self-checking test of the virtual-channel flit FIFO.
// Random push/pop traffic (never pushing into a full buffer, never popping
// an empty one, as the credit protocol guarantees) is compared against a
// queue model: head data, empty, full and count are checked every cycle.
// A phase fills the buffer to exactly DEPTH entries to check full, and a
// phase pushes and pops in the same cycle.
module tb_input_buffer;
  localparam int DEPTH = 16;
  localparam int WIDTH = 34;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic push, pop;
  logic [WIDTH-1:0] wdata, rdata;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  input_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
      failures++;
      $display("state mismatch count=%0d model=%0d empty=%0b full=%0b", count, model.size(), empty, full);
    end
    if (model.size() > 0) begin
      checks++;
      if (rdata != model[0]) begin
        failures++;
        $display("data mismatch got %h exp %h", rdata, model[0]);
      end
    end
  endtask

  task automatic step(input logic do_push, input logic do_pop);
    push  = do_push;
    pop   = do_pop;
    wdata = {$urandom, $urandom};
    @(posedge clk);
    #1;
    if (do_pop)  void'(model.pop_front());
    if (do_push) model.push_back(wdata);
    check_state();
  endtask

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check_state();
    // fill completely
    for (int i = 0; i < DEPTH; i++) step(1'b1, 1'b0);
    checks++;
    if (!full) begin failures++; $display("not full after %0d pushes", DEPTH); end
    // push and pop together while full
    for (int i = 0; i < 5; i++) step(1'b1, 1'b1);
    // drain
    for (int i = 0; i < DEPTH; i++) step(1'b0, 1'b1);
    checks++;
    if (!empty) begin failures++; $display("not empty after drain"); end
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      logic pu, po;
      pu = ($urandom % 100) < 55 && (model.size() < DEPTH || 1'b0);
      po = ($urandom % 100) < 50 && model.size() > 0;
      if (model.size() == DEPTH && !po) pu = 1'b0;
      step(pu, po);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
