// input_buffer -- the flit FIFO of one virtual channel of a router input.
//
// A circular register array of DEPTH entries with one write and one read
// port. The oldest entry is always visible on rdata (read without latency)
// so the router can inspect a head flit before popping it. push and pop may
// occur in the same cycle. Credit-based flow control upstream guarantees
// that push never hits a full buffer; the assertions flag a violation.
// DEPTH defaults to the 16-flit input buffer of the published router; the
// register-array form (instead of an SRAM macro) and the synchronous,
// active-high reset are this design's choices.
module input_buffer #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 34
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CNT_W = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  function automatic logic [PTR_W-1:0] incr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop  |-> !empty);

endmodule
