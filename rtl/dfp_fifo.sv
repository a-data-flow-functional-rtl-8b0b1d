// dfp_fifo: synchronous FIFO used for the DFP input and output stacks (and as
// the two-word buffers of the port receiving and sending parts).
//
// DEPTH usable words of WIDTH bits, first-word-fall-through: `head` shows the
// oldest word whenever `empty` is low. A push and a pop in the same clock are
// allowed, also when the FIFO is full (the pop frees the place). The 8-word,
// 9-bit default follows the document; the fall-through behaviour, the clear
// input and the `count` output are this design's own choices. A push when full
// without a pop, or a pop when empty, is a caller error and is flagged by an
// assertion.
module dfp_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,     // synchronous flush
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign head  = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  // Handshake rules
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clear) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clear) !(pop && empty));
endmodule
