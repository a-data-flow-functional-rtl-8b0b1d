// dfp_port_tx: sending part of one DFP port, with its line driver.
//
// Words from the output crossbar (an output stack or, for route-through, a
// receiving part) are kept in a two-word buffer. While the buffer holds a
// word, it is put on the 9 data lines; it counts as sent at the clock edge
// when the neighbour's acknowledge line is high, and the next word appears at
// once, so one word per clock can stream. An empty buffer, or a held
// processor (run low), puts the idle code
// on the lines. `drive` is the enable of the line driver (the triangle after
// each sending part in the processor diagram): it is high when the port's
// configuration makes it a sending port. Showing no word while held keeps a
// receiver that is still running from taking a word twice. `ready` depends only on the buffer
// state. The sending part, its configuration-controlled driver and the 9+1
// lines follow the document; buffer depth and idle code are this design's own.
module dfp_port_tx
  import dfp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  enable,    // port configured for sending
  input  logic  run,       // processor running (lines are acknowledged only then)
  input  logic  load,      // crossbar offers `word` and it is accepted
  input  word_t word,
  output logic  ready,     // can accept a word from the crossbar
  output word_t line_data,
  output logic  drive,
  input  logic  line_ack
);
  logic full, empty, sent;
  word_t head;
  logic [1:0] cnt;

  assign ready     = enable && !full;
  assign drive     = enable;
  assign line_data = (enable && run && !empty) ? head : IDLE_CODE;
  assign sent      = enable && run && !empty && line_ack;

  dfp_fifo #(.DEPTH(2), .WIDTH(WORD_W)) u_buf (
    .clk, .rst_n, .clear,
    .push(load), .din(word),
    .pop(sent), .head,
    .empty, .full, .count(cnt)
  );

  a_load_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready);
  a_no_idle_code: assert property (@(posedge clk) disable iff (!rst_n) load |-> word != IDLE_CODE);
endmodule
