// dfp_port_rx: receiving part of one DFP port.
//
// The port's 9 data lines carry a word in every clock in which the neighbour
// sends one, and the idle code (dfp_pkg::IDLE_CODE) otherwise. The receiving
// part drives the acknowledge line high while it can take a word; a word on the
// lines is taken at the clock edge when the acknowledge is high. Taken words
// wait in a two-word buffer until the crossbar passes them to an input stack or
// a sending part. Two words let one word per clock stream through (25 Mbytes/s
// at the 25 MHz clock) while the acknowledge depends only on the buffer's own
// state, never combinationally on the receiver's consumers.
// The receiving part itself and the 9+1 lines follow the document; the idle
// code, the acknowledge timing and the buffer are this design's choices.
module dfp_port_rx
  import dfp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  enable,    // port configured for receiving and processor running
  input  word_t line_data, // data lines from the neighbour
  output logic  line_ack,  // acknowledge line to the neighbour
  output logic  valid,     // a received word is waiting
  output word_t word,
  input  logic  take       // crossbar takes `word` this clock
);
  logic full, empty, accept;
  logic [1:0] cnt;

  assign line_ack = enable && !full;
  assign accept   = line_ack && (line_data != IDLE_CODE);
  assign valid    = !empty;

  dfp_fifo #(.DEPTH(2), .WIDTH(WORD_W)) u_buf (
    .clk, .rst_n, .clear,
    .push(accept), .din(line_data),
    .pop(take && valid), .head(word),
    .empty, .full, .count(cnt)
  );

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> valid);
endmodule
