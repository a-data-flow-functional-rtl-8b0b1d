// video_in: digital video input subsystem.
//
// Turns a camera's pixel stream into a data flow on one network port. The
// camera gives one 8-bit pixel per clock when `pix_valid` is high and marks the
// last pixel of each line with `pix_eol`; it cannot be stopped. Pixels wait in
// a FIFO (DEPTH entries) and are sent as data words; after the last pixel of a
// line the subsystem sends an end-of-line control word (dfp_pkg::EOL_WORD), so
// downstream operators see the image's line structure. If the network stalls
// long enough for the FIFO to fill, an arriving pixel is lost: `overflow`
// becomes high and stays so until reset, and `lost` counts the lost pixels.
// The subsystem's role and the 10-25 Mbytes/s video rates are the document's;
// the FIFO, the end-of-line marking and the overflow report are this design's.
module video_in
  import dfp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic [7:0]  pix,
  input  logic        pix_eol,
  output logic        overflow,
  output logic [15:0] lost,
  output word_t       line_data,
  input  logic        line_ack
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic        empty, full, push, pop, eol_pending, sent;
  logic [8:0]  head;   // {eol, pixel}
  logic [CW-1:0] cnt;

  assign push = pix_valid && !full;
  // Sending the EOL word of the head pixel happens after the pixel itself.
  assign line_data = eol_pending ? EOL_WORD : (empty ? IDLE_CODE : {1'b0, head[7:0]});
  assign sent      = line_ack && (eol_pending || !empty);
  assign pop       = line_ack && !eol_pending && !empty;

  dfp_fifo #(.DEPTH(DEPTH), .WIDTH(9)) u_fifo (
    .clk, .rst_n, .clear(1'b0), .push, .din({pix_eol, pix}),
    .pop, .head, .empty, .full, .count(cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eol_pending <= 1'b0;
      overflow    <= 1'b0;
      lost        <= '0;
    end else begin
      if (sent && eol_pending)   eol_pending <= 1'b0;
      else if (pop && head[8])   eol_pending <= 1'b1;
      if (pix_valid && full) begin
        overflow <= 1'b1;
        lost     <= lost + 16'd1;
      end
    end
  end
endmodule
