// video_out: digital video output subsystem.
//
// Receives a data flow from one network port and turns it back into a pixel
// stream for a display or recorder: one pixel per clock at most, `out_valid`
// with `out_pix`, and `out_eol` set on the last pixel of each line. Because the
// end of a line is signalled by a control word that follows the last pixel,
// each pixel is held until the next word shows whether it ends the line. The
// acknowledge line is high while the sink is ready (`sink_ready`) so the
// network is stalled, not overrun, by a slow sink. Other control words are
// dropped; `lines` counts completed lines.
// The subsystem's role is the document's; the pixel-holding scheme and the
// interface are this design's.
module video_out
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       line_data,
  output logic        line_ack,
  input  logic        sink_ready,
  output logic        out_valid,
  output logic [7:0]  out_pix,
  output logic        out_eol,
  output logic [15:0] lines
);
  logic       held_v;
  logic [7:0] held;
  logic       take, is_pix, is_eol;

  assign line_ack = sink_ready;
  assign take     = line_ack && (line_data != IDLE_CODE);
  assign is_pix   = take && !line_data[8];
  assign is_eol   = take && (line_data == EOL_WORD);

  // A held pixel is released when the next pixel or the EOL word arrives.
  assign out_valid = held_v && (is_pix || is_eol);
  assign out_pix   = held;
  assign out_eol   = is_eol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_v <= 1'b0;
      held   <= '0;
      lines  <= '0;
    end else begin
      if (is_pix) begin
        held_v <= 1'b1;
        held   <= line_data[7:0];
      end else if (is_eol) begin
        held_v <= 1'b0;
      end
      if (is_eol && held_v) lines <= lines + 16'd1;
    end
  end
endmodule
