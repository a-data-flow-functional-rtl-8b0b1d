// dfp_chip: a biprocessor chip holding two coupled DFPs.
//
// The two processors sit one above the other in the Z direction of the mesh:
// the U port of processor 0 is wired to the D port of processor 1 inside the
// chip, and the other ten ports are brought out. The port arrays keep the
// per-processor N S E W U D layout so that a mesh can treat every processor
// alike; the two internal entries (U of processor 0, D of processor 1) drive
// nothing outside and ignore their inputs. The two processors share clock,
// reset and the command lines, and the scan chain runs through processor 0
// then processor 1.
// Two DFPs per chip follows the document; how they are coupled is this
// design's assumption.
module dfp_chip
  import dfp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic [3:0] com,
  input  logic  scan_in,
  output logic  scan_out,
  input  word_t p_data_i  [2][NPORTS],
  output word_t p_data_o  [2][NPORTS],
  output logic  p_data_oe [2][NPORTS],
  input  logic  p_ack_i   [2][NPORTS],
  output logic  p_ack_o   [2][NPORTS],
  output logic  p_ack_oe  [2][NPORTS]
);
  word_t d_i  [2][NPORTS], d_o [2][NPORTS];
  logic  d_oe [2][NPORTS], a_i [2][NPORTS], a_o [2][NPORTS], a_oe [2][NPORTS];
  logic  scan_mid;

  // Port entry q of processor c is internal when it is the coupling link.
  function automatic logic internal(input int c, input int q);
    return (c == 0 && q == P_U) || (c == 1 && q == P_D);
  endfunction

  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int q = 0; q < NPORTS; q++) begin
        if (internal(c, q)) begin
          // lines of the coupling link, from the other processor's opposite port
          d_i[c][q] = d_oe[1-c][(c == 0) ? P_D : P_U] ? d_o[1-c][(c == 0) ? P_D : P_U] : IDLE_CODE;
          a_i[c][q] = a_oe[1-c][(c == 0) ? P_D : P_U] && a_o[1-c][(c == 0) ? P_D : P_U];
          p_data_o[c][q]  = IDLE_CODE;
          p_data_oe[c][q] = 1'b0;
          p_ack_o[c][q]   = 1'b0;
          p_ack_oe[c][q]  = 1'b0;
        end else begin
          d_i[c][q] = p_data_i[c][q];
          a_i[c][q] = p_ack_i[c][q];
          p_data_o[c][q]  = d_o[c][q];
          p_data_oe[c][q] = d_oe[c][q];
          p_ack_o[c][q]   = a_o[c][q];
          p_ack_oe[c][q]  = a_oe[c][q];
        end
      end
  end

  dfp u_dfp0 (
    .clk, .rst_n, .com, .scan_in, .scan_out(scan_mid),
    .p_data_i(d_i[0]), .p_data_o(d_o[0]), .p_data_oe(d_oe[0]),
    .p_ack_i(a_i[0]), .p_ack_o(a_o[0]), .p_ack_oe(a_oe[0])
  );
  dfp u_dfp1 (
    .clk, .rst_n, .com, .scan_in(scan_mid), .scan_out,
    .p_data_i(d_i[1]), .p_data_o(d_o[1]), .p_data_oe(d_oe[1]),
    .p_ack_i(a_i[1]), .p_ack_o(a_o[1]), .p_ack_oe(a_oe[1])
  );
endmodule
