// dffc_top: the data-flow functional computer.
//
// An NX x NY x NZ mesh of data-flow processors (DFPs), built from biprocessor
// chips stacked in Z, in which every processor is linked to its six neighbours
// (N = y-1, S = y+1, W = x-1, E = x+1, D = z-1, U = z+1) by 10-line ports. An
// image algorithm is mapped onto the mesh as a graph of operators, one per
// processor, with other processors used as routing elements; flows then move
// through the mesh as a deep pipeline with no global control.
// Around the mesh, in the z = 0 layer:
//   * NVIDEO digital video inputs drive the W ports of processors (0, i*NY/NVIDEO)
//   * NVIDEO digital video outputs take the E ports of (NX-1, i*NY/NVIDEO)
//   * the low-bandwidth I/O interface sends into the N port of (0, 0) and
//     receives from the N port of (NX-1, 0)
//   * NHL links to the high-level (transputer) network are the S ports of
//     (i*NX/NHL, NY-1), brought out as top-level ports
//   * the programming and test interface drives the command lines of all
//     processors and one scan chain through them, chip by chip: chip
//     c = (z/2)*NX*NY + y*NX + x, lower processor of each chip first.
// Host bus map: 0x00-0x07 programming and test interface, 0x10-0x13
// low-bandwidth I/O. The other mesh-boundary ports are left open.
// The 8 x 8 x 4 mesh of 256 processors is the document's experimental system;
// the four video channels and four high-level links follow the number of
// arrows in its system diagram; the placement of the interfaces on the mesh
// faces and the host bus map are this design's own.
module dffc_top
  import dfp_pkg::*;
#(
  parameter int unsigned NX = 8,
  parameter int unsigned NY = 8,
  parameter int unsigned NZ = 4,      // even: two processors per chip
  parameter int unsigned NVIDEO = 4,
  parameter int unsigned NHL = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host workstation system bus
  input  logic [7:0]  hb_addr,
  input  logic        hb_we,
  input  logic        hb_re,
  input  logic [31:0] hb_wdata,
  output logic [31:0] hb_rdata,
  // digital video inputs
  input  logic        vin_valid [NVIDEO],
  input  logic [7:0]  vin_pix   [NVIDEO],
  input  logic        vin_eol   [NVIDEO],
  output logic        vin_overflow [NVIDEO],
  // digital video outputs
  input  logic        vout_ready [NVIDEO],
  output logic        vout_valid [NVIDEO],
  output logic [7:0]  vout_pix   [NVIDEO],
  output logic        vout_eol   [NVIDEO],
  // links to the high-level processor network (through link adaptors)
  input  word_t       hl_data_i  [NHL],
  output word_t       hl_data_o  [NHL],
  output logic        hl_data_oe [NHL],
  input  logic        hl_ack_i   [NHL],
  output logic        hl_ack_o   [NHL],
  output logic        hl_ack_oe  [NHL]
);
  localparam int unsigned N = NX * NY * NZ;
  localparam int unsigned NCHIP = N / 2;

  function automatic int unsigned id(input int unsigned x, input int unsigned y, input int unsigned z);
    return (z * NY + y) * NX + x;
  endfunction

  word_t d_i [N][NPORTS], d_o [N][NPORTS];
  logic  d_oe [N][NPORTS], a_i [N][NPORTS], a_o [N][NPORTS], a_oe [N][NPORTS];
  logic  scan [NCHIP+1];
  logic [3:0] com;
  logic [31:0] rd_pt, rd_lb;

  // video / low-bandwidth attachments
  word_t vin_data [NVIDEO];
  logic  vin_ack  [NVIDEO];
  word_t vout_data [NVIDEO];
  logic  vout_ack  [NVIDEO];
  word_t lb_tx_data, lb_rx_data;
  logic  lb_tx_ack, lb_rx_ack;
  logic [15:0] vin_lost [NVIDEO];
  logic [15:0] vout_lines [NVIDEO];

  // ---------------- processors ----------------
  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    // chip c holds processors id c' and c' + NX*NY, with c' in layer 2*(c / (NX*NY))
    localparam int unsigned LO = (c / (NX*NY)) * 2 * NX * NY + (c % (NX*NY));
    localparam int unsigned HI = LO + NX * NY;
    word_t ci_d [2][NPORTS], co_d [2][NPORTS];
    logic  co_doe [2][NPORTS], ci_a [2][NPORTS], co_a [2][NPORTS], co_aoe [2][NPORTS];
    always_comb begin
      for (int q = 0; q < NPORTS; q++) begin
        ci_d[0][q] = d_i[LO][q];  ci_d[1][q] = d_i[HI][q];
        ci_a[0][q] = a_i[LO][q];  ci_a[1][q] = a_i[HI][q];
      end
    end
    for (genvar q = 0; q < NPORTS; q++) begin : g_q
      assign d_o[LO][q] = co_d[0][q];   assign d_o[HI][q] = co_d[1][q];
      assign d_oe[LO][q] = co_doe[0][q]; assign d_oe[HI][q] = co_doe[1][q];
      assign a_o[LO][q] = co_a[0][q];   assign a_o[HI][q] = co_a[1][q];
      assign a_oe[LO][q] = co_aoe[0][q]; assign a_oe[HI][q] = co_aoe[1][q];
    end
    dfp_chip u_chip (
      .clk, .rst_n, .com, .scan_in(scan[c]), .scan_out(scan[c+1]),
      .p_data_i(ci_d), .p_data_o(co_d), .p_data_oe(co_doe),
      .p_ack_i(ci_a), .p_ack_o(co_a), .p_ack_oe(co_aoe)
    );
  end

  // ---------------- mesh links and boundary ----------------
  always_comb begin
    for (int unsigned z = 0; z < NZ; z++)
      for (int unsigned y = 0; y < NY; y++)
        for (int unsigned x = 0; x < NX; x++)
          for (int unsigned q = 0; q < NPORTS; q++) begin
            int unsigned me, nb;
            logic has;
            me = id(x, y, z);
            has = 1'b1;
            nb = me;
            unique case (q)
              P_N: if (y > 0)      nb = id(x, y-1, z); else has = 1'b0;
              P_S: if (y < NY-1)   nb = id(x, y+1, z); else has = 1'b0;
              P_E: if (x < NX-1)   nb = id(x+1, y, z); else has = 1'b0;
              P_W: if (x > 0)      nb = id(x-1, y, z); else has = 1'b0;
              P_U: if (z < NZ-1)   nb = id(x, y, z+1); else has = 1'b0;
              default: if (z > 0)  nb = id(x, y, z-1); else has = 1'b0;
            endcase
            if (has) begin
              // the neighbour's opposite port: N<->S, E<->W, U<->D
              d_i[me][q] = d_oe[nb][q ^ 1] ? d_o[nb][q ^ 1] : IDLE_CODE;
              a_i[me][q] = a_oe[nb][q ^ 1] && a_o[nb][q ^ 1];
            end else begin
              d_i[me][q] = IDLE_CODE;
              a_i[me][q] = 1'b0;
            end
          end
    // attachments on the boundary
    for (int unsigned v = 0; v < NVIDEO; v++) begin
      d_i[id(0, v*NY/NVIDEO, 0)][P_W] = vin_data[v];
      vin_ack[v] = a_oe[id(0, v*NY/NVIDEO, 0)][P_W] && a_o[id(0, v*NY/NVIDEO, 0)][P_W];
      vout_data[v] = d_oe[id(NX-1, v*NY/NVIDEO, 0)][P_E] ? d_o[id(NX-1, v*NY/NVIDEO, 0)][P_E] : IDLE_CODE;
      a_i[id(NX-1, v*NY/NVIDEO, 0)][P_E] = vout_ack[v];
    end
    d_i[id(0, 0, 0)][P_N] = lb_tx_data;
    lb_tx_ack = a_oe[id(0, 0, 0)][P_N] && a_o[id(0, 0, 0)][P_N];
    lb_rx_data = d_oe[id(NX-1, 0, 0)][P_N] ? d_o[id(NX-1, 0, 0)][P_N] : IDLE_CODE;
    a_i[id(NX-1, 0, 0)][P_N] = lb_rx_ack;
    for (int unsigned h = 0; h < NHL; h++) begin
      d_i[id(h*NX/NHL, NY-1, 0)][P_S] = hl_data_i[h];
      a_i[id(h*NX/NHL, NY-1, 0)][P_S] = hl_ack_i[h];
      hl_data_o[h]  = d_o[id(h*NX/NHL, NY-1, 0)][P_S];
      hl_data_oe[h] = d_oe[id(h*NX/NHL, NY-1, 0)][P_S];
      hl_ack_o[h]   = a_o[id(h*NX/NHL, NY-1, 0)][P_S];
      hl_ack_oe[h]  = a_oe[id(h*NX/NHL, NY-1, 0)][P_S];
    end
  end

  // ---------------- interfaces ----------------
  prog_test_if #(.BASE(8'h00)) u_pt (
    .clk, .rst_n, .hb_addr, .hb_we, .hb_wdata, .hb_rdata(rd_pt),
    .com, .scan_out(scan[0]), .scan_in(scan[NCHIP])
  );

  lowbw_io_if #(.BASE(8'h10)) u_lb (
    .clk, .rst_n, .hb_addr, .hb_we, .hb_re, .hb_wdata, .hb_rdata(rd_lb),
    .tx_data(lb_tx_data), .tx_ack(lb_tx_ack), .rx_data(lb_rx_data), .rx_ack(lb_rx_ack)
  );

  assign hb_rdata = rd_pt | rd_lb;

  for (genvar v = 0; v < NVIDEO; v++) begin : g_video
    video_in u_vin (
      .clk, .rst_n, .pix_valid(vin_valid[v]), .pix(vin_pix[v]), .pix_eol(vin_eol[v]),
      .overflow(vin_overflow[v]), .lost(vin_lost[v]),
      .line_data(vin_data[v]), .line_ack(vin_ack[v])
    );
    video_out u_vout (
      .clk, .rst_n, .line_data(vout_data[v]), .line_ack(vout_ack[v]),
      .sink_ready(vout_ready[v]), .out_valid(vout_valid[v]), .out_pix(vout_pix[v]),
      .out_eol(vout_eol[v]), .lines(vout_lines[v])
    );
  end
endmodule
