// lowbw_io_if: low-bandwidth I/O interface between the host system bus and the
// processor network.
//
// It lets the host feed a data flow into the network and read one out, at
// host speed. Host words written to TXDATA wait in a FIFO and are sent on the
// lines of one network port, like a processor's sending part; words that a
// second network port delivers are received (acknowledge high while there is
// room) into another FIFO that the host reads from RXDATA.
// Host registers (word addresses, BASE + n):
//   0  TXDATA  write [8:0]: one word (bit 8 = control word)
//   1  RXDATA  read: {valid, 22'b0, word}; a read with valid set pops the word
//   2  STATUS  read: [4:0] TX words waiting, [12:8] RX words waiting
// Words on the lines use the processor port protocol of dfp_pkg. The block's
// role is the document's; the FIFO depths and register map are this design's.
module lowbw_io_if
  import dfp_pkg::*;
#(
  parameter logic [7:0]  BASE  = 8'h10,
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  hb_addr,
  input  logic        hb_we,
  input  logic        hb_re,
  input  logic [31:0] hb_wdata,
  output logic [31:0] hb_rdata,
  // to the network (sending)
  output word_t       tx_data,
  input  logic        tx_ack,
  // from the network (receiving)
  input  word_t       rx_data,
  output logic        rx_ack
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic  sel;
  logic  tx_empty, tx_full, rx_empty, rx_full, tx_sent, rx_take, tx_push, rx_pop;
  word_t tx_head, rx_head;
  logic [CW-1:0] tx_cnt, rx_cnt;

  assign sel     = (hb_addr[7:2] == BASE[7:2]);
  assign tx_push = sel && hb_we && hb_addr[1:0] == 2'd0 && !tx_full && hb_wdata[8:0] != IDLE_CODE;
  assign rx_pop  = sel && hb_re && hb_addr[1:0] == 2'd1 && !rx_empty;

  assign tx_data = tx_empty ? IDLE_CODE : tx_head;
  assign tx_sent = !tx_empty && tx_ack;
  assign rx_ack  = !rx_full;
  assign rx_take = rx_ack && rx_data != IDLE_CODE;

  dfp_fifo #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_tx (
    .clk, .rst_n, .clear(1'b0), .push(tx_push), .din(hb_wdata[8:0]),
    .pop(tx_sent), .head(tx_head), .empty(tx_empty), .full(tx_full), .count(tx_cnt)
  );
  dfp_fifo #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_rx (
    .clk, .rst_n, .clear(1'b0), .push(rx_take), .din(rx_data),
    .pop(rx_pop), .head(rx_head), .empty(rx_empty), .full(rx_full), .count(rx_cnt)
  );

  always_comb begin
    hb_rdata = '0;
    if (sel)
      unique case (hb_addr[1:0])
        2'd1: hb_rdata = {!rx_empty, 22'd0, rx_head};
        2'd2: hb_rdata = {16'd0, 3'd0, 5'(rx_cnt), 3'd0, 5'(tx_cnt)};
        default: hb_rdata = '0;
      endcase
  end
endmodule
