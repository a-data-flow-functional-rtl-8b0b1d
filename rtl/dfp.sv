// dfp: one data-flow processor.
//
// Six ports (N, S, E, W, U, D) of 10 bidirectional lines each (9 data, 1
// acknowledge) connect the processor to its neighbours in a 3D mesh. Each port
// has a receiving part and a sending part; its configuration makes it either
// receive (it then drives only its acknowledge line) or send (it then drives
// only its data lines). An input crossbar fills the three input stacks A, B, E
// from any receiving part; an output crossbar feeds any sending part from the
// output stacks C, D, F or, for routing, straight from a receiving part. Between
// the stacks sits the three-stage datapath (decode, 8-bit, 16-bit), with the
// 256 x 9-bit data RAM, under the programmable state machine whose 64 x 32-bit
// program RAM is loaded through the scan chain.
// Each stack is an 8-word synchronous FIFO; a word moves through a port per
// clock, so at 25 MHz a port carries 25 Mbytes/s.
// Structure and sizes follow the document's processor diagram and text; the
// line protocol, configuration encoding and instruction set are this design's
// own (see dfp_pkg).
module dfp
  import dfp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,        // RESET pin (active low here)
  input  logic [3:0] com,     // COM3-0
  input  logic  scan_in,      // SCANA
  output logic  scan_out,     // SCANB
  // ports N S E W U D
  input  word_t p_data_i  [NPORTS],
  output word_t p_data_o  [NPORTS],
  output logic  p_data_oe [NPORTS],
  input  logic  p_ack_i   [NPORTS],
  output logic  p_ack_o   [NPORTS],
  output logic  p_ack_oe  [NPORTS]
);
  logic run, clear;
  logic [2:0] insel [NSTACKS];
  logic [3:0] outsel [NPORTS];
  logic [7:0] k [4];
  logic [5:0] last_pc, jump_pc, pc;
  logic [7:0] plen;

  logic prog_we;
  logic [5:0] prog_addr;
  logic [31:0] prog_wdata, prog_rdata;
  logic dram_we_s, dram_re_s;
  logic [7:0] dram_addr_s;
  word_t dram_wdata_s;

  // ports
  logic  rx_en [NPORTS], tx_en [NPORTS];
  logic  rx_valid [NPORTS], rx_take [NPORTS];
  word_t rx_word [NPORTS];
  logic  tx_ready [NPORTS], tx_load [NPORTS];
  word_t tx_word [NPORTS];

  // stacks
  logic  in_push [NSTACKS], in_pop [NSTACKS], in_empty [NSTACKS], in_full [NSTACKS];
  word_t in_din [NSTACKS], in_head [NSTACKS];
  logic [3:0] in_cnt [NSTACKS];
  logic  out_push [NSTACKS], out_pop [NSTACKS], out_empty [NSTACKS], out_full [NSTACKS];
  word_t out_head [NSTACKS];
  logic [3:0] out_cnt [NSTACKS];

  // datapath
  logic issue;
  dp_cmd_t cmd;
  word_t opa, opb, ope, out_word;
  logic [2:0] dp_push, push_s2, push_s3;
  logic ram_rd_en, ram_we_dp;
  logic [7:0] ram_rd_addr, ram_waddr_dp;
  word_t ram_rdata, ram_wdata_dp;
  logic [15:0] q;

  dfp_scan u_scan (
    .clk, .rst_n, .com, .scan_in, .scan_out, .run, .clear,
    .prog_we, .prog_addr, .prog_wdata, .prog_rdata,
    .dram_we(dram_we_s), .dram_re(dram_re_s), .dram_addr(dram_addr_s),
    .dram_wdata(dram_wdata_s), .dram_rdata(ram_rdata),
    .insel, .outsel, .k, .last_pc, .jump_pc, .plen
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    assign tx_en[p] = (outsel[p] != 4'd0);
    assign rx_en[p] = !tx_en[p] && run;
    dfp_port_rx u_rx (
      .clk, .rst_n, .clear, .enable(rx_en[p]),
      .line_data(p_data_i[p]), .line_ack(p_ack_o[p]),
      .valid(rx_valid[p]), .word(rx_word[p]), .take(rx_take[p])
    );
    dfp_port_tx u_tx (
      .clk, .rst_n, .clear, .enable(tx_en[p]), .run,
      .load(tx_load[p]), .word(tx_word[p]), .ready(tx_ready[p]),
      .line_data(p_data_o[p]), .drive(p_data_oe[p]), .line_ack(p_ack_i[p])
    );
    assign p_ack_oe[p] = !tx_en[p];
  end

  dfp_crossbar u_xbar (
    .run, .insel, .outsel,
    .rx_valid, .rx_word, .rx_take,
    .in_full, .in_push, .in_din,
    .out_empty, .out_head, .out_pop,
    .tx_ready, .tx_load, .tx_word
  );

  for (genvar s = 0; s < NSTACKS; s++) begin : g_stack
    dfp_fifo #(.DEPTH(STACK_DEPTH), .WIDTH(WORD_W)) u_in (
      .clk, .rst_n, .clear, .push(in_push[s]), .din(in_din[s]),
      .pop(in_pop[s]), .head(in_head[s]), .empty(in_empty[s]), .full(in_full[s]),
      .count(in_cnt[s])
    );
    assign out_push[s] = dp_push[s];
    dfp_fifo #(.DEPTH(STACK_DEPTH), .WIDTH(WORD_W)) u_out (
      .clk, .rst_n, .clear, .push(out_push[s]), .din(out_word),
      .pop(out_pop[s]), .head(out_head[s]), .empty(out_empty[s]), .full(out_full[s]),
      .count(out_cnt[s])
    );
  end

  dfp_control u_ctrl (
    .clk, .rst_n, .run, .clear,
    .prog_we, .prog_addr, .prog_wdata, .prog_rdata,
    .k, .last_pc, .jump_pc, .plen,
    .in_empty, .in_head, .in_pop,
    .out_count(out_cnt), .push_s2, .push_s3,
    .issue, .cmd, .opa, .opb, .ope,
    .ram_rd_en, .ram_rd_addr, .pc_o(pc)
  );

  dfp_datapath u_dp (
    .clk, .rst_n, .run, .clear,
    .issue, .cmd, .opa, .opb, .ope,
    .ram_rdata, .ram_we(ram_we_dp), .ram_waddr(ram_waddr_dp), .ram_wdata(ram_wdata_dp),
    .out_push(dp_push), .out_word, .push_s2, .push_s3, .q_o(q)
  );

  // The data RAM is used by the datapath while running, by the scan interface otherwise.
  dfp_data_ram #(.WORDS(DATA_WORDS), .WIDTH(WORD_W)) u_ram (
    .clk,
    .rd_en(run ? ram_rd_en : dram_re_s),
    .rd_addr(run ? ram_rd_addr : dram_addr_s),
    .rd_data(ram_rdata),
    .wr_en(run ? ram_we_dp : dram_we_s),
    .wr_addr(run ? ram_waddr_dp : dram_addr_s),
    .wr_data(run ? ram_wdata_dp : dram_wdata_s)
  );
endmodule
