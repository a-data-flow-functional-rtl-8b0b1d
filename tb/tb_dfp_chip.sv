// tb_dfp_chip: a biprocessor chip programmed through its two-processor scan
// chain. Processor 0 routes its W port up through the internal coupling link
// (its U port to processor 1's D port); processor 1 adds the constant K0 to
// each word and sends the result out of its E port. Checks the results, that
// control words pass through, and that the internal link entries stay silent
// on the chip pins.
module tb_dfp_chip;
  import dfp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, scan_in = 0, scan_out;
  logic [3:0] com = COM_HOLD;
  word_t p_data_i [2][NPORTS], p_data_o [2][NPORTS];
  logic p_data_oe [2][NPORTS], p_ack_i [2][NPORTS], p_ack_o [2][NPORTS], p_ack_oe [2][NPORTS];
  int checks = 0, failures = 0;

  dfp_chip dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  word_t src [$], got [$];
  always @(negedge clk) begin
    for (int c = 0; c < 2; c++) for (int p = 0; p < NPORTS; p++) begin
      p_data_i[c][p] = IDLE_CODE; p_ack_i[c][p] = 1'b1;
    end
    p_data_i[0][P_W] = (src.size() > 0) ? src[0] : IDLE_CODE;
  end
  always @(posedge clk) if (rst_n) begin
    if (src.size() > 0 && p_ack_oe[0][P_W] && p_ack_o[0][P_W]) void'(src.pop_front());
    if (p_data_oe[1][P_E] && p_data_o[1][P_E] != IDLE_CODE) got.push_back(p_data_o[1][P_E]);
  end

  // one word for each processor: processor 1's word is shifted first
  task automatic chain_write(input logic [SCAN_W-1:0] w0, input logic [SCAN_W-1:0] w1);
    logic [2*SCAN_W-1:0] w;
    w = {w1, w0};
    com = COM_SHIFT;
    for (int i = 2*SCAN_W - 1; i >= 0; i--) begin scan_in = w[i]; @(negedge clk); end
    com = COM_WRITE; @(negedge clk);
    com = COM_HOLD;
  endtask

  initial begin
    word_t exp [$];
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chain_write(sw(TGT_CFG, CFG_OUTSEL, cfg_outsel(4'd0, 4'd0, 4'd0, 4'd0, 4'd4 + 4'(P_W), 4'd0)),
                sw(TGT_CFG, CFG_OUTSEL, cfg_outsel(4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0)));
    chain_write(sw(TGT_NONE, 8'd0, 32'd0), sw(TGT_CFG, CFG_INSEL, cfg_insel(3'(P_D), 3'd7, 3'd7)));
    chain_write(sw(TGT_NONE, 8'd0, 32'd0), sw(TGT_CFG, CFG_K, 32'd7));
    chain_write(sw(TGT_NONE, 8'd0, 32'd0), sw(TGT_CFG, CFG_SEQ, cfg_seq(6'd0, 6'd0, 8'd0)));
    chain_write(sw(TGT_NONE, 8'd0, 32'd0), sw(TGT_PROG, 8'd0, ui(3'b001, 3'b001, R_A, S_K)));
    chk(!p_data_oe[0][P_U] && !p_ack_oe[0][P_U] && !p_data_oe[1][P_D] && !p_ack_oe[1][P_D], "internal link not on pins");
    for (int i = 0; i < 50; i++) begin
      word_t x;
      x = (i % 10 == 9) ? EOL_WORD : 9'($urandom_range(0, 255));
      src.push_back(x);
      exp.push_back(x[8] ? x : 9'((x + 7 > 255) ? 255 : x + 7));
    end
    com = COM_RUN;
    n = 0;
    while (got.size() < 50 && n < 500) begin @(negedge clk); n++; end
    com = COM_HOLD;
    chk(got.size() == 50, "all words through the chip");
    for (int i = 0; i < 50 && i < got.size(); i++) chk(got[i] == exp[i], "x + K0 through both processors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
