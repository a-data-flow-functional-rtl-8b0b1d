// tb_lowbw_io_if: the host writes words that leave on the sending lines in
// order (with a stalling receiver), and words arriving on the receiving lines
// are read back by the host in order; checks status counts and the
// acknowledge dropping when the receive FIFO is full.
module tb_lowbw_io_if;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, hb_we = 0, hb_re = 0, tx_ack = 0, rx_ack;
  logic [7:0] hb_addr = 0;
  logic [31:0] hb_wdata = 0, hb_rdata;
  word_t tx_data, rx_data = IDLE_CODE;
  int checks = 0, failures = 0;

  lowbw_io_if dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    hb_addr = a; hb_wdata = d; hb_we = 1; @(negedge clk); hb_we = 0;
  endtask

  word_t got [$];
  always @(posedge clk) if (rst_n && tx_ack && tx_data != IDLE_CODE) got.push_back(tx_data);

  initial begin
    word_t sent [$];
    logic [31:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(tx_data == IDLE_CODE, "idle lines");
    for (int i = 0; i < 10; i++) begin
      word_t w;
      w = (i == 5) ? EOL_WORD : 9'(i * 13);
      wr(8'h10, 32'(w)); sent.push_back(w);
    end
    hb_addr = 8'h12; #1;
    chk(hb_rdata[4:0] == 5'd10, "TX count");
    for (int i = 0; i < 60 && got.size() < 10; i++) begin
      tx_ack = ($urandom_range(0, 1) == 1); @(negedge clk);
    end
    tx_ack = 0;
    chk(got.size() == 10, "all TX words sent");
    for (int i = 0; i < 10 && i < got.size(); i++) chk(got[i] == sent[i], "TX order");
    // receive 20 words; FIFO holds 16
    for (int i = 0; i < 20; i++) begin
      rx_data = 9'(i + 40);
      if (i >= 16) chk(!rx_ack, "ack low when RX full");
      @(negedge clk);
    end
    rx_data = IDLE_CODE;
    hb_addr = 8'h12; #1;
    chk(hb_rdata[12:8] == 5'd16, "RX count");
    for (int i = 0; i < 16; i++) begin
      hb_addr = 8'h11; hb_re = 1; #1;
      r = hb_rdata;
      chk(r[31] && r[8:0] == 9'(i + 40), "RX order");
      @(negedge clk);
    end
    hb_re = 0; hb_addr = 8'h11; #1;
    chk(!hb_rdata[31], "RX empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
