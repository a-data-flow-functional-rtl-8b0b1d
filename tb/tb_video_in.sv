// tb_video_in: a camera sends lines of pixels at one pixel per clock; checks
// the flow on the lines (pixels, then an end-of-line control word after each
// line), that a stalled network makes the FIFO overflow and pixels be counted
// as lost, and that no word is lost while the network keeps up.
module tb_video_in;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, pix_valid = 0, pix_eol = 0, line_ack = 0, overflow;
  logic [7:0] pix = 0;
  logic [15:0] lost;
  word_t line_data;
  int checks = 0, failures = 0;

  video_in dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  word_t got [$];
  always @(posedge clk) if (rst_n && line_ack && line_data != IDLE_CODE) got.push_back(line_data);

  initial begin
    word_t exp [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    line_ack = 1;
    // 4 lines of 12 pixels, continuous; the network mostly keeps up
    for (int l = 0; l < 4; l++)
      for (int i = 0; i < 12; i++) begin
        pix_valid = 1; pix = 8'(l * 16 + i); pix_eol = (i == 11);
        exp.push_back({1'b0, pix});
        if (i == 11) exp.push_back(EOL_WORD);
        @(negedge clk);
      end
    pix_valid = 0; pix_eol = 0;
    repeat (20) @(negedge clk);
    chk(got.size() == exp.size(), "all words");
    for (int i = 0; i < exp.size() && i < got.size(); i++) chk(got[i] == exp[i], "flow order");
    chk(!overflow && lost == 0, "no overflow");
    // stalled network: 30 pixels into a 16-entry FIFO
    line_ack = 0;
    for (int i = 0; i < 30; i++) begin
      pix_valid = 1; pix = 8'(i); pix_eol = 0; @(negedge clk);
    end
    pix_valid = 0;
    chk(overflow && lost == 16'd14, "overflow counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
