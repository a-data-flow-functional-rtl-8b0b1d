// tb_video_out: a flow of pixel words and end-of-line control words arrives;
// checks the pixel stream, the end-of-line flag on the last pixel of each
// line, the line count, and that the acknowledge follows the sink.
module tb_video_out;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, sink_ready = 0, line_ack, out_valid, out_eol;
  word_t line_data = IDLE_CODE;
  logic [7:0] out_pix;
  logic [15:0] lines;
  int checks = 0, failures = 0;

  video_out dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  logic [8:0] got [$];   // {eol, pixel}
  always @(posedge clk) if (rst_n && out_valid) got.push_back({out_eol, out_pix});

  initial begin
    logic [8:0] exp [$];
    word_t flow [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!line_ack, "no ack while sink not ready");
    for (int l = 0; l < 3; l++) begin
      for (int i = 0; i < 7; i++) begin
        flow.push_back(9'(l * 20 + i));
        exp.push_back({(i == 6), 8'(l * 20 + i)});
      end
      flow.push_back(EOL_WORD);
    end
    sink_ready = 1;
    while (flow.size() > 0) begin
      line_data = ($urandom_range(0, 3) == 0) ? IDLE_CODE : flow[0];
      #1;
      chk(line_ack, "ack follows sink");
      @(negedge clk);
      if (line_data != IDLE_CODE) void'(flow.pop_front());
    end
    line_data = IDLE_CODE;
    repeat (3) @(negedge clk);
    chk(got.size() == exp.size(), "pixel count");
    for (int i = 0; i < exp.size() && i < got.size(); i++) chk(got[i] == exp[i], "pixels and eol");
    chk(lines == 16'd3, "line count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
