// tb_dfp_port_rx: a neighbour sends words on the data lines (with idle gaps)
// while the consumer takes them at random; checks order, that nothing is taken
// while the acknowledge is low, that the acknowledge drops with two words
// waiting, and that a stream of one word per clock passes at full rate.
module tb_dfp_port_rx;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, take = 0;
  word_t line_data = IDLE_CODE, word;
  logic line_ack, valid;
  int checks = 0, failures = 0;
  word_t sent[$];
  int n_sent = 0, n_recv = 0;

  dfp_port_rx dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // sender: offers a word, keeps it on the lines until acknowledged
  word_t cur; logic have = 0; logic sending = 0; logic random_mode = 1;
  always @(negedge clk) if (rst_n && sending) begin
    if (!have && (!random_mode || $urandom_range(0, 2) != 0)) begin
      cur = 9'($urandom_range(0, 9'h1FE)); have = 1;
    end
    line_data = have ? cur : IDLE_CODE;
  end
  always @(posedge clk) if (rst_n && have && line_ack && line_data != IDLE_CODE) begin
    sent.push_back(cur); have <= 0; n_sent++;
  end
  // consumer
  always @(negedge clk) take = valid && (!random_mode || $urandom_range(0, 1) == 1);
  always @(posedge clk) if (take) begin
    chk(sent.size() > 0 && word == sent[0], "order");
    if (sent.size() > 0) void'(sent.pop_front());
    n_recv++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!line_ack, "no ack while disabled");
    enable = 1;
    sending = 1;
    repeat (2000) @(negedge clk);
    chk(n_recv > 500, "random traffic flowed");
    // fill: consumer stops, acknowledge must drop after two words
    random_mode = 0;
    force take = 1'b0;
    repeat (10) @(negedge clk);
    chk(!line_ack && valid, "ack low when two words wait");
    release take;
    // full rate stream
    begin
      int n0;
      repeat (5) @(negedge clk);
      n0 = n_recv;
      repeat (100) @(negedge clk);
      chk(n_recv - n0 >= 99, "one word per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
