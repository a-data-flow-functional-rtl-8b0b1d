// tb_dfp_port_tx: the crossbar loads words whenever the sending part is ready,
// the neighbour acknowledges at random; checks the order of words on the
// lines, the idle code when empty, the driver enable, and full-rate streaming.
module tb_dfp_port_tx;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0, run = 1, load = 0, line_ack = 0;
  word_t word = '0, line_data;
  logic ready, drive;
  int checks = 0, failures = 0;
  word_t q[$];
  int n_got = 0;
  logic random_mode = 1;

  dfp_port_tx dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  always @(negedge clk) if (rst_n && enable) begin
    load = ready && (!random_mode || $urandom_range(0, 1) == 1);
    word = 9'($urandom_range(0, 9'h1FE));
    line_ack = !random_mode || $urandom_range(0, 2) != 0;
    run = !random_mode || $urandom_range(0, 4) != 0;
  end
  always @(posedge clk) begin
    if (rst_n && !run) chk(line_data == IDLE_CODE, "held: no word on the lines");
    if (rst_n && enable && line_ack && line_data != IDLE_CODE) begin
      chk(q.size() > 0 && line_data == q[0], "line order");
      if (q.size() > 0) void'(q.pop_front());
      n_got++;
    end
    if (load) q.push_back(word);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!drive && line_data == IDLE_CODE && !ready, "disabled: idle, not driving");
    enable = 1;
    @(negedge clk);
    chk(drive, "driver enabled");
    repeat (2000) @(negedge clk);
    chk(n_got > 400, "traffic flowed");
    random_mode = 0;
    begin
      int n0;
      repeat (5) @(negedge clk);
      n0 = n_got;
      repeat (100) @(negedge clk);
      chk(n_got - n0 >= 99, "one word per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
