// tb_dfp_fifo: random pushes and pops against a queue model; checks order,
// full at exactly 8 words, empty, simultaneous push/pop when full, and clear.
module tb_dfp_fifo;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [8:0] din = '0, head;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [8:0] q[$];

  dfp_fifo #(.DEPTH(8), .WIDTH(9)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && count == 0, "empty after reset");
    // fill to 8
    for (int i = 0; i < 8; i++) begin
      push = 1; din = 9'(i + 100); @(negedge clk); q.push_back(9'(i + 100));
    end
    push = 0;
    chk(full && count == 8, "full at 8");
    // push and pop while full
    push = 1; pop = 1; din = 9'h55; @(negedge clk); q.push_back(9'h55); void'(q.pop_front());
    push = 0; pop = 0;
    chk(full && head == q[0], "push+pop while full");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      pop  = ($urandom_range(0, 1) == 1) && !empty;
      push = ($urandom_range(0, 1) == 1) && (!full || pop);
      din = 9'($urandom);
      if (!empty) chk(head == q[0], "head order");
      @(negedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
      chk(count == 4'(q.size()), "count");
    end
    clear = 1; @(negedge clk); clear = 0;
    chk(empty && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
