// tb_dfp_datapath: issues decoded commands straight into stages 2 and 3 and
// compares each pushed word with a value worked out here: addition with
// clipping, subtraction + absolute value, multiply by a constant and scale,
// max, min, threshold flag, input and output shifts, Q accumulation, control
// word forwarding, histogram read-modify-write with back-to-back hits on one
// bin (forwarding), and a one-word delay line through the RAM. Checks that each
// result is pushed exactly two clocks after its issue.
module tb_dfp_datapath;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, run = 1, clear = 0, issue = 0;
  dp_cmd_t cmd;
  word_t opa = 0, opb = 0, ope = 0, ram_rdata, ram_wdata, out_word;
  logic ram_we;
  logic [7:0] ram_waddr;
  logic [2:0] out_push, push_s2, push_s3;
  logic [15:0] q_o;
  int checks = 0, failures = 0;

  dfp_datapath dut (.*);

  // data RAM model: synchronous read of the address issued with the command
  word_t mem [256];
  always @(posedge clk) begin
    if (issue) ram_rdata <= mem[cmd.ram_addr];
    if (ram_we) mem[ram_waddr] <= ram_wdata;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  word_t exp_q[$];
  longint exp_t[$];
  longint cyc = 0;
  always @(posedge clk) begin
   if (rst_n && out_push != 0) begin
    chk(exp_q.size() > 0, "unexpected push");
    if (exp_q.size() > 0) begin
      if (out_word != exp_q[0]) $display("  got %h want %h", out_word, exp_q[0]);
      chk(out_word == exp_q[0], "result");
      chk(cyc == exp_t[0] + 2, "latency 2");
      void'(exp_q.pop_front()); void'(exp_t.pop_front());
    end
   end
   cyc++;
  end

  function automatic dp_cmd_t base(input alu_e alu, input ssel_e ssel);
    dp_cmd_t c;
    c = '0; c.alu = alu; c.ssel = ssel; c.rsel = R_A; c.push = 3'b001;
    return c;
  endfunction

  task automatic go(input dp_cmd_t c, input word_t a, input word_t b, input word_t expv);
    cmd = c; opa = a; opb = b; issue = 1;
    exp_q.push_back(expv); exp_t.push_back(cyc);
    @(negedge clk);
    issue = 0;
  endtask

  initial begin
    dp_cmd_t c;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    cmd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // add, clipped
    go(base(ALU_ADD, S_B), 9'd100, 9'd50, 9'd150);
    go(base(ALU_ADD, S_B), 9'd200, 9'd200, 9'd255);
    // subtract, clip negative, abs difference
    go(base(ALU_SUBS, S_B), 9'd10, 9'd30, 9'd0);
    c = base(ALU_SUBS, S_B); c.post = POST_ABS;
    go(c, 9'd10, 9'd30, 9'd20);
    go(c, 9'd90, 9'd30, 9'd60);
    // S - R
    go(base(ALU_SUBR, S_B), 9'd10, 9'd30, 9'd20);
    // a * 91 / 128  (1/sqrt2 scaling)
    c = base(ALU_ADD, S_ZERO); c.mul = 1; c.k = 8'd91; c.shr = 4'd7;
    go(c, 9'd200, 9'd0, 9'd142);
    go(c, 9'd255, 9'd0, 9'd181);
    // max and min
    c = base(ALU_ADD, S_B); c.post = POST_MAX;
    go(c, 9'd10, 9'd30, 9'd30);
    c.post = POST_MIN;
    go(c, 9'd10, 9'd30, 9'd10);
    // threshold with K
    c = base(ALU_SUBS, S_K); c.k = 8'd100; c.flag = 1;
    go(c, 9'd120, 9'd0, 9'd1);
    go(c, 9'd100, 9'd0, 9'd0);
    // input shift and output shift
    c = base(ALU_ADD, S_ZERO); c.shl = 2'd3;
    go(c, 9'd7, 9'd0, 9'd56);
    c = base(ALU_ADD, S_B); c.shr = 4'd1;
    go(c, 9'd201, 9'd101, 9'd151);
    // logic ops
    go(base(ALU_AND, S_B), 9'hF0, 9'h3C, 9'h030);
    go(base(ALU_EXOR, S_B), 9'hF0, 9'h3C, 9'h0CC);
    // control word forwarding with output tag
    c = base(ALU_ADD, S_B); c.pass = 1;
    go(c, 9'h1AB, 9'd5, 9'h1AB);
    c = base(ALU_ADD, S_ZERO); c.tag = 1;
    go(c, 9'd3, 9'd0, 9'h103);
    // accumulate in Q: back-to-back
    c = base(ALU_ADD, S_Q); c.qwe = 1;
    begin
      int acc = 0;
      for (int i = 1; i <= 10; i++) begin
        acc += i * 3;
        go(c, 9'(i * 3), 9'd0, word_t'((acc > 255) ? 255 : acc));
      end
      repeat (3) @(negedge clk);
      chk(q_o == 16'(acc), "Q holds the sum");
    end
    // histogram: R = RAM word, S = K(1), write result back, no push
    c = base(ALU_ADD, S_K); c.rsel = R_RAM; c.k = 8'd1; c.ram_we = 1; c.push = 3'b000;
    begin
      int h [4] = '{0, 0, 0, 0};
      int pix [12] = '{2, 2, 2, 1, 3, 2, 1, 1, 0, 2, 3, 2};
      for (int i = 0; i < 12; i++) begin
        c.ram_addr = 8'(pix[i]); cmd = c; issue = 1; h[pix[i]]++;
        @(negedge clk);
      end
      issue = 0;
      repeat (4) @(negedge clk);
      for (int b = 0; b < 4; b++) chk(mem[b] == 9'(h[b]), "histogram bin");
    end
    // one-word delay line: RAM[0] read then overwritten with the A word
    for (int i = 0; i < 256; i++) mem[i] = '0;
    c = base(ALU_ADD, S_ZERO); c.rsel = R_RAM; c.ram_we = 1; c.ram_wr_a = 1; c.ram_addr = 8'd0;
    go(c, 9'd11, 9'd0, 9'd0);
    go(c, 9'd22, 9'd0, 9'd11);
    go(c, EOL_WORD, 9'd0, 9'd22);
    go(c, 9'd33, 9'd0, EOL_WORD);
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, "all results arrived");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
