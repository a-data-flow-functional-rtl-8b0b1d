// tb_dfp_control: loads small programs into the program RAM and checks the
// firing rule (waits for empty input stacks and for output-stack room,
// counting words in flight), the decode of control words, the four sequencing
// modes, the wrap at LAST, the delay-line pointer wrapping at PLEN, the
// histogram address and the constant selection.
module tb_dfp_control;
  import dfp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, clear = 0, prog_we = 0;
  logic [5:0] prog_addr = 0, last_pc = 0, jump_pc = 0, pc_o;
  logic [31:0] prog_wdata = 0, prog_rdata;
  logic [7:0] k [4];
  logic [7:0] plen = 0;
  logic in_empty [NSTACKS], in_pop [NSTACKS];
  word_t in_head [NSTACKS];
  logic [3:0] out_count [NSTACKS];
  logic [2:0] push_s2 = 0, push_s3 = 0;
  logic issue, ram_rd_en;
  dp_cmd_t cmd;
  word_t opa, opb, ope;
  logic [7:0] ram_rd_addr;
  int checks = 0, failures = 0;

  dfp_control dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t (pc %0d)", m, $time, pc_o); end
  endtask
  task automatic load(input int a, input logic [31:0] w);
    prog_we = 1; prog_addr = 6'(a); prog_wdata = w; @(negedge clk); prog_we = 0;
  endtask
  task automatic restart();
    clear = 1; @(negedge clk); clear = 0;
  endtask

  initial begin
    k[0] = 8'd10; k[1] = 8'd20; k[2] = 8'd30; k[3] = 8'd40;
    for (int i = 0; i < NSTACKS; i++) begin in_empty[i] = 1; in_head[i] = '0; out_count[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // program: 0: pop A,B push C (A+B, K2); 1: pop A push D, tag-jump; 2: jump
    load(0, ui(3'b011, 3'b001, R_A, S_B, .ksel(2'd2)));
    load(1, ui(3'b001, 3'b010, R_A, S_ZERO, .seq(SEQ_TAGJ)));
    load(2, ui(3'b000, 3'b000, R_A, S_ZERO, .seq(SEQ_JUMP)));
    load(3, ui(3'b100, 3'b100, R_E, S_ZERO, .seq(SEQ_UNTIL)));
    load(4, ui(3'b001, 3'b000, R_RAM, S_K, .ram(RAM_HIST)));
    load(5, ui(3'b001, 3'b001, R_RAM, S_ZERO, .ram(RAM_LINE), .seq(SEQ_JUMP)));
    prog_addr = 6'd3; #1;
    chk(prog_rdata == ui(3'b100, 3'b100, R_E, S_ZERO, .seq(SEQ_UNTIL)), "program readback");
    last_pc = 6'd4; jump_pc = 6'd3; plen = 8'd3;
    run = 1;
    #1;
    chk(!issue && pc_o == 0, "waits for A and B");
    in_empty[0] = 0; in_head[0] = 9'd5;
    #1;
    chk(!issue, "still waits for B");
    in_empty[1] = 0; in_head[1] = 9'd6;
    out_count[0] = 4'd7; push_s3 = 3'b001;
    #1;
    chk(!issue, "waits: C full counting in-flight word");
    push_s3 = 0;
    #1;
    chk(issue && in_pop[0] && in_pop[1] && !in_pop[2] && cmd.push == 3'b001 && cmd.k == 8'd30 && !cmd.pass,
        "fires with room");
    chk(opa == 9'd5 && opb == 9'd6, "operands are the heads");
    @(negedge clk);
    chk(pc_o == 1, "next pc");
    in_empty[1] = 1; out_count[0] = 0;
    in_head[0] = 9'd7;
    @(negedge clk);
    chk(pc_o == 2, "no tag: pc+1");
    @(negedge clk);
    chk(pc_o == 3, "jump to JT");
    // instruction 3 repeats until E head is a control word
    in_empty[2] = 0; in_head[2] = 9'd1;
    repeat (3) @(negedge clk);
    chk(pc_o == 3, "repeat until control word");
    in_head[2] = EOL_WORD;
    #1;
    chk(issue && cmd.pass, "control word decoded as pass");
    @(negedge clk);
    chk(pc_o == 4, "leaves after control word");
    // histogram address = A head byte
    in_head[0] = 9'd77;
    #1;
    chk(ram_rd_en && ram_rd_addr == 8'd77 && cmd.ram_we && !cmd.ram_wr_a, "histogram address");
    @(negedge clk);
    chk(pc_o == 0, "wrap after LAST");
    // tag jump: back at 1 with a control word at A
    in_empty[1] = 0;
    @(negedge clk);
    in_head[0] = EOL_WORD;
    @(negedge clk);
    chk(pc_o == 3, "tag jump to JT");
    // delay line pointer: run instruction 5 repeatedly (jump target 5)
    run = 0;
    restart();
    load(0, ui(3'b001, 3'b001, R_RAM, S_ZERO, .ram(RAM_LINE), .seq(SEQ_JUMP)));
    jump_pc = 6'd0;
    in_head[0] = 9'd3;
    run = 1;
    for (int i = 0; i < 7; i++) begin
      #1;
      chk(issue && ram_rd_addr == 8'(i % 3) && cmd.ram_wr_a, "pointer wraps at PLEN");
      @(negedge clk);
    end
    run = 0;
    #1;
    chk(!issue && !in_pop[0], "held: no firing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
