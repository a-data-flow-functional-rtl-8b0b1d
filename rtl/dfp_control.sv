// dfp_control: the DFP's programmable state machine and firing rule, which is
// also the first (decode) stage of the datapath pipeline.
//
// The program is up to 64 microinstructions of 32 bits (dfp_pkg::uinstr_t) in
// a program RAM loaded through the scan interface. In each clock in which the
// processor runs, the instruction at `pc` fires when every input stack it
// pops holds a word and every output stack it pushes will have room when its
// result arrives two clocks later (words already in flight in stages 2 and 3
// are counted). That is the local, data-driven firing rule: there is no other
// control. When it fires, the stack heads are popped and handed to the
// datapath, the data RAM read is issued, and the instruction's command is
// decoded: a control word (type bit set) as R operand turns the command into
// "forward this word unchanged", with no Q or RAM write. A delay-line
// instruction delays only the data words of stack A through the data RAM; a
// control word at the head of stack A is forwarded at once, so a delayed flow
// keeps its line markers where the undelayed flows have them. The sequencer then
// picks the next pc (next, jump, or repeat-until-control-word).
// It also keeps the data RAM pointer P, used when the RAM serves as a delay
// line (it wraps at PLEN) or as a table. Some command bits (the selected
// constant K, the program RAM readback) are inputs selected onto outputs, with
// no logic of their own.
// The 64 x 32-bit program RAM, the firing rule and the decode stage follow the
// document; the instruction layout and the sequencing options are this
// design's own.
module dfp_control
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        clear,
  // program RAM write port (scan interface)
  input  logic        prog_we,
  input  logic [5:0]  prog_addr,
  input  logic [31:0] prog_wdata,
  output logic [31:0] prog_rdata,
  // configuration
  input  logic [7:0]  k [4],
  input  logic [5:0]  last_pc,
  input  logic [5:0]  jump_pc,
  input  logic [7:0]  plen,       // delay length, 0 means 256
  // input stacks A B E
  input  logic        in_empty [NSTACKS],
  input  word_t       in_head  [NSTACKS],
  output logic        in_pop   [NSTACKS],
  // output stacks C D F
  input  logic [3:0]  out_count [NSTACKS],
  input  logic [2:0]  push_s2,    // push masks in flight in stages 2 and 3
  input  logic [2:0]  push_s3,
  // issue to the datapath
  output logic        issue,
  output dp_cmd_t     cmd,
  output word_t       opa, opb, ope,
  output logic        ram_rd_en,
  output logic [7:0]  ram_rd_addr,
  output logic [5:0]  pc_o
);
  logic [31:0] prog [PROG_WORDS];
  logic [5:0]  pc, pc_next;
  logic [7:0]  ptr;
  uinstr_t     ui;
  logic        can_pop, can_push, rtag, ptr_adv, line_tag;

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end
  assign prog_rdata = prog[prog_addr];
  assign ui = uinstr_t'(prog[pc]);
  assign pc_o = pc;

  always_comb begin
    can_pop = 1'b1;
    for (int i = 0; i < NSTACKS; i++)
      if (ui.pop[i] && in_empty[i]) can_pop = 1'b0;
    can_push = 1'b1;
    for (int i = 0; i < NSTACKS; i++)
      if (ui.push[i] &&
          (5'(out_count[i]) + 5'(push_s2[i]) + 5'(push_s3[i]) >= 5'(STACK_DEPTH)))
        can_push = 1'b0;
    issue = run && can_pop && can_push;

    line_tag = (ui.ram == RAM_LINE) && in_head[0][8];
    unique case (ui.rsel)
      R_A:     rtag = in_head[0][8];
      R_B:     rtag = in_head[1][8];
      R_E:     rtag = in_head[2][8];
      default: rtag = line_tag;
    endcase

    for (int i = 0; i < NSTACKS; i++) in_pop[i] = issue && ui.pop[i];
    opa = in_head[0];
    opb = in_head[1];
    ope = in_head[2];

    // decode stage
    cmd.pass     = rtag;
    cmd.tag      = ui.tag;
    cmd.qwe      = ui.qwe && !rtag;
    cmd.flag     = ui.flag;
    cmd.shr      = ui.shr;
    cmd.post     = ui.post;
    cmd.alu      = ui.alu;
    cmd.shl      = ui.shl;
    cmd.mul      = ui.mul;
    cmd.k        = k[ui.ksel];
    cmd.ssel     = ui.ssel;
    cmd.rsel     = line_tag ? R_A : ui.rsel;
    cmd.push     = ui.push;
    cmd.ram_we   = !rtag && (ui.ram == RAM_LINE || ui.ram == RAM_HIST);
    cmd.ram_wr_a = (ui.ram == RAM_LINE);
    cmd.ram_addr = (ui.ram == RAM_HIST) ? in_head[0][7:0] : ptr;
    ram_rd_en    = issue && (ui.ram != RAM_NONE);
    ram_rd_addr  = cmd.ram_addr;
    ptr_adv      = issue && !rtag && (ui.ram == RAM_LINE || ui.ram == RAM_TABLE);

    unique case (ui.seq)
      SEQ_NEXT:  pc_next = (pc == last_pc) ? 6'd0 : pc + 6'd1;
      SEQ_TAGJ:  pc_next = rtag ? jump_pc : ((pc == last_pc) ? 6'd0 : pc + 6'd1);
      SEQ_JUMP:  pc_next = jump_pc;
      SEQ_UNTIL: pc_next = !rtag ? pc : ((pc == last_pc) ? 6'd0 : pc + 6'd1);
      default:   pc_next = pc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      ptr <= '0;
    end else if (clear) begin
      pc  <= '0;
      ptr <= '0;
    end else if (issue) begin
      pc <= pc_next;
      if (ptr_adv) ptr <= (ptr + 8'd1 == plen) ? 8'd0 : ptr + 8'd1;
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    issue |-> !((ui.pop[0] && in_empty[0]) || (ui.pop[1] && in_empty[1]) || (ui.pop[2] && in_empty[2])));
endmodule
