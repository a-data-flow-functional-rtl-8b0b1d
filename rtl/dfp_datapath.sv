// dfp_datapath: stages 2 and 3 of the DFP pipeline (stage 1, decode, is in
// dfp_control).
//
// Stage 2 does the 8-bit operations: it selects the R operand (an input stack
// head or the data RAM word) and the S operand (stack head, constant K, RAM
// word or zero), then either multiplies R by the 8-bit constant K (unsigned,
// 16-bit product) or shifts R left by 0..3.
// Stage 3 does the 16-bit operations: a 2901-type ALU (R+S, S-R, R-S, OR, AND,
// NOT R AND S, XOR, XNOR; S may also be the Q register, as in the 2901), then
// absolute value, or minimum/maximum of R and S, then an arithmetic right
// shift by 0..15. The 8-bit output word is the result clipped to 0..255, or
// with `flag` the comparison "result > 0" (a threshold). Q can be loaded with
// the result (sums, accumulations). The result can be written back to the
// data RAM (histograms), or the stack-A word can be (delay lines); the result
// is pushed to every output stack in the push mask. A control word as R
// operand, from a stack or read from the data RAM, is forwarded as it came.
// One instruction enters per clock, so with the multiply of stage 2 and the
// ALU of stage 3 the datapath does two operations per pixel per clock.
// A RAM word read by an instruction is forwarded from the two writes that are
// still in flight when the RAM is read, so back-to-back updates of one
// histogram bin count correctly.
// Stage contents follow the document; operand choices, clipping and the
// forwarding are this design's own.
module dfp_datapath
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        clear,
  // from the decode stage
  input  logic        issue,
  input  dp_cmd_t     cmd,
  input  word_t       opa, opb, ope,
  // data RAM
  input  word_t       ram_rdata,
  output logic        ram_we,
  output logic [7:0]  ram_waddr,
  output word_t       ram_wdata,
  // output stacks C D F
  output logic [2:0]  out_push,
  output word_t       out_word,
  // in-flight pushes for the firing rule
  output logic [2:0]  push_s2,
  output logic [2:0]  push_s3,
  output logic [15:0] q_o
);
  // stage-2 registers
  logic    v2;
  dp_cmd_t c2;
  word_t   a2, b2, e2;
  // stage-3 registers
  logic    v3;
  dp_cmd_t c3;
  word_t   rword3, aword3;
  logic    pass3;
  logic signed [15:0] r3, s3;
  // last RAM write (the one made at the clock edge of the stage-2 read)
  logic       lw_v;
  logic [7:0] lw_addr;
  word_t      lw_data;

  logic signed [15:0] q;
  word_t ramv, rword2, sword2;
  logic  pass2;
  logic signed [15:0] r16, s16, alu_f, post_f, res;
  logic [7:0] obyte;
  word_t ram_wd3;

  // ---------------- stage 2 ----------------
  always_comb begin
    ramv = ram_rdata;
    if (lw_v && lw_addr == c2.ram_addr) ramv = lw_data;
    if (v3 && c3.ram_we && c3.ram_addr == c2.ram_addr) ramv = ram_wd3;

    unique case (c2.rsel)
      R_A:     rword2 = a2;
      R_B:     rword2 = b2;
      R_E:     rword2 = e2;
      default: rword2 = ramv;
    endcase
    unique case (c2.ssel)
      S_A:     sword2 = a2;
      S_B:     sword2 = b2;
      S_E:     sword2 = e2;
      S_K:     sword2 = {1'b0, c2.k};
      S_RAM:   sword2 = ramv;
      default: sword2 = '0;
    endcase
    if (c2.mul) r16 = signed'({8'd0, rword2[7:0]} * {8'd0, c2.k});
    else        r16 = signed'(16'({8'd0, rword2[7:0]} << c2.shl));
    s16 = signed'({8'd0, sword2[7:0]});
    pass2 = c2.pass || (c2.rsel == R_RAM && rword2[8]);
  end

  // ---------------- stage 3 ----------------
  always_comb begin
    logic signed [15:0] sop;
    sop = (c3.ssel == S_Q) ? q : s3;
    unique case (c3.alu)
      ALU_ADD:   alu_f = r3 + sop;
      ALU_SUBR:  alu_f = sop - r3;
      ALU_SUBS:  alu_f = r3 - sop;
      ALU_OR:    alu_f = r3 | sop;
      ALU_AND:   alu_f = r3 & sop;
      ALU_NOTRS: alu_f = ~r3 & sop;
      ALU_EXOR:  alu_f = r3 ^ sop;
      default:   alu_f = ~(r3 ^ sop);
    endcase
    unique case (c3.post)
      POST_ABS: post_f = (alu_f < 0) ? -alu_f : alu_f;
      POST_MIN: post_f = (r3 < sop) ? r3 : sop;
      POST_MAX: post_f = (r3 > sop) ? r3 : sop;
      default:  post_f = alu_f;
    endcase
    res = post_f >>> c3.shr;
    if (c3.flag)          obyte = (res > 0) ? 8'd1 : 8'd0;
    else if (res < 0)     obyte = 8'd0;
    else if (res > 255)   obyte = 8'd255;
    else                  obyte = res[7:0];
    out_word = pass3 ? rword3 : {c3.tag, obyte};
    out_push = (v3 && run) ? c3.push : 3'b000;
    ram_wd3  = c3.ram_wr_a ? aword3 : word_t'(post_f[8:0]);
    ram_we   = v3 && run && c3.ram_we;
    ram_waddr = c3.ram_addr;
    ram_wdata = ram_wd3;
  end

  assign push_s2 = v2 ? c2.push : 3'b000;
  assign push_s3 = v3 ? c3.push : 3'b000;
  assign q_o = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; v3 <= 1'b0; q <= '0; lw_v <= 1'b0;
      c2 <= '0; c3 <= '0; a2 <= '0; b2 <= '0; e2 <= '0;
      r3 <= '0; s3 <= '0; rword3 <= '0; aword3 <= '0; pass3 <= 1'b0;
      lw_addr <= '0; lw_data <= '0;
    end else if (clear) begin
      v2 <= 1'b0; v3 <= 1'b0; q <= '0; lw_v <= 1'b0;
    end else if (run) begin
      v2 <= issue;
      if (issue) begin
        c2 <= cmd; a2 <= opa; b2 <= opb; e2 <= ope;
      end
      v3 <= v2;
      if (v2) begin
        c3 <= c2; r3 <= r16; s3 <= s16; rword3 <= rword2; aword3 <= a2; pass3 <= pass2;
      end
      if (v3 && c3.qwe && !pass3) q <= post_f;
      lw_v    <= ram_we;
      lw_addr <= ram_waddr;
      lw_data <= ram_wdata;
    end
  end
endmodule
