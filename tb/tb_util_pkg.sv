// tb_util_pkg: helpers shared by the testbenches: building DFP
// microinstructions and 42-bit scan words, and a few canned operator programs.
package tb_util_pkg;
  import dfp_pkg::*;

  function automatic logic [31:0] ui(
    input logic [2:0] pop, input logic [2:0] push,
    input rsel_e rsel, input ssel_e ssel,
    input alu_e alu = ALU_ADD, input post_e post = POST_NONE,
    input logic mul = 1'b0, input logic [1:0] ksel = 2'd0, input logic [1:0] shl = 2'd0,
    input logic [3:0] shr = 4'd0, input logic flag = 1'b0, input logic qwe = 1'b0,
    input logic tag = 1'b0, input ram_mode_e ram = RAM_NONE, input seq_e seq = SEQ_NEXT);
    uinstr_t u;
    u = '0;
    u.pop = pop; u.push = push; u.rsel = rsel; u.ssel = ssel; u.alu = alu; u.post = post;
    u.mul = mul; u.ksel = ksel; u.shl = shl; u.shr = shr; u.flag = flag; u.qwe = qwe;
    u.tag = tag; u.ram = ram; u.seq = seq;
    return 32'(u);
  endfunction

  function automatic logic [SCAN_W-1:0] sw(input scan_tgt_e t, input logic [7:0] a, input logic [31:0] d);
    return {t, a, d};
  endfunction

  // configuration words
  function automatic logic [31:0] cfg_insel(input logic [2:0] a, input logic [2:0] b, input logic [2:0] e);
    return {23'd0, e, b, a};
  endfunction
  function automatic logic [31:0] cfg_outsel(input logic [3:0] n, input logic [3:0] s, input logic [3:0] e,
                                             input logic [3:0] w, input logic [3:0] u, input logic [3:0] d);
    return {8'd0, d, u, w, e, s, n};
  endfunction
  function automatic logic [31:0] cfg_seq(input logic [5:0] last, input logic [5:0] jt, input logic [7:0] plen);
    return {8'd0, plen, 2'd0, jt, 2'd0, last};
  endfunction
endpackage
