// dfp_crossbar: the two full crossbars of a DFP.
//
// Input side: each of the three input stacks (A, B, E) takes its words from
// one port receiving part chosen by its configuration (A.CONFIG, B.CONFIG,
// E.CONFIG), or from none. Output side: each of the six port sending parts
// takes its words from one of the three output stacks (C, D, F) or, so that a
// processor can serve as a routing element, directly from one of the six
// receiving parts; its configuration (N.CONFIG ... D.CONFIG) value 0 leaves
// the port receiving.
// One source may feed several consumers (a fork, as when one flow is sent to
// three operators). A word leaves its source only in a clock in which every
// consumer configured on that source can take it, and then all of them take it
// together, so forked flows stay aligned. A source nobody selects is left
// alone. Purely combinational.
// The selectable connections follow the processor diagram; the encoding of the
// configuration fields and the all-consumers-ready fork rule are this design's.
module dfp_crossbar
  import dfp_pkg::*;
(
  input  logic        run,
  input  logic [2:0]  insel  [NSTACKS],  // per input stack: port 0..5, 7 = none
  input  logic [3:0]  outsel [NPORTS],   // per port: 0 receive, 1..3 stack C/D/F, 4..9 port N..D
  // receiving parts
  input  logic        rx_valid [NPORTS],
  input  word_t       rx_word  [NPORTS],
  output logic        rx_take  [NPORTS],
  // input stacks
  input  logic        in_full  [NSTACKS],
  output logic        in_push  [NSTACKS],
  output word_t       in_din   [NSTACKS],
  // output stacks
  input  logic        out_empty [NSTACKS],
  input  word_t       out_head  [NSTACKS],
  output logic        out_pop   [NSTACKS],
  // sending parts
  input  logic        tx_ready [NPORTS],
  output logic        tx_load  [NPORTS],
  output word_t       tx_word  [NPORTS]
);
  localparam int unsigned NSRC = NPORTS + NSTACKS;

  // Source index of each consumer; NSRC means none.
  int unsigned in_src [NSTACKS];
  int unsigned tx_src [NPORTS];
  logic  src_valid [NSRC];
  word_t src_word  [NSRC];
  logic  src_used  [NSRC];
  logic  src_ready [NSRC];
  logic  src_fire  [NSRC];

  always_comb begin
    for (int s = 0; s < NPORTS; s++) begin
      src_valid[s] = rx_valid[s];
      src_word[s]  = rx_word[s];
    end
    for (int s = 0; s < NSTACKS; s++) begin
      src_valid[NPORTS+s] = !out_empty[s];
      src_word[NPORTS+s]  = out_head[s];
    end

    for (int c = 0; c < NSTACKS; c++)
      in_src[c] = (insel[c] < 3'(NPORTS)) ? int'(insel[c]) : NSRC;
    for (int p = 0; p < NPORTS; p++) begin
      if (outsel[p] >= 4'd1 && outsel[p] <= 4'd3)      tx_src[p] = NPORTS + int'(outsel[p]) - 1;
      else if (outsel[p] >= 4'd4 && outsel[p] <= 4'd9) tx_src[p] = int'(outsel[p]) - 4;
      else                                             tx_src[p] = NSRC;
    end

    for (int s = 0; s < NSRC; s++) begin
      src_used[s]  = 1'b0;
      src_ready[s] = 1'b1;
    end
    for (int c = 0; c < NSTACKS; c++)
      if (in_src[c] != NSRC) begin
        src_used[in_src[c]]  = 1'b1;
        src_ready[in_src[c]] = src_ready[in_src[c]] && !in_full[c];
      end
    for (int p = 0; p < NPORTS; p++)
      if (tx_src[p] != NSRC) begin
        src_used[tx_src[p]]  = 1'b1;
        src_ready[tx_src[p]] = src_ready[tx_src[p]] && tx_ready[p];
      end
    for (int s = 0; s < NSRC; s++)
      src_fire[s] = run && src_used[s] && src_ready[s] && src_valid[s];

    for (int s = 0; s < NPORTS; s++)  rx_take[s] = src_fire[s];
    for (int s = 0; s < NSTACKS; s++) out_pop[s] = src_fire[NPORTS+s];

    for (int c = 0; c < NSTACKS; c++) begin
      in_push[c] = (in_src[c] != NSRC) && src_fire[in_src[c]];
      in_din[c]  = (in_src[c] != NSRC) ? src_word[in_src[c]] : '0;
    end
    for (int p = 0; p < NPORTS; p++) begin
      tx_load[p] = (tx_src[p] != NSRC) && src_fire[tx_src[p]];
      tx_word[p] = (tx_src[p] != NSRC) ? src_word[tx_src[p]] : '0;
    end
  end
endmodule
