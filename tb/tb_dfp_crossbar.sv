// tb_dfp_crossbar: checks the input-stack selection, stack-to-port and
// port-to-port (route-through) connections, the fork rule (a word leaves only
// when all its consumers are ready, and then all take it), unselected sources
// left alone, and that nothing moves when the processor is held.
module tb_dfp_crossbar;
  import dfp_pkg::*;
  logic run;
  logic [2:0] insel [NSTACKS];
  logic [3:0] outsel [NPORTS];
  logic rx_valid [NPORTS], rx_take [NPORTS];
  word_t rx_word [NPORTS];
  logic in_full [NSTACKS], in_push [NSTACKS];
  word_t in_din [NSTACKS];
  logic out_empty [NSTACKS], out_pop [NSTACKS];
  word_t out_head [NSTACKS];
  logic tx_ready [NPORTS], tx_load [NPORTS];
  word_t tx_word [NPORTS];
  int checks = 0, failures = 0;

  dfp_crossbar dut (.*);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    run = 1;
    for (int p = 0; p < NPORTS; p++) begin
      rx_valid[p] = 1; rx_word[p] = 9'(p + 16); tx_ready[p] = 1; outsel[p] = 0;
    end
    for (int s = 0; s < NSTACKS; s++) begin
      in_full[s] = 0; out_empty[s] = 0; out_head[s] = 9'(s + 64); insel[s] = 3'd7;
    end
    #1;
    for (int p = 0; p < NPORTS; p++) chk(!rx_take[p], "unselected sources left alone");
    for (int s = 0; s < NSTACKS; s++) chk(!in_push[s] && !out_pop[s], "nothing moves unconfigured");

    // A <- W, B <- U, E <- W (fork of W into two stacks)
    insel[0] = 3'(P_W); insel[1] = 3'(P_U); insel[2] = 3'(P_W);
    #1;
    chk(in_push[0] && in_din[0] == 9'(P_W + 16), "A from W");
    chk(in_push[1] && in_din[1] == 9'(P_U + 16), "B from U");
    chk(in_push[2] && in_din[2] == 9'(P_W + 16), "E from W");
    chk(rx_take[P_W] && rx_take[P_U] && !rx_take[P_N], "takes");
    in_full[2] = 1;
    #1;
    chk(!in_push[0] && !in_push[2] && !rx_take[P_W], "fork waits for full consumer");
    chk(in_push[1] && rx_take[P_U], "other source unaffected");
    in_full[2] = 0;

    // ports: E sends stack C, S sends stack F, N routes from W, D routes from W too
    outsel[P_E] = 4'd1; outsel[P_S] = 4'd3; outsel[P_N] = 4'd4 + 4'(P_W); outsel[P_D] = 4'd4 + 4'(P_W);
    #1;
    chk(tx_load[P_E] && tx_word[P_E] == 9'd64 && out_pop[0], "E from stack C");
    chk(tx_load[P_S] && tx_word[P_S] == 9'd66 && out_pop[2], "S from stack F");
    chk(!out_pop[1], "stack D not used");
    chk(tx_load[P_N] && tx_word[P_N] == 9'(P_W + 16), "N routes W");
    chk(tx_load[P_D] && in_push[0] && rx_take[P_W], "4-way fork of W");
    tx_ready[P_D] = 0;
    #1;
    chk(!tx_load[P_N] && !tx_load[P_D] && !in_push[0] && !in_push[2] && !rx_take[P_W], "fork stalls on one sender");
    chk(tx_load[P_E], "stack C still flows");
    tx_ready[P_D] = 1;
    rx_valid[P_W] = 0;
    #1;
    chk(!tx_load[P_N] && !in_push[0], "no word, no load");
    out_empty[0] = 1;
    #1;
    chk(!tx_load[P_E] && !out_pop[0], "empty stack not popped");
    rx_valid[P_W] = 1;
    run = 0;
    #1;
    chk(!tx_load[P_N] && !in_push[1] && !rx_take[P_U] && !out_pop[2], "held: nothing moves");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
