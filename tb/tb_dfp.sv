// tb_dfp: one data-flow processor, programmed through COM3-0 and the scan
// lines only, with neighbour models on its ports. Operators run:
//  1. y = a*K0 + b on two flows with end-of-line control words, at full rate
//     (checks one result per clock once the pipeline is full)
//  2. a 4-pixel delay line through the data RAM (control words pass at once)
//  3. routing: W routed to E and S at once (a fork), with a stalling receiver
//  4. a histogram into the data RAM, read back through the scan chain
// Every output word is compared with a value computed here.
module tb_dfp;
  import dfp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, scan_in = 0, scan_out;
  logic [3:0] com = COM_HOLD;
  word_t p_data_i [NPORTS], p_data_o [NPORTS];
  logic p_data_oe [NPORTS], p_ack_i [NPORTS], p_ack_o [NPORTS], p_ack_oe [NPORTS];
  int checks = 0, failures = 0;

  dfp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // ---------------- neighbour models ----------------
  word_t sq [NPORTS][$];     // words to send into each port
  word_t rq [NPORTS][$];     // words received from each port
  logic  stall_rx [NPORTS];  // receiver acknowledges at random
  int    sent_n [NPORTS];
  always @(negedge clk) for (int p = 0; p < NPORTS; p++) begin
    p_data_i[p] = (sq[p].size() > 0) ? sq[p][0] : IDLE_CODE;
    p_ack_i[p]  = stall_rx[p] ? ($urandom_range(0, 2) == 0) : 1'b1;
  end
  always @(posedge clk) if (rst_n) for (int p = 0; p < NPORTS; p++) begin
    if (sq[p].size() > 0 && p_ack_oe[p] && p_ack_o[p] && p_data_i[p] != IDLE_CODE) begin
      void'(sq[p].pop_front()); sent_n[p]++;
    end
    if (p_data_oe[p] && p_data_o[p] != IDLE_CODE && p_ack_i[p]) rq[p].push_back(p_data_o[p]);
  end

  // ---------------- programming ----------------
  task automatic scan_write(input scan_tgt_e t, input logic [7:0] a, input logic [31:0] d);
    logic [SCAN_W-1:0] w;
    w = sw(t, a, d);
    com = COM_SHIFT;
    for (int i = SCAN_W - 1; i >= 0; i--) begin scan_in = w[i]; @(negedge clk); end
    com = COM_WRITE; @(negedge clk);
    com = COM_HOLD;
  endtask
  task automatic scan_read(input scan_tgt_e t, input logic [7:0] a, output logic [31:0] d);
    logic [SCAN_W-1:0] w;
    w = sw(t, a, 32'd0);
    com = COM_SHIFT;
    for (int i = SCAN_W - 1; i >= 0; i--) begin scan_in = w[i]; @(negedge clk); end
    com = COM_READ; @(negedge clk);
    com = COM_HOLD; @(negedge clk);
    com = COM_SHIFT;
    for (int i = SCAN_W - 1; i >= 0; i--) begin w[i] = scan_out; @(negedge clk); end
    com = COM_HOLD;
    d = w[31:0];
  endtask
  task automatic reset_all();
    com = COM_CLEAR; @(negedge clk); com = COM_HOLD;
    for (int p = 0; p < NPORTS; p++) begin sq[p].delete(); rq[p].delete(); stall_rx[p] = 0; sent_n[p] = 0; end
    scan_write(TGT_CFG, CFG_INSEL, cfg_insel(3'd7, 3'd7, 3'd7));
    scan_write(TGT_CFG, CFG_OUTSEL, 32'd0);
  endtask
  task automatic run_until(input int p, input int n, input int maxc, output int cycles);
    com = COM_RUN;
    cycles = 0;
    while (rq[p].size() < n && cycles < maxc) begin @(negedge clk); cycles++; end
    com = COM_HOLD;
  endtask

  initial begin
    int cyc;
    word_t a [$], b [$], exp [$];
    logic [31:0] d;
    for (int p = 0; p < NPORTS; p++) begin stall_rx[p] = 0; sent_n[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1: y = a*K0 + b, A <- W, B <- N, C -> E
    reset_all();
    scan_write(TGT_CFG, CFG_INSEL, cfg_insel(3'(P_W), 3'(P_N), 3'd7));
    scan_write(TGT_CFG, CFG_OUTSEL, cfg_outsel(4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0));
    scan_write(TGT_CFG, CFG_K, 32'd3);
    scan_write(TGT_CFG, CFG_SEQ, cfg_seq(6'd0, 6'd0, 8'd0));
    scan_write(TGT_PROG, 8'd0, ui(3'b011, 3'b001, R_A, S_B, .alu(ALU_ADD), .mul(1'b1), .ksel(2'd0)));
    for (int i = 0; i < 200; i++) begin
      word_t x, y;
      if (i % 20 == 19) begin x = EOL_WORD; y = EOL_WORD; exp.push_back(EOL_WORD); end
      else begin
        x = 9'($urandom_range(0, 90)); y = 9'($urandom_range(0, 255));
        exp.push_back(9'((x * 3 + y > 255) ? 255 : x * 3 + y));
      end
      sq[P_W].push_back(x); sq[P_N].push_back(y);
    end
    run_until(P_E, 200, 1000, cyc);
    chk(rq[P_E].size() == 200, "all sums out");
    for (int i = 0; i < 200 && i < rq[P_E].size(); i++) chk(rq[P_E][i] == exp[i], "weighted sum");
    $display("200 words in %0d cycles", cyc);
    chk(cyc <= 200 + 12, "one result per clock");
    exp.delete();

    // ---- 2: 4-word delay line, A <- W, C -> E
    reset_all();
    for (int i = 0; i < 4; i++) scan_write(TGT_DATA, 8'(i), 32'd0);
    scan_write(TGT_CFG, CFG_INSEL, cfg_insel(3'(P_W), 3'd7, 3'd7));
    scan_write(TGT_CFG, CFG_OUTSEL, cfg_outsel(4'd0, 4'd0, 4'd1, 4'd0, 4'd0, 4'd0));
    scan_write(TGT_CFG, CFG_SEQ, cfg_seq(6'd0, 6'd0, 8'd4));
    scan_write(TGT_PROG, 8'd0, ui(3'b001, 3'b001, R_RAM, S_ZERO, .ram(RAM_LINE)));
    begin
      word_t hist [$];
      for (int i = 0; i < 4; i++) hist.push_back(9'd0);
      for (int i = 0; i < 60; i++) begin
        word_t x;
        x = (i % 10 == 9) ? EOL_WORD : 9'($urandom_range(0, 255));
        sq[P_W].push_back(x);
        // control words go straight through; pixels come out 4 pixels late
        if (x[8]) exp.push_back(x);
        else begin hist.push_back(x); exp.push_back(hist.pop_front()); end
      end
    end
    run_until(P_E, 60, 1000, cyc);
    chk(rq[P_E].size() == 60, "delay line output count");
    for (int i = 0; i < 60 && i < rq[P_E].size(); i++) chk(rq[P_E][i] == exp[i], "delay line");
    exp.delete();

    // ---- 3: route W to E and S (fork), S receiver stalls
    reset_all();
    scan_write(TGT_CFG, CFG_OUTSEL, cfg_outsel(4'd0, 4'd4 + 4'(P_W), 4'd4 + 4'(P_W), 4'd0, 4'd0, 4'd0));
    for (int i = 0; i < 100; i++) begin
      word_t x;
      x = 9'($urandom_range(0, 9'h1FE));
      sq[P_W].push_back(x); exp.push_back(x);
    end
    stall_rx[P_S] = 1;
    run_until(P_S, 100, 2000, cyc);
    repeat (4) begin com = COM_RUN; @(negedge clk); end
    com = COM_HOLD;
    chk(rq[P_S].size() == 100 && rq[P_E].size() == 100, "fork delivered all words");
    for (int i = 0; i < 100 && i < rq[P_E].size() && i < rq[P_S].size(); i++)
      chk(rq[P_E][i] == exp[i] && rq[P_S][i] == exp[i], "routed words");
    chk(cyc > 150, "stalling receiver slowed the fork");
    exp.delete();

    // ---- 4: histogram of 100 pixels into 8 bins
    reset_all();
    for (int i = 0; i < 8; i++) scan_write(TGT_DATA, 8'(i), 32'd0);
    scan_write(TGT_CFG, CFG_INSEL, cfg_insel(3'(P_W), 3'd7, 3'd7));
    scan_write(TGT_CFG, CFG_K, 32'd1);
    scan_write(TGT_PROG, 8'd0, ui(3'b001, 3'b000, R_RAM, S_K, .alu(ALU_ADD), .ram(RAM_HIST)));
    begin
      int h [8];
      for (int i = 0; i < 8; i++) h[i] = 0;
      for (int i = 0; i < 100; i++) begin
        int v;
        v = (i < 10) ? 5 : $urandom_range(0, 7);   // a run of equal pixels first
        sq[P_W].push_back(9'(v)); h[v]++;
      end
      com = COM_RUN;
      while (sent_n[P_W] < 100) @(negedge clk);
      repeat (8) @(negedge clk);
      com = COM_HOLD;
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        scan_read(TGT_DATA, 8'(i), d);
        chk(d[8:0] == 9'(h[i]), "histogram bin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
