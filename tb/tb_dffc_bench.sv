// tb_dffc_bench: end-to-end test of the whole computer, used at a reduced mesh
// (tb_dffc_top) and at the full default size (tb_dffc_full).
//
// Everything is done the way a host would: the mesh is programmed through the
// programming and test interface on the host bus (six passes of the scan
// chain: input selects, port modes, constants, sequencer settings, one
// microinstruction per processor, and the delay line's initial word), then
// set running. Mapped on the mesh:
//  * video channel 0 (row y = 0): processor (0,0,0) computes |x(n-1) - x(n)|
//    (delay line in the data RAM, subtraction, absolute value), sends it up
//    through the chip's internal link to layer z = 1, where it is routed east
//    processor by processor to (NX-1,0,1); that one thresholds it (> TH gives
//    1) and sends it down to (NX-1,0,0), which forks it to video output 0 and
//    to the low-bandwidth interface, which the host reads.
//  * video channel 1 (row y = NY/NVIDEO): (0,y,0) computes (3x) >> 1, the rest
//    of the row routes it to video output 1.
//  * host words written to the low-bandwidth interface enter (0,0,0) at N and
//    are routed south down column x = 0 to the high-level link 0, where a
//    transputer-side model takes them.
// Each output is compared with values computed here. Mechanisms that must
// occur at least once, each counted: back-pressure stalls from a slow video
// sink, the fork, route-through, control words kept in place, a hold/resume
// of the whole machine, and a video input overflow (channel 1's sink is
// stopped on purpose at the end).
module tb_dffc_bench
  import dfp_pkg::*;
  import tb_util_pkg::*;
#(
  parameter bit          FULL = 1'b0,
  parameter int unsigned NX = 2,
  parameter int unsigned NY = 2,
  parameter int unsigned NZ = 2,
  parameter int unsigned NVIDEO = 2,
  parameter int unsigned NHL = 2,
  parameter int unsigned LINES = 6,
  parameter int unsigned LINEW = 16,
  parameter int unsigned MAXCYC = 400000
) ();
  localparam int unsigned NDFP = NX * NY * NZ;
  localparam int unsigned Y1 = NY / NVIDEO;
  localparam int unsigned TH = 20;

  logic clk = 0, rst_n = 0;
  logic [7:0] hb_addr = 0;
  logic hb_we = 0, hb_re = 0;
  logic [31:0] hb_wdata = 0, hb_rdata;
  logic vin_valid [NVIDEO], vin_eol [NVIDEO], vin_overflow [NVIDEO];
  logic [7:0] vin_pix [NVIDEO];
  logic vout_ready [NVIDEO], vout_valid [NVIDEO], vout_eol [NVIDEO];
  logic [7:0] vout_pix [NVIDEO];
  word_t hl_data_i [NHL], hl_data_o [NHL];
  logic hl_data_oe [NHL], hl_ack_i [NHL], hl_ack_o [NHL], hl_ack_oe [NHL];
  int checks = 0, failures = 0;

  word_t vout0_line;   // lines into video output 0, to see stalls
  if (FULL) begin : g_full
    dffc_top dut (.*);
    assign vout0_line = dut.vout_data[0];
  end else begin : g_small
    dffc_top #(.NX(NX), .NY(NY), .NZ(NZ), .NVIDEO(NVIDEO), .NHL(NHL)) dut (.*);
    assign vout0_line = dut.vout_data[0];
  end

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++; $display("watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", m, cyc); end
  endtask

  function automatic int unsigned id(input int unsigned x, input int unsigned y, input int unsigned z);
    return (z * NY + y) * NX + x;
  endfunction
  // processor at a scan chain position: chip by chip, lower processor first
  function automatic int unsigned at_pos(input int unsigned pos);
    int unsigned c, zc, rest;
    c = pos / 2; zc = c / (NX * NY); rest = c % (NX * NY);
    return id(rest % NX, rest / NX, 2 * zc + pos % 2);
  endfunction

  // ---------------- mapping tables ----------------
  logic [SCAN_W-1:0] tab [6][NDFP];
  logic [2:0] ins [NDFP][3];
  logic [3:0] outs [NDFP][6];
  task automatic build_tables();
    logic [31:0] nop;
    nop = ui(3'b000, 3'b000, R_A, S_ZERO);
    for (int i = 0; i < NDFP; i++) begin
      for (int s = 0; s < 3; s++) ins[i][s] = 3'd7;
      for (int p = 0; p < 6; p++) outs[i][p] = 4'd0;
      for (int r = 0; r < 6; r++) tab[r][i] = sw(TGT_NONE, 8'd0, 32'd0);
      tab[4][i] = sw(TGT_PROG, 8'd0, nop);
    end
    // channel 0
    ins[id(0,0,0)][0] = 3'(P_W);
    outs[id(0,0,0)][P_U] = 4'd1;
    tab[3][id(0,0,0)] = sw(TGT_CFG, CFG_SEQ, cfg_seq(6'd0, 6'd0, 8'd1));
    tab[4][id(0,0,0)] = sw(TGT_PROG, 8'd0,
      ui(3'b001, 3'b001, R_RAM, S_A, .alu(ALU_SUBS), .post(POST_ABS), .ram(RAM_LINE)));
    tab[5][id(0,0,0)] = sw(TGT_DATA, 8'd0, 32'd0);
    outs[id(0,0,1)][P_E] = 4'd4 + 4'(P_D);
    for (int x = 1; x < NX - 1; x++) outs[id(x,0,1)][P_E] = 4'd4 + 4'(P_W);
    ins[id(NX-1,0,1)][0] = 3'(P_W);
    outs[id(NX-1,0,1)][P_D] = 4'd1;
    tab[2][id(NX-1,0,1)] = sw(TGT_CFG, CFG_K, TH);
    tab[4][id(NX-1,0,1)] = sw(TGT_PROG, 8'd0, ui(3'b001, 3'b001, R_A, S_K, .alu(ALU_SUBS), .flag(1'b1)));
    outs[id(NX-1,0,0)][P_E] = 4'd4 + 4'(P_U);
    outs[id(NX-1,0,0)][P_N] = 4'd4 + 4'(P_U);
    // channel 1
    ins[id(0,Y1,0)][0] = 3'(P_W);
    outs[id(0,Y1,0)][P_E] = 4'd1;
    tab[2][id(0,Y1,0)] = sw(TGT_CFG, CFG_K, 32'd3);
    tab[4][id(0,Y1,0)] = sw(TGT_PROG, 8'd0, ui(3'b001, 3'b001, R_A, S_ZERO, .mul(1'b1), .shr(4'd1)));
    for (int x = 1; x < NX; x++) outs[id(x,Y1,0)][P_E] = 4'd4 + 4'(P_W);
    // low-bandwidth words down column x = 0 to high-level link 0
    for (int y = 0; y < NY; y++) outs[id(0,y,0)][P_S] = 4'd4 + 4'(P_N);
    for (int i = 0; i < NDFP; i++) begin
      tab[0][i] = sw(TGT_CFG, CFG_INSEL, cfg_insel(ins[i][0], ins[i][1], ins[i][2]));
      tab[1][i] = sw(TGT_CFG, CFG_OUTSEL, cfg_outsel(outs[i][0], outs[i][1], outs[i][2],
                                                      outs[i][3], outs[i][4], outs[i][5]));
    end
  endtask

  // ---------------- host bus ----------------
  task automatic hwr(input logic [7:0] a, input logic [31:0] d);
    hb_addr = a; hb_wdata = d; hb_we = 1; @(negedge clk); hb_we = 0;
  endtask
  task automatic hshift(input logic [31:0] bits, input int n);
    hwr(8'h01, bits);
    hwr(8'h02, 32'(n));
    hb_addr = 8'h03;
    #1;
    while (hb_rdata[0]) begin @(negedge clk); #1; end
    @(negedge clk);
  endtask
  task automatic program_mesh();
    for (int r = 0; r < 6; r++) begin
      for (int pos = NDFP - 1; pos >= 0; pos--) begin
        logic [SCAN_W-1:0] w;
        w = tab[r][at_pos(pos)];
        hshift(32'(w[SCAN_W-1:32]), 10);
        hshift(w[31:0], 32);
      end
      hwr(8'h00, 32'(COM_WRITE));
      hwr(8'h00, 32'(COM_HOLD));
    end
  endtask

  // ---------------- video sources and sinks ----------------
  logic [7:0] img0 [LINES][LINEW], img1 [LINES][LINEW];
  logic [8:0] exp0 [$], exp1 [$], got0 [$], got1 [$];   // {eol, pixel}
  word_t exp_lb [$], got_lb [$], sent_hl [$], got_hl [$];
  logic cam0_go = 0, cam1_go = 0, cam1_flood = 0, sink0_random = 0, sink1_stop = 0;
  int cam0_i = 0, cam1_i = 0, flood_n = 0;
  int n_stall = 0, n_eol0 = 0, n_hold = 0;

  always @(negedge clk) begin
    for (int v = 0; v < NVIDEO; v++) begin
      vin_valid[v] = 0; vin_eol[v] = 0; vin_pix[v] = 0; vout_ready[v] = 1;
    end
    if (cam0_go && cam0_i < LINES * LINEW && $urandom_range(0, 2) == 0) begin
      vin_valid[0] = 1; vin_pix[0] = img0[cam0_i / LINEW][cam0_i % LINEW];
      vin_eol[0] = (cam0_i % LINEW == LINEW - 1);
      cam0_i++;
    end
    if (cam1_go && cam1_i < LINES * LINEW) begin
      vin_valid[1] = 1; vin_pix[1] = img1[cam1_i / LINEW][cam1_i % LINEW];
      vin_eol[1] = (cam1_i % LINEW == LINEW - 1);
      cam1_i++;
    end else if (cam1_flood) begin
      vin_valid[1] = 1; vin_pix[1] = 8'(flood_n); vin_eol[1] = (flood_n % LINEW == LINEW - 1);
      flood_n++;
    end
    if (sink0_random) vout_ready[0] = ($urandom_range(0, 3) != 0);
    if (sink1_stop) vout_ready[1] = 0;
    for (int h = 0; h < NHL; h++) begin hl_data_i[h] = IDLE_CODE; hl_ack_i[h] = 1; end
  end
  always @(posedge clk) if (rst_n) begin
    if (vout_valid[0]) begin got0.push_back({vout_eol[0], vout_pix[0]}); if (vout_eol[0]) n_eol0++; end
    if (vout_valid[1] && !cam1_flood) got1.push_back({vout_eol[1], vout_pix[1]});
    if (hl_data_oe[0] && hl_data_o[0] != IDLE_CODE) got_hl.push_back(hl_data_o[0]);
    if (!vout_ready[0] && vout0_line != IDLE_CODE) n_stall++;
  end

  // ---------------- the test ----------------
  initial begin
    build_tables();
    for (int l = 0; l < LINES; l++)
      for (int i = 0; i < LINEW; i++) begin
        img0[l][i] = 8'($urandom_range(0, 60) + ((i % 5 == 0) ? 120 : 0));
        img1[l][i] = 8'($urandom_range(0, 255));
      end
    // expected: channel 0, |previous pixel - pixel| > TH, previous of the first
    // pixel is the last pixel of the line before (0 at start)
    begin
      int prev;
      prev = 0;
      for (int l = 0; l < LINES; l++) begin
        for (int i = 0; i < LINEW; i++) begin
          int d;
          d = prev - int'(img0[l][i]); if (d < 0) d = -d;
          exp0.push_back({(i == LINEW - 1), 7'd0, (d > TH)});
          exp_lb.push_back({1'b0, 7'd0, (d > TH)});
          prev = int'(img0[l][i]);
          d = (3 * int'(img1[l][i])) >> 1;
          exp1.push_back({(i == LINEW - 1), 8'((d > 255) ? 255 : d)});
        end
        exp_lb.push_back(EOL_WORD);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    program_mesh();
    $display("programmed at cycle %0d", cyc);
    hwr(8'h00, 32'(COM_RUN));
    cam0_go = 1; cam1_go = 1; sink0_random = 1;
    // host loop: read the low-bandwidth receive FIFO, send 12 words to the
    // high-level link, and hold the machine once
    begin
      int it;
      it = 0;
      while ((got_lb.size() < exp_lb.size() || got0.size() < exp0.size() || got1.size() < exp1.size()
              || got_hl.size() < 12) && it < MAXCYC) begin
        if (it < 12) begin
          word_t w;
          w = (it == 6) ? EOL_WORD : 9'(it * 17 + 1);
          hwr(8'h10, 32'(w)); sent_hl.push_back(w);
        end else if (it == 200) begin
          hwr(8'h00, 32'(COM_HOLD));
          repeat (24) @(negedge clk);
          hwr(8'h00, 32'(COM_RUN));
          n_hold++;
        end else begin
          hb_addr = 8'h11; hb_re = 1; #1;
          if (hb_rdata[31]) got_lb.push_back(hb_rdata[8:0]);
          @(negedge clk);
          hb_re = 0;
        end
        it++;
      end
    end
    $display("streams done at cycle %0d", cyc);
    chk(got0.size() == exp0.size(), "video 0 pixel count");
    for (int i = 0; i < exp0.size() && i < got0.size(); i++)
      chk(got0[i] == exp0[i], $sformatf("video 0 edge value %0d: got %h expected %h", i, got0[i], exp0[i]));
    chk(got1.size() == exp1.size(), "video 1 pixel count");
    for (int i = 0; i < exp1.size() && i < got1.size(); i++) chk(got1[i] == exp1[i], "video 1 scaled values");
    chk(got_lb.size() == exp_lb.size(), "low-bandwidth read count");
    for (int i = 0; i < exp_lb.size() && i < got_lb.size(); i++) chk(got_lb[i] == exp_lb[i], "forked copy read by host");
    chk(got_hl.size() == 12, "words at high-level link");
    for (int i = 0; i < 12 && i < got_hl.size(); i++) chk(got_hl[i] == sent_hl[i], "host words routed to link");
    chk(!vin_overflow[0] && !vin_overflow[1], "no loss while the sinks keep up");
    // overflow: stop sink 1, keep its camera running
    sink1_stop = 1; cam1_flood = 1;
    repeat (200) @(negedge clk);
    cam1_flood = 0;
    chk(vin_overflow[1], "video 1 overflow after its sink stopped");
    sink1_stop = 0;
    $display("mechanisms: stalls=%0d fork_words=%0d routed_words=%0d eol_kept=%0d holds=%0d overflow=%0d",
             n_stall, got_lb.size(), got_hl.size(), n_eol0, n_hold, vin_overflow[1]);
    chk(n_stall > 0, "back-pressure stall happened");
    chk(got_lb.size() > 0, "fork happened");
    chk(got_hl.size() > 0, "route-through happened");
    chk(n_eol0 == LINES, "control words kept their place");
    chk(n_hold == 1, "hold and resume happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
