// tb_dfp_scan: shifts 42-bit scan words in on SCANA and checks that COM_WRITE
// delivers them to the program RAM port, the configuration registers and the
// data RAM port, that COM_READ brings register contents back out on SCANB,
// that a data RAM word is read back a clock later, and the RUN/CLEAR decode.
module tb_dfp_scan;
  import dfp_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, scan_in = 0;
  logic [3:0] com = COM_HOLD;
  logic scan_out, run, clear, prog_we, dram_we, dram_re;
  logic [5:0] prog_addr, last_pc, jump_pc;
  logic [31:0] prog_wdata, prog_rdata = 32'hCAFE_F00D;
  logic [7:0] dram_addr, plen;
  word_t dram_wdata, dram_rdata = 9'h15A;
  logic [2:0] insel [NSTACKS];
  logic [3:0] outsel [NPORTS];
  logic [7:0] k [4];
  int checks = 0, failures = 0;

  dfp_scan dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask
  task automatic shift_in(input logic [SCAN_W-1:0] w);
    com = COM_SHIFT;
    for (int i = SCAN_W - 1; i >= 0; i--) begin scan_in = w[i]; @(negedge clk); end
    com = COM_HOLD;
  endtask
  task automatic shift_out(output logic [SCAN_W-1:0] w);
    com = COM_SHIFT;
    for (int i = SCAN_W - 1; i >= 0; i--) begin w[i] = scan_out; @(negedge clk); end
    com = COM_HOLD;
  endtask

  initial begin
    logic [SCAN_W-1:0] got;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!run && !clear && !prog_we && insel[0] == 3'd7 && outsel[0] == 4'd0, "reset state");
    shift_in(sw(TGT_PROG, 8'd17, 32'h1234_5678));
    com = COM_WRITE; #1;
    chk(prog_we && prog_addr == 6'd17 && prog_wdata == 32'h1234_5678 && !dram_we, "program write");
    @(negedge clk);
    shift_in(sw(TGT_CFG, 8'(CFG_INSEL), cfg_insel(3'(P_W), 3'(P_U), 3'd7)));
    com = COM_WRITE; @(negedge clk); com = COM_HOLD;
    chk(insel[0] == 3'(P_W) && insel[1] == 3'(P_U) && insel[2] == 3'd7, "insel");
    shift_in(sw(TGT_CFG, 8'(CFG_OUTSEL), cfg_outsel(4'd0, 4'd0, 4'd1, 4'd0, 4'd7, 4'd0)));
    com = COM_WRITE; @(negedge clk); com = COM_HOLD;
    chk(outsel[P_E] == 4'd1 && outsel[P_U] == 4'd7 && outsel[P_N] == 4'd0, "outsel");
    shift_in(sw(TGT_CFG, 8'(CFG_K), 32'h4433_2211));
    com = COM_WRITE; @(negedge clk); com = COM_HOLD;
    chk(k[0] == 8'h11 && k[3] == 8'h44, "constants");
    shift_in(sw(TGT_CFG, 8'(CFG_SEQ), cfg_seq(6'd5, 6'd2, 8'd200)));
    com = COM_WRITE; @(negedge clk); com = COM_HOLD;
    chk(last_pc == 6'd5 && jump_pc == 6'd2 && plen == 8'd200, "sequencer config");
    shift_in(sw(TGT_DATA, 8'd99, 32'h0000_01F3));
    com = COM_WRITE; #1;
    chk(dram_we && dram_addr == 8'd99 && dram_wdata == 9'h1F3, "data RAM write");
    @(negedge clk);
    // readback of a config register
    shift_in(sw(TGT_CFG, 8'(CFG_K), 32'd0));
    com = COM_READ; @(negedge clk); com = COM_HOLD;
    shift_out(got);
    chk(got[31:0] == 32'h4433_2211, "config readback");
    // program readback
    shift_in(sw(TGT_PROG, 8'd3, 32'd0));
    com = COM_READ; @(negedge clk); com = COM_HOLD;
    shift_out(got);
    chk(got[31:0] == 32'hCAFE_F00D, "program readback");
    // data RAM readback (one clock later)
    shift_in(sw(TGT_DATA, 8'd99, 32'd0));
    com = COM_READ; #1;
    chk(dram_re && dram_addr == 8'd99, "data RAM read issued");
    @(negedge clk); com = COM_HOLD; @(negedge clk);
    shift_out(got);
    chk(got[8:0] == 9'h15A, "data RAM readback");
    com = COM_RUN; #1; chk(run && !clear, "run");
    com = COM_CLEAR; #1; chk(clear && !run, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
