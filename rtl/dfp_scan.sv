// dfp_scan: the DFP's command decoder (COM3-0) and scan programming interface
// (SCANA in, SCANB out), holding the processor's configuration registers.
//
// The scan register is 42 bits: {target[1:0], address[7:0], data[31:0]}.
// COM_SHIFT moves it one bit towards SCANB, taking SCANA in at the bottom, so
// the processors of a machine form one chain and a word for each of them is
// shifted in, last processor's word first. COM_WRITE then writes every
// processor's word at once to its target: program RAM, a configuration
// register, or the data RAM (target NONE writes nothing). COM_READ loads the
// data field from the target so it can be shifted out for test (a data RAM
// read takes one more clock). COM_RUN lets the processor execute, COM_HOLD
// freezes it, COM_CLEAR empties its stacks and pipeline.
// Configuration registers: input stack sources, port modes/sources, the four
// constants K0..K3, and LAST, JT, PLEN for the sequencer and delay line.
// The pins RESET, COM3-0 and SCANA-B are those of the processor diagram; what
// the commands and the scan word mean is this design's own choice.
module dfp_scan
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  com,
  input  logic        scan_in,
  output logic        scan_out,
  output logic        run,
  output logic        clear,
  // program RAM
  output logic        prog_we,
  output logic [5:0]  prog_addr,
  output logic [31:0] prog_wdata,
  input  logic [31:0] prog_rdata,
  // data RAM access while held
  output logic        dram_we,
  output logic        dram_re,
  output logic [7:0]  dram_addr,
  output word_t       dram_wdata,
  input  word_t       dram_rdata,
  // configuration
  output logic [2:0]  insel  [NSTACKS],
  output logic [3:0]  outsel [NPORTS],
  output logic [7:0]  k      [4],
  output logic [5:0]  last_pc,
  output logic [5:0]  jump_pc,
  output logic [7:0]  plen
);
  logic [SCAN_W-1:0] sr;
  scan_tgt_e  tgt;
  logic [7:0] addr;
  logic [31:0] data;
  logic [31:0] cfg [4];
  logic dram_pending;
  com_e cmd;

  assign cmd  = com_e'(com);
  assign tgt  = scan_tgt_e'(sr[SCAN_W-1 -: 2]);
  assign addr = sr[39:32];
  assign data = sr[31:0];
  assign scan_out = sr[SCAN_W-1];

  assign run   = (cmd == COM_RUN);
  assign clear = (cmd == COM_CLEAR);

  assign prog_we    = (cmd == COM_WRITE) && (tgt == TGT_PROG);
  assign prog_addr  = addr[5:0];
  assign prog_wdata = data;
  assign dram_we    = (cmd == COM_WRITE) && (tgt == TGT_DATA);
  assign dram_re    = (cmd == COM_READ) && (tgt == TGT_DATA);
  assign dram_addr  = addr;
  assign dram_wdata = data[8:0];

  always_comb begin
    for (int i = 0; i < NSTACKS; i++) insel[i] = cfg[0][3*i +: 3];
    for (int p = 0; p < NPORTS; p++)  outsel[p] = cfg[1][4*p +: 4];
    for (int i = 0; i < 4; i++)       k[i] = cfg[2][8*i +: 8];
    last_pc = cfg[3][5:0];
    jump_pc = cfg[3][13:8];
    plen    = cfg[3][23:16];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
      cfg[0] <= 32'h0000_01FF;   // no input stack connected
      cfg[1] <= '0;              // all ports receiving
      cfg[2] <= '0;
      cfg[3] <= '0;
      dram_pending <= 1'b0;
    end else begin
      dram_pending <= dram_re;
      if (dram_pending) sr[31:0] <= 32'(dram_rdata);
      unique case (cmd)
        COM_SHIFT: sr <= {sr[SCAN_W-2:0], scan_in};
        COM_WRITE: if (tgt == TGT_CFG && addr < 8'd4) cfg[addr[1:0]] <= data;
        COM_READ: begin
          if (tgt == TGT_PROG) sr[31:0] <= prog_rdata;
          else if (tgt == TGT_CFG) sr[31:0] <= cfg[addr[1:0]];
        end
        default: ;
      endcase
    end
  end
endmodule
