// prog_test_if: programming and test interface between the host workstation's
// system bus and the processor network.
//
// It drives the command lines (COM3-0) shared by all processors and the head
// of the scan chain (SCANA), and collects the bits that leave the chain's end
// (SCANB of the last processor). Host registers (word addresses, BASE + n):
//   0  COM      write: command held on COM3-0 while no shift is running
//   1  SDATA    write: up to 32 bits to shift into the chain, sent MSB first
//   2  SSTART   write [5:0]: shift the low n bits of SDATA (n = 1..32)
//   3  STATUS   read [0]: shift in progress
//   4  SCAPT    read: the last 32 bits that came out of the chain
// While shifting it puts COM_SHIFT on the command lines, one bit per clock.
// A processor's 42-bit scan word is sent as a 10-bit then a 32-bit shift; the
// word for the last processor of the chain goes first. The block's place
// between host bus and network is the document's; the register map is this
// design's own.
module prog_test_if
  import dfp_pkg::*;
#(
  parameter logic [7:0] BASE = 8'h00
) (
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic [7:0]  hb_addr,
  input  logic        hb_we,
  input  logic [31:0] hb_wdata,
  output logic [31:0] hb_rdata,
  // network side
  output logic [3:0]  com,
  output logic        scan_out,   // to SCANA of the first processor
  input  logic        scan_in     // from SCANB of the last processor
);
  logic [3:0]  com_reg;
  logic [31:0] sdata, scapt;
  logic [5:0]  left;
  logic        busy;
  logic        sel_we;

  assign busy     = (left != 0);
  assign com      = busy ? COM_SHIFT : com_reg;
  assign scan_out = sdata[31];
  assign sel_we   = hb_we && (hb_addr[7:3] == BASE[7:3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      com_reg <= COM_HOLD;
      sdata   <= '0;
      scapt   <= '0;
      left    <= '0;
    end else begin
      if (busy) begin
        sdata <= {sdata[30:0], 1'b0};
        scapt <= {scapt[30:0], scan_in};
        left  <= left - 6'd1;
      end
      if (sel_we && !busy) begin
        unique case (hb_addr[2:0])
          3'd0: com_reg <= hb_wdata[3:0];
          3'd1: sdata   <= hb_wdata;
          3'd2: begin
            left  <= (hb_wdata[5:0] > 6'd32 || hb_wdata[5:0] == 6'd0) ? 6'd32 : hb_wdata[5:0];
            sdata <= sdata << (6'd32 - ((hb_wdata[5:0] > 6'd32 || hb_wdata[5:0] == 6'd0) ? 6'd32 : hb_wdata[5:0]));
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    hb_rdata = '0;
    if (hb_addr[7:3] == BASE[7:3])
      unique case (hb_addr[2:0])
        3'd0: hb_rdata = {28'd0, com_reg};
        3'd3: hb_rdata = {31'd0, busy};
        3'd4: hb_rdata = scapt;
        default: hb_rdata = '0;
      endcase
  end

  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && hb_we && hb_addr[7:3] == BASE[7:3]));
endmodule
