// dfp_data_ram: the DFP's 256 x 9-bit data RAM.
//
// One synchronous read port and one write port, used by the datapath as a
// pixel/line delay FIFO, as a histogram or table memory, and as a dual-port
// memory operator. The processor shares the write port between the datapath
// and the scan interface, which loads the RAM while execution is held. A read
// through `rd_addr` returns the word at the next clock (old data when read and write hit the same address in the
// same clock). Size follows the document; the port arrangement is this
// design's choice.
module dfp_data_ram #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned WIDTH = 9
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
