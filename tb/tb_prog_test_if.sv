// tb_prog_test_if: host writes to the command and scan registers; checks the
// command held on COM3-0, that a shift of n bits puts COM_SHIFT on the lines
// for exactly n clocks and sends the bits MSB first, that bits coming back from
// the chain are captured, and the busy status.
module tb_prog_test_if;
  import dfp_pkg::*;
  logic clk = 0, rst_n = 0, hb_we = 0, scan_in = 0;
  logic [7:0] hb_addr = 0;
  logic [31:0] hb_wdata = 0, hb_rdata;
  logic [3:0] com;
  logic scan_out;
  int checks = 0, failures = 0;

  prog_test_if dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    hb_addr = a; hb_wdata = d; hb_we = 1; @(negedge clk); hb_we = 0;
  endtask
  logic [31:0] rv;
  task automatic rd(input logic [7:0] a);
    hb_addr = a; #1; rv = hb_rdata;
  endtask

  // a one-bit loopback delay stands in for the chain
  logic [31:0] seen;
  int nshift = 0;
  always @(negedge clk) if (com == COM_SHIFT) begin
    seen <= {seen[30:0], scan_out};
    nshift <= nshift + 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(com == COM_HOLD, "hold after reset");
    wr(8'd0, 32'(COM_RUN));
    rd(8'd0);
    chk(com == COM_RUN && rv == 32'(COM_RUN), "command register");
    wr(8'd1, 32'h0000_02AD);     // 10 bits: 10_1010_1101
    wr(8'd2, 32'd10);
    rd(8'd3);
    chk(rv[0] == 1'b1, "busy while shifting");
    // loop the output back into the capture input
    for (int i = 0; i < 10; i++) begin
      chk(com == COM_SHIFT, "shift command");
      scan_in = scan_out;
      @(negedge clk);
    end
    scan_in = 0;
    rd(8'd3);
    chk(com == COM_RUN && rv == 32'd0, "back to command after 10 bits");
    chk(nshift == 10 && seen[9:0] == 10'h2AD, "bits sent MSB first");
    rd(8'd4);
    chk(rv == 32'h0000_02AD, "captured bits");
    wr(8'd1, 32'hDEAD_BEEF);
    wr(8'd2, 32'd32);
    repeat (32) @(negedge clk);
    chk(nshift == 42 && seen == 32'hDEAD_BEEF, "32-bit shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
