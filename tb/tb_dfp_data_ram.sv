// tb_dfp_data_ram: writes all 256 words with a pattern and reads them back,
// checks the one-clock read latency, read-before-write at one address, and
// that a disabled read holds its output.
module tb_dfp_data_ram;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [7:0] rd_addr = 0, wr_addr = 0;
  logic [8:0] rd_data, wr_data = 0;
  int checks = 0, failures = 0;

  dfp_data_ram dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic logic [8:0] pat(input int a);
    return 9'((a * 37 + 11) % 512);
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      wr_en = 1; wr_addr = 8'(a); wr_data = pat(a); @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < 256; a++) begin
      rd_en = 1; rd_addr = 8'(255 - a); @(negedge clk);
      chk(rd_data == pat(255 - a), "readback");
    end
    // read and write the same address in one clock: old data is read
    rd_en = 1; rd_addr = 8'd7; wr_en = 1; wr_addr = 8'd7; wr_data = 9'h1AB; @(negedge clk);
    chk(rd_data == pat(7), "read-before-write");
    wr_en = 0; @(negedge clk);
    chk(rd_data == 9'h1AB, "new data next read");
    rd_en = 0; rd_addr = 8'd8; @(negedge clk);
    chk(rd_data == 9'h1AB, "output held without read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
