// tb_dffc_full: the end-to-end test on the computer at its default size, the
// 8 x 8 x 4 mesh of 256 processors with four video channels and four
// high-level links.
module tb_dffc_full;
  tb_dffc_bench #(.FULL(1'b1), .NX(8), .NY(8), .NZ(4), .NVIDEO(4), .NHL(4),
                  .LINES(4), .LINEW(32), .MAXCYC(400000)) bench ();
endmodule
