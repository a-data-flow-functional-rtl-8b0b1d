// tb_dffc_top: the end-to-end test on a 2 x 2 x 2 mesh (four biprocessor
// chips) with two video channels and two high-level links.
module tb_dffc_top;
  tb_dffc_bench #(.FULL(1'b0), .NX(2), .NY(2), .NZ(2), .NVIDEO(2), .NHL(2),
                  .LINES(6), .LINEW(16), .MAXCYC(200000)) bench ();
endmodule
