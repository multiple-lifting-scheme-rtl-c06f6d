// tb_ml_dwt2d_top_n4: end-to-end test of ml_dwt2d_top as the four-lifting
// scheme (N = 4) on 128 x 128 images, with random source stalls.
module tb_ml_dwt2d_top_n4;
  localparam int TB_W = 128;
  localparam int TB_H = 128;
  localparam int TB_N = 4;
  localparam int NIMG = 2;
  localparam int STALL_PCT = 20;

  `include "dwt2d_tb_body.svh"

  initial begin
    @(tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ml_dwt2d_top #(.IMG_W(TB_W), .IMG_H(TB_H), .NLIFT(TB_N)) dut (.*);
endmodule
