// tb_ml_dwt2d_top_n3: end-to-end test of ml_dwt2d_top with N = 3 on a small
// 12 x 10 image, where the column steps do not fill the last stripe.
module tb_ml_dwt2d_top_n3;
  localparam int TB_W = 12;
  localparam int TB_H = 10;
  localparam int TB_N = 3;
  localparam int NIMG = 3;
  localparam int STALL_PCT = 30;

  `include "dwt2d_tb_body.svh"

  initial begin
    @(tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ml_dwt2d_top #(.IMG_W(TB_W), .IMG_H(TB_H), .NLIFT(TB_N)) dut (.*);
endmodule
