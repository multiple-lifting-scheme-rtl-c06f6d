// tb_ml_dwt2d_top: end-to-end test of ml_dwt2d_top at its default size
// (128 x 128 image, two-lifting scheme). Three images are streamed back to
// back; the first without stalls (its cycle count is checked), the others with
// random source stalls. All outputs are compared with a reference transform.
module tb_ml_dwt2d_top;
  localparam int TB_W = 128;
  localparam int TB_H = 128;
  localparam int TB_N = 2;
  localparam int NIMG = 3;
  localparam int STALL_PCT = 20;

  `include "dwt2d_tb_body.svh"

  initial begin
    @(tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ml_dwt2d_top dut (.*);
endmodule
