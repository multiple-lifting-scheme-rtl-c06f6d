// ml_dwt2d_top: one-level line-based 2-D (9,7) DWT with the multiple-lifting
// column DWT and the M-scan, for IMG_W x IMG_H images of 8-bit pixels.
//
// Column-row order, as in JPEG2000: pixel pairs enter the column DWT (one PE,
// N-lifting schedule, single-port temporal buffer of IMG_W words), whose
// lowpass/highpass column coefficients go through 4N registers (coef_buffer)
// straight into the row DWT (one PE, 8N-word register array). No line-sized
// data buffer is needed between the two 1-D transforms because the M-scan
// feeds N row pairs of a column before moving to the next column.
//
// Input: the pixel source follows in_col/in_pair; when in_ready is high it
// must present rows 2*in_pair-1 (in_pix_a) and 2*in_pair (in_pix_b) of column
// in_col with in_valid, otherwise the datapath holds. Lane a of row pair 0 and
// lane b of the last pair (rows -1 and IMG_H) are ignored. Rows are paired
// (2k-1, 2k) for k = 0..IMG_H/2, in stripes of N pairs per column.
// Output: one registered coefficient pair per out_valid: vertical band
// out_band (L or H), subband row out_j, column out_i; out_lo is the
// horizontal lowpass (LL or LH coefficient), out_hi the horizontal highpass
// (HL or HH). Every IMG_W*IMG_H/2 pairs make one image. Throughput: one pixel
// pair per cycle while a stripe's columns are scanned; each stripe adds 4N
// cycles of edge handling, and the image ends with up to N+2 extra pair steps.
// The structure follows the document; the port protocol is this design's.
module ml_dwt2d_top
  import dwt_pkg::*;
#(
  parameter int IMG_W = 128,  // image width (document: 128)
  parameter int IMG_H = 128,  // image height (not given by the document)
  parameter int NLIFT = 2,    // N of the N-lifting scheme (document: 2 and 4)
  localparam int CW   = $clog2(IMG_W),
  localparam int HW   = $clog2(IMG_H/2 + 2),
  localparam int JW   = (IMG_H > 2) ? $clog2(IMG_H/2) : 1,
  localparam int IW   = (IMG_W > 2) ? $clog2(IMG_W/2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic [CW-1:0] in_col,
  output logic [HW-1:0] in_pair,
  input  pix_t          in_pix_a,
  input  pix_t          in_pix_b,
  output logic          out_valid,
  output vband_e        out_band,
  output logic [JW-1:0] out_j,
  output logic [IW-1:0] out_i,
  output data_t         out_lo,
  output data_t         out_hi
);

  localparam int QW = (NLIFT > 1) ? $clog2(NLIFT) : 1;
  localparam int RW = $clog2(2*NLIFT);

  logic          adv, col_valid, col_from_ram, ram_re, ram_we;
  logic [CW-1:0] ram_addr;
  lift_flags_t   col_flags, row_flags;
  logic          buf_wr_odd, buf_move, row_commit, row_emit;
  logic [QW-1:0] buf_wr_q;
  logic [RW-1:0] row_r;
  data_t         col_lo, col_hi, row_a, row_b;

  mscan_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .NLIFT(NLIFT)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .in_col, .in_pair, .adv,
    .col_valid, .col_from_ram, .col_flags, .ram_re, .ram_we, .ram_addr,
    .buf_wr_odd, .buf_wr_q, .buf_move,
    .row_commit, .row_emit, .row_r, .row_flags,
    .out_band, .out_j, .out_i
  );

  column_dwt #(.IMG_W(IMG_W)) u_col (
    .clk, .rst_n, .adv, .col_valid,
    .from_ram (col_from_ram),
    .flags    (col_flags),
    .pix_a    (in_pix_a),
    .pix_b    (in_pix_b),
    .ram_re, .ram_we, .ram_addr,
    .col_lo, .col_hi
  );

  coef_buffer #(.NLIFT(NLIFT)) u_buf (
    .clk, .rst_n,
    .wr_en  (adv && col_valid),
    .wr_odd (buf_wr_odd),
    .wr_q   (buf_wr_q),
    .wr_lo  (col_lo),
    .wr_hi  (col_hi),
    .move   (buf_move),
    .rd_r   (row_r),
    .rd_a   (row_a),
    .rd_b   (row_b)
  );

  row_dwt #(.NLIFT(NLIFT)) u_row (
    .clk, .rst_n,
    .commit (row_commit),
    .emit   (row_emit),
    .r      (row_r),
    .flags  (row_flags),
    .a      (row_a),
    .b      (row_b),
    .out_valid, .out_lo, .out_hi
  );

endmodule
