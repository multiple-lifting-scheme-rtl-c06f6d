// tb_column_dwt: the column DWT driven by the scheduler (mscan_ctrl) on
// random 8 x 12 images with N = 2 and random stalls. Whenever a column step
// yields a valid pair (step k in 2..H/2+1) its lowpass/highpass outputs are
// compared with the reference column transform of that image column.
module tb_column_dwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int W = 8, H = 12, N = 2, NIMG = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid, in_ready, adv;
  logic [2:0] in_col, in_pair, ram_addr;
  logic col_valid, col_from_ram, ram_re, ram_we, buf_wr_odd, buf_move, row_commit, row_emit;
  lift_flags_t col_flags, row_flags;
  logic [0:0] buf_wr_q;
  logic [1:0] row_r, out_i;
  logic [2:0] out_j;
  vband_e out_band;
  pix_t pix_a, pix_b;
  data_t col_lo, col_hi;

  always #5 clk = ~clk;

  mscan_ctrl #(.IMG_W(W), .IMG_H(H), .NLIFT(N)) u_ctrl (.*);
  column_dwt #(.IMG_W(W)) dut (.clk, .rst_n, .adv, .col_valid, .from_ram(col_from_ram),
    .flags(col_flags), .pix_a, .pix_b, .ram_re, .ram_we, .ram_addr, .col_lo, .col_hi);

  int checks = 0, failures = 0, img = 0, pairs = 0, outs = 0;
  longint pix [NIMG][H][W];
  longint elo [NIMG][W][H/2];
  longint ehi [NIMG][W][H/2];
  bit stall;

  initial begin
    longint x[], lo[], hi[];
    for (int n = 0; n < NIMG; n++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) pix[n][r][c] = longint'($urandom_range(0, 255));
      for (int c = 0; c < W; c++) begin
        x = new[H];
        for (int r = 0; r < H; r++) x[r] = pix[n][r][c];
        fwd97(x, lo, hi);
        for (int j = 0; j < H/2; j++) begin
          elo[n][c][j] = lo[j];
          ehi[n][c][j] = hi[j];
        end
      end
    end
  end

  always_comb begin
    int k;
    k = int'(in_pair);
    in_valid = !stall;
    pix_b = (img < NIMG && 2*k < H)            ? pix_t'(pix[img][2*k][in_col])   : 8'hEE;
    pix_a = (img < NIMG && k >= 1 && 2*k <= H) ? pix_t'(pix[img][2*k-1][in_col]) : 8'h11;
  end

  always @(posedge clk) if (rst_n) begin
    int k;
    stall <= ($urandom_range(0, 99) < 20);
    k = int'(in_pair);
    if (adv && col_valid && img < NIMG && k >= 2 && k <= H/2 + 1) begin
      checks++;
      outs++;
      if (longint'(col_lo) != elo[img][in_col][k-2] || longint'(col_hi) != ehi[img][in_col][k-2]) begin
        failures++;
        if (failures < 10)
          $display("FAIL: img %0d col %0d pair %0d got (%0d,%0d) expected (%0d,%0d)", img, in_col, k-2,
                   col_lo, col_hi, elo[img][in_col][k-2], ehi[img][in_col][k-2]);
      end
    end
    if (adv && col_valid && int'(in_col) == W-1 && k == H/2 + 1) img <= img + 1;
  end

  initial begin
    stall = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (img == NIMG);
    checks++;
    if (outs != NIMG * W * H/2) begin
      failures++;
      $display("FAIL: %0d column outputs checked, expected %0d", outs, NIMG * W * H/2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
