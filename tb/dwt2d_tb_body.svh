// Shared body of the end-to-end testbenches of ml_dwt2d_top. The including
// module defines TB_W, TB_H, TB_N (the DUT's image size and N), NIMG (images
// streamed back to back), STALL_PCT (chance in percent that the source holds
// off a requested pixel pair), instantiates the DUT as "dut" on the signals
// declared here and prints the result and finishes on the event tb_done.
// Image 0 is a smooth ramp, image 1 a 0/255 checkerboard (the
// largest highpass response), the others random; the reference must not
// overflow its 16-bit words on any of them.
// Every output pair is compared with dwt_ref_pkg's whole-array transform; the
// test also counts the design's mechanisms (stalls, outputs drained during a
// stall, each boundary case, temporal-buffer reads/writes, the coefficient
// relocation) and checks the cycle count of an image without stalls.

  import dwt_ref_pkg::*;

  localparam int NSLOT   = TB_W/2 + 2;
  localparam int NSTRIPE = (TB_H/2 + 2 + TB_N - 1) / TB_N;
  localparam int IMG_CYC = NSTRIPE * NSLOT * 2 * TB_N;  // cycles per image, no stalls
  // last intermediate row of the last stripe that carries output
  localparam int LAST_R  = 2 * (TB_H/2 + 1 - (NSTRIPE-1) * TB_N) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready, out_valid;
  logic [$clog2(TB_W)-1:0]   in_col;
  logic [$clog2(TB_H/2+2)-1:0] in_pair;
  logic [7:0] in_pix_a, in_pix_b;
  dwt_pkg::vband_e out_band;
  logic [$clog2(TB_H/2)-1:0] out_j;
  logic [$clog2(TB_W/2)-1:0] out_i;
  dwt_pkg::data_t out_lo, out_hi;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  event tb_done;  // the including module reports and ends the run on it

  longint img   [NIMG][TB_H][TB_W];
  longint exp_lo[NIMG][2][TB_H/2][TB_W/2];
  longint exp_hi[NIMG][2][TB_H/2][TB_W/2];
  bit     seen  [NIMG][2][TB_H/2][TB_W/2];

  int in_img = 0, out_img = 0, out_cnt = 0, pairs_in = 0;
  int n_stall = 0, n_drain = 0, n_ram_rd = 0, n_ram_wr = 0, n_ram_both = 0, n_move = 0;
  int n_first1 = 0, n_first2 = 0, n_last = 0, n_flush = 0;
  int n_rfirst1 = 0, n_rfirst2 = 0, n_rlast = 0, n_rflush = 0;
  int n_bandl = 0, n_bandh = 0;
  int cyc = 0, img0_end = -1, img0_rd = -1, img0_wr = -1;
  bit stall_now;

  // reference transform of every image
  task automatic build_refs();
    longint col[], clo[], chi[], row[], rlo[], rhi[];
    longint mid[2][TB_H/2][TB_W];
    for (int n = 0; n < NIMG; n++) begin
      for (int r = 0; r < TB_H; r++)
        for (int c = 0; c < TB_W; c++)
          img[n][r][c] = (n == 0) ? longint'((r*7 + c*3) % 256) :
                         (n == 1) ? longint'(((r + c) % 2) * 255) :
                                    longint'($urandom_range(0, 255));
      for (int c = 0; c < TB_W; c++) begin
        col = new[TB_H];
        for (int r = 0; r < TB_H; r++) col[r] = img[n][r][c];
        fwd97(col, clo, chi);
        for (int j = 0; j < TB_H/2; j++) begin
          mid[0][j][c] = clo[j];
          mid[1][j][c] = chi[j];
        end
      end
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < TB_H/2; j++) begin
          row = new[TB_W];
          for (int c = 0; c < TB_W; c++) row[c] = mid[b][j][c];
          fwd97(row, rlo, rhi);
          for (int i = 0; i < TB_W/2; i++) begin
            exp_lo[n][b][j][i] = rlo[i];
            exp_hi[n][b][j][i] = rhi[i];
            seen[n][b][j][i]   = 1'b0;
          end
        end
    end
  endtask

  // pixel source: follows the scan address, holds off at random
  always_comb begin
    int r;
    in_valid = !stall_now && in_img < NIMG;
    r = 2 * int'(in_pair);
    in_pix_b = (in_img < NIMG && r < TB_H)           ? 8'(img[in_img][r][in_col])   : 8'hA5;
    in_pix_a = (in_img < NIMG && r >= 1 && r <= TB_H) ? 8'(img[in_img][r-1][in_col]) : 8'h5A;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cyc == IMG_CYC) begin
      img0_rd = n_ram_rd;
      img0_wr = n_ram_wr;
    end
    stall_now <= ($urandom_range(0, 99) < STALL_PCT) && (in_img > 0 || STALL_PCT == 0);
    if (in_ready && !in_valid) n_stall++;
    if (in_ready && in_valid) begin
      pairs_in++;
      if (pairs_in == TB_W * (TB_H/2 + 1)) begin
        pairs_in = 0;
        in_img <= in_img + 1;
      end
    end
    if (dut.u_ctrl.ram_re && dut.u_ctrl.adv) n_ram_rd++;
    if (dut.u_ctrl.ram_we && dut.u_ctrl.adv) n_ram_wr++;
    if (dut.u_ctrl.ram_re && dut.u_ctrl.ram_we) n_ram_both++;
    if (dut.u_ctrl.buf_move) n_move++;
    if (dut.u_ctrl.row_commit && !dut.u_ctrl.adv) n_drain++;
    if (dut.u_ctrl.adv && dut.u_ctrl.col_valid) begin
      if (dut.u_ctrl.col_flags.first1) n_first1++;
      if (dut.u_ctrl.col_flags.first2) n_first2++;
      if (dut.u_ctrl.col_flags.last)   n_last++;
      if (dut.u_ctrl.col_flags.flush)  n_flush++;
    end
    if (dut.u_ctrl.row_emit) begin
      if (dut.u_ctrl.row_flags.first2) n_rfirst2++;
      if (dut.u_ctrl.row_flags.last)   n_rlast++;
      if (dut.u_ctrl.row_flags.flush)  n_rflush++;
    end
    if (dut.u_ctrl.row_commit && dut.u_ctrl.row_flags.first1) n_rfirst1++;
    if (out_valid) begin
      checks++;
      if (out_img >= NIMG) begin
        failures++;
        $display("FAIL: output beyond the last image");
      end else begin
        int b;
        b = int'(out_band);
        if (b == 0) n_bandl++; else n_bandh++;
        if (seen[out_img][b][out_j][out_i]) begin
          failures++;
          $display("FAIL: img %0d band %0d (%0d,%0d) output twice", out_img, b, out_j, out_i);
        end
        seen[out_img][b][out_j][out_i] = 1'b1;
        if (longint'(out_lo) != exp_lo[out_img][b][out_j][out_i] ||
            longint'(out_hi) != exp_hi[out_img][b][out_j][out_i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: img %0d band %0d j %0d i %0d: got (%0d,%0d) expected (%0d,%0d)",
                     out_img, b, out_j, out_i, out_lo, out_hi,
                     exp_lo[out_img][b][out_j][out_i], exp_hi[out_img][b][out_j][out_i]);
        end
        out_cnt++;
        if (out_cnt == TB_W*TB_H/2) begin
          out_cnt = 0;
          if (out_img == 0) begin
            img0_end = cyc;
          end
          out_img++;
        end
      end
    end
  end

  task automatic expect_count(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  task automatic expect_seen(input string what, input int got);
    checks++;
    $display("  %-34s %0d", what, got);
    if (got == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    build_refs();
    stall_now = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_img == NIMG);
    repeat (4 * 2 * TB_N) @(posedge clk);
    // completeness
    for (int n = 0; n < NIMG; n++)
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < TB_H/2; j++)
          for (int i = 0; i < TB_W/2; i++) begin
            checks++;
            if (!seen[n][b][j][i]) begin
              failures++;
              if (failures < 10) $display("FAIL: img %0d band %0d (%0d,%0d) missing", n, b, j, i);
            end
          end
    // image 0 streams without stalls: its last output comes one cycle after
    // the last row step (row LAST_R, right-edge flush) of its last stripe
    expect_count("cycles to end of image 0", img0_end, IMG_CYC - 2*TB_N + LAST_R + 2);
    expect_count("temporal buffer reads, image 0",  img0_rd, TB_W * NSTRIPE);
    expect_count("temporal buffer writes, image 0", img0_wr, TB_W * NSTRIPE);
    expect_count("cycles with read and write", n_ram_both, 0);
    expect_count("16-bit overflows in the reference", int'(n_wrap), 0);
    $display("image %0dx%0d, N=%0d, %0d images, %0d cycles", TB_W, TB_H, TB_N, NIMG, cyc);
    if (STALL_PCT > 0) begin
      expect_seen("input stalls", n_stall);
      expect_seen("row steps drained during a stall", n_drain);
    end
    expect_seen("column step 2 (top mirror of d1)", n_first1);
    expect_seen("column step 3 (top mirror of d2)", n_first2);
    expect_seen("column last-pixel step", n_last);
    expect_seen("column flush step", n_flush);
    expect_seen("row step 2 (left mirror of d1)", n_rfirst1);
    expect_seen("row output with left mirror of d2", n_rfirst2);
    expect_seen("row output at last-pixel step", n_rlast);
    expect_seen("row output at flush step", n_rflush);
    expect_seen("coefficient relocations", n_move);
    expect_seen("vertical-L outputs", n_bandl);
    expect_seen("vertical-H outputs", n_bandh);
    -> tb_done;
  end

  // watchdog
  initial begin
    repeat (NIMG * IMG_CYC * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (%0d images out)", out_img);
    -> tb_done;
  end
