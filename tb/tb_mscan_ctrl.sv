// tb_mscan_ctrl: runs the scheduler alone for an 8 x 12 image with N = 2 and
// random input stalls, and checks against an independent model of the M-scan:
// the order of the consumed pixel pairs (stripe by stripe, column by column,
// N pairs per column), the addresses of temporal-buffer reads (columns
// 1..W-1, then 0) and writes (columns 0..W-1) in every stripe, that no cycle
// both reads and writes, the number of row outputs and their tags, the cycle
// count of an image without stalls and that pending row steps drain during a
// stall.
module tb_mscan_ctrl;
  import dwt_pkg::*;
  localparam int W = 8, H = 12, N = 2;
  localparam int NSLOT = W/2 + 2, NSTRIPE = (H/2 + 2 + N - 1) / N;
  localparam int IMG_CYC = NSTRIPE * NSLOT * 2 * N;
  localparam int NIMG = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid, in_ready, adv;
  logic [2:0] in_col;
  logic [2:0] in_pair;
  logic col_valid, col_from_ram, ram_re, ram_we, buf_wr_odd, buf_move;
  logic [2:0] ram_addr;
  lift_flags_t col_flags, row_flags;
  logic [0:0] buf_wr_q;
  logic row_commit, row_emit;
  logic [1:0] row_r;
  vband_e out_band;
  logic [2:0] out_j;
  logic [1:0] out_i;

  always #5 clk = ~clk;

  mscan_ctrl #(.IMG_W(W), .IMG_H(H), .NLIFT(N)) dut (.*);

  int checks = 0, failures = 0;
  int exp_col[$], exp_pair[$], exp_rd[$], exp_wr[$];
  int cyc = 0, n_emit = 0, n_drain = 0, n_stall = 0, first_img_cycles = -1;
  bit stall;
  bit tag_seen [NIMG][2][H/2][W/2];
  int img_out = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL: %s (cycle %0d)", msg, cyc);
  endtask

  initial begin
    for (int n = 0; n < NIMG + 1; n++)
      for (int s = 0; s < NSTRIPE; s++) begin
        for (int c = 0; c < W; c++)
          for (int q = 0; q < N; q++)
            if (s*N + q <= H/2) begin
              exp_col.push_back(c);
              exp_pair.push_back(s*N + q);
            end
        for (int c = 1; c < W; c++) exp_rd.push_back(c);
        exp_rd.push_back(0);
        for (int c = 0; c < W; c++) exp_wr.push_back(c);
      end
  end

  assign in_valid = !stall;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    stall <= (cyc > IMG_CYC) && ($urandom_range(0, 99) < 25);
    if (in_ready && !in_valid) n_stall++;
    if (in_ready && in_valid) begin
      checks++;
      if (int'(in_col) != exp_col[0] || int'(in_pair) != exp_pair[0])
        fail($sformatf("pair (%0d,%0d) expected (%0d,%0d)", in_col, in_pair, exp_col[0], exp_pair[0]));
      void'(exp_col.pop_front());
      void'(exp_pair.pop_front());
    end
    if (adv && ram_re) begin
      checks++;
      if (int'(ram_addr) != exp_rd[0]) fail($sformatf("read of %0d expected %0d", ram_addr, exp_rd[0]));
      void'(exp_rd.pop_front());
    end
    if (adv && ram_we) begin
      checks++;
      if (int'(ram_addr) != exp_wr[0]) fail($sformatf("write of %0d expected %0d", ram_addr, exp_wr[0]));
      void'(exp_wr.pop_front());
    end
    if (ram_re && ram_we) fail("read and write in one cycle");
    if (row_commit && !adv) n_drain++;
  end

  // registered output tags: one cycle after row_emit
  logic emit_d;
  always @(posedge clk) emit_d <= rst_n && row_emit;
  always @(negedge clk) if (emit_d && img_out < NIMG) begin
    checks++;
    if (tag_seen[img_out][out_band][out_j][out_i]) fail("output tag repeated");
    tag_seen[img_out][out_band][out_j][out_i] = 1'b1;
    n_emit++;
    if (n_emit == W*H/2) begin
      n_emit = 0;
      if (img_out == 0) first_img_cycles = cyc;
      img_out++;
    end
  end

  initial begin
    stall = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (img_out == NIMG);
    checks++;
    if (first_img_cycles != IMG_CYC + 1) fail($sformatf("image 0 ended at cycle %0d, expected %0d", first_img_cycles, IMG_CYC + 1));
    checks++;
    if (n_stall == 0 || n_drain == 0) fail("no stall or no drained row step");
    for (int n = 0; n < NIMG; n++)
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < H/2; j++)
          for (int i = 0; i < W/2; i++) begin
            checks++;
            if (!tag_seen[n][b][j][i]) fail("output tag missing");
          end
    $display("stalls %0d, drained row steps %0d", n_stall, n_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NIMG * IMG_CYC * 4 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
