// tb_coef_buffer: drives the 4N-register coefficient buffer with the cycle
// pattern of the M-scan (column 2m written in cycles 0..N-1 of slot m, column
// 2m+1 in cycles N..2N-1, move in the last cycle, row r read one cycle behind)
// for N = 2 and N = 3, and checks that every read returns the coefficients of
// columns 2m-1 and 2m for that row. Each coefficient is tagged with its column
// and row, so a value read from the wrong register shows.
module tb_coef_buffer;
  import dwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic data_t val(input int col, input int row);
    return data_t'(col * 16 + row + 1);
  endfunction

  // N = 2
  logic       wr_en2, wr_odd2, move2;
  logic [0:0] wr_q2;
  logic [1:0] rd_r2;
  data_t      lo2, hi2, a2, b2;
  coef_buffer #(.NLIFT(2)) dut2 (.clk, .rst_n, .wr_en(wr_en2), .wr_odd(wr_odd2), .wr_q(wr_q2),
    .wr_lo(lo2), .wr_hi(hi2), .move(move2), .rd_r(rd_r2), .rd_a(a2), .rd_b(b2));

  // N = 3
  logic       wr_en3, wr_odd3, move3;
  logic [1:0] wr_q3;
  logic [2:0] rd_r3;
  data_t      lo3, hi3, a3, b3;
  coef_buffer #(.NLIFT(3)) dut3 (.clk, .rst_n, .wr_en(wr_en3), .wr_odd(wr_odd3), .wr_q(wr_q3),
    .wr_lo(lo3), .wr_hi(hi3), .move(move3), .rd_r(rd_r3), .rd_a(a3), .rd_b(b3));

  task automatic check(input int n, input data_t a, input data_t b, input int m, input int r);
    checks++;
    if (a != val(2*m-1, r) || b != val(2*m, r)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: N=%0d slot %0d row %0d: got (%0d,%0d) expected (%0d,%0d)",
                 n, m, r, a, b, val(2*m-1, r), val(2*m, r));
    end
  endtask

  initial begin
    int md, td;
    wr_en2 = 0; wr_en3 = 0; move2 = 0; move3 = 0; wr_odd2 = 0; wr_odd3 = 0;
    wr_q2 = 0; wr_q3 = 0; rd_r2 = 0; rd_r3 = 0; lo2 = 0; hi2 = 0; lo3 = 0; hi3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // N = 2
    md = -1; td = 0;
    for (int m = 0; m < 12; m++)
      for (int t = 0; t < 4; t++) begin
        wr_en2 = 1'b1; wr_odd2 = (t >= 2); wr_q2 = 1'(t % 2);
        lo2 = val(2*m + (t >= 2), 2*(t % 2)); hi2 = val(2*m + (t >= 2), 2*(t % 2) + 1);
        move2 = (t == 3); rd_r2 = 2'(td);
        #4;
        if (md >= 1) check(2, a2, b2, md, td);
        @(negedge clk);
        md = m; td = t;
      end
    wr_en2 = 1'b0; move2 = 1'b0;
    // N = 3
    md = -1; td = 0;
    for (int m = 0; m < 12; m++)
      for (int t = 0; t < 6; t++) begin
        wr_en3 = 1'b1; wr_odd3 = (t >= 3); wr_q3 = 2'(t % 3);
        lo3 = val(2*m + (t >= 3), 2*(t % 3)); hi3 = val(2*m + (t >= 3), 2*(t % 3) + 1);
        move3 = (t == 5); rd_r3 = 3'(td);
        #4;
        if (md >= 1) check(3, a3, b3, md, td);
        @(negedge clk);
        md = m; td = t;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
