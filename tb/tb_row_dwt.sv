// tb_row_dwt: feeds the row DWT (N = 2, four interleaved rows) row steps in
// M-scan order for 10-wide random rows: for each step m = 0..W/2+1, rows
// r = 0..3 in turn with columns (2m-1, 2m). Outputs, emitted from step 2 on,
// must equal the reference transform of each row and arrive one cycle after
// the step. A step with commit low in between must leave the rows untouched.
module tb_row_dwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int W = 10, N = 2, R = 2*N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic commit, emit, out_valid;
  logic [1:0] r;
  lift_flags_t flags;
  data_t a, b, out_lo, out_hi;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  row_dwt #(.NLIFT(N)) dut (.clk, .rst_n, .commit, .emit, .r, .flags, .a, .b, .out_valid, .out_lo, .out_hi);

  initial begin
    longint x[R][], lo[R][], hi[R][];
    commit = 0; emit = 0; r = 0; flags = '0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 0; i < R; i++) begin
        x[i] = new[W];
        foreach (x[i][c]) x[i][c] = longint'($urandom_range(0, 3000)) - 1500;
        fwd97(x[i], lo[i], hi[i]);
      end
      for (int m = 0; m <= W/2 + 1; m++)
        for (int i = 0; i < R; i++) begin
          r = 2'(i);
          a = (2*m-1 >= 0 && 2*m-1 < W) ? data_t'(x[i][2*m-1]) : data_t'(16'h7777);
          b = (2*m < W) ? data_t'(x[i][2*m]) : data_t'(16'h0F0F);
          flags.first1 = (m == 1);
          flags.first2 = (m == 2);
          flags.last   = (m == W/2);
          flags.flush  = (m == W/2 + 1);
          commit = 1'b1;
          emit   = (m >= 2);
          @(negedge clk);
          checks++;
          if (out_valid != (m >= 2)) begin
            failures++;
            $display("FAIL: out_valid %0b at step %0d", out_valid, m);
          end
          if (m >= 2) begin
            checks++;
            if (longint'(out_lo) != lo[i][m-2] || longint'(out_hi) != hi[i][m-2]) begin
              failures++;
              if (failures < 10)
                $display("FAIL: row %0d step %0d got (%0d,%0d) expected (%0d,%0d)",
                         i, m, out_lo, out_hi, lo[i][m-2], hi[i][m-2]);
            end
          end
          // an idle cycle with garbage operands and commit low
          if ((m + i) % 3 == 0) begin
            commit = 1'b0; emit = 1'b0; a = 16'sd12345; b = -16'sd999; r = 2'(i ^ 1);
            @(negedge clk);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
