// coef_buffer: the 4N registers that hand intermediate coefficients from the
// column DWT to the row DWT under the M-scan (N = NLIFT).
//
// An M-scan stripe covers 2N image rows, so each column yields 2N intermediate
// coefficients (N lowpass/highpass pairs), and the row DWT consumes one
// coefficient pair per row in the row direction: odd column 2m-1 (operand a)
// and even column 2m (operand b). Registers ev[] hold the even column, od[]
// the odd one; the column DWT writes rows 2q (lowpass) and 2q+1 (highpass) of
// the selected column on wr_en. The row DWT reads row rd_r combinationally.
//
// With one column step and one row step per cycle, the next odd column
// overwrites od[2N-1] one cycle before its last reader. On move (issued in
// the last cycle of every 2N-cycle slot) that value is therefore copied into
// ev[2N-2], which has just been consumed and will not be rewritten for N
// cycles, and row 2N-1 reads its odd operand from there. The register count
// (4N) follows the document; this allocation is this design's choice.
module coef_buffer
  import dwt_pkg::*;
#(
  parameter int NLIFT = 2,
  localparam int QW   = (NLIFT > 1) ? $clog2(NLIFT) : 1,
  localparam int RW   = $clog2(2*NLIFT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          wr_odd,  // 1: odd column, 0: even column
  input  logic [QW-1:0] wr_q,    // pair index inside the stripe
  input  data_t         wr_lo,
  input  data_t         wr_hi,
  input  logic          move,
  input  logic [RW-1:0] rd_r,    // row inside the stripe
  output data_t         rd_a,    // odd column 2m-1
  output data_t         rd_b     // even column 2m
);

  localparam int R = 2*NLIFT;

  data_t ev [R];
  data_t od [R];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++) begin
        ev[i] <= '0;
        od[i] <= '0;
      end
    end else begin
      if (wr_en && wr_odd) begin
        od[2*wr_q]   <= wr_lo;
        od[2*wr_q+1] <= wr_hi;
      end
      if (wr_en && !wr_odd) begin
        ev[2*wr_q]   <= wr_lo;
        ev[2*wr_q+1] <= wr_hi;
      end
      if (move) ev[R-2] <= od[R-1];
    end
  end

  assign rd_b = ev[rd_r];
  assign rd_a = (rd_r == RW'(R-1)) ? ev[R-2] : od[rd_r];

  // The relocated value must never collide with an even-column write.
  always_comb a_move_no_clash: assert (!(move && wr_en && !wr_odd && wr_q == QW'(NLIFT-1)));

endmodule
