// row_dwt: row DWT of the M-scan, one PE shared by the 2N rows of a stripe.
//
// The M-scan interleaves 2N intermediate rows, so the row lifting core's four
// registers are kept per row in a 2N x 4 word register array (8N words; 16 for
// the two-lifting scheme). On row_commit the PE takes row r's registers and the
// coefficient pair of columns 2m-1 (a) and 2m (b), and the new register values
// are written back. When emit is also high, the scaled lowpass/highpass pair
// is registered on out_lo/out_hi with out_valid for one cycle.
// The register array size follows the document; the output register is this
// design's choice. Latency: one cycle from commit to out_valid.
module row_dwt
  import dwt_pkg::*;
#(
  parameter int NLIFT = 2,
  localparam int RW   = $clog2(2*NLIFT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  logic          emit,
  input  logic [RW-1:0] r,
  input  lift_flags_t   flags,
  input  data_t         a,
  input  data_t         b,
  output logic          out_valid,
  output data_t         out_lo,
  output data_t         out_hi
);

  localparam int R = 2*NLIFT;

  lift_state_t st [R];
  lift_state_t st_out;
  data_t       lo, hi;

  lifting_pe u_pe (
    .a      (a),
    .b      (b),
    .st_in  (st[r]),
    .flags  (flags),
    .st_out (st_out),
    .low    (lo),
    .high   (hi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < R; i++) st[i] <= '0;
      out_valid <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else begin
      if (commit) st[r] <= st_out;
      out_valid <= emit;
      if (emit) begin
        out_lo <= lo;
        out_hi <= hi;
      end
    end
  end

endmodule
