// column_dwt: N-lifting column DWT (one PE, one set of registers, single-port
// temporal buffer).
//
// Each cycle the PE performs one column lifting step on a pixel pair. The N
// steps a column receives in one M-scan stripe run back to back: the first
// takes the column's four registers from the temporal buffer (read one cycle
// earlier by the scheduler), the others take them from the local registers
// st_regs, which every step overwrites. The final register values of a column
// are written back to the temporal buffer from st_regs in the first cycle of
// the next column's group. So the RAM sees one read and one write per N steps
// and never both in one cycle, and the PE stays busy every cycle.
//
// Interface: control comes from mscan_ctrl; adv gates every state change;
// col_lo/col_hi are the combinational lowpass/highpass column coefficients of
// the current step (valid pair index k-2 when the scheduler says so).
// The organisation (single PE, registers between steps, RAM access once per N
// steps, Fig. 4/5 style) follows the document; read-ahead and write-back timing
// is this design's choice, made to suit a RAM with synchronous read.
module column_dwt
  import dwt_pkg::*;
#(
  parameter int IMG_W = 128,
  localparam int CW   = $clog2(IMG_W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  logic          col_valid,
  input  logic          from_ram,
  input  lift_flags_t   flags,
  input  pix_t          pix_a,    // row 2k-1
  input  pix_t          pix_b,    // row 2k
  input  logic          ram_re,
  input  logic          ram_we,
  input  logic [CW-1:0] ram_addr,
  output data_t         col_lo,
  output data_t         col_hi
);

  lift_state_t st_regs, st_in, st_out, ram_rdata;

  temporal_buffer #(.DEPTH(IMG_W), .WIDTH(STATE_W)) u_tbuf (
    .clk   (clk),
    .en    (adv && (ram_re || ram_we)),
    .we    (ram_we),
    .addr  (ram_addr),
    .wdata (st_regs),
    .rdata (ram_rdata)
  );

  assign st_in = from_ram ? ram_rdata : st_regs;

  lifting_pe u_pe (
    .a      (data_t'({1'b0, pix_a})),
    .b      (data_t'({1'b0, pix_b})),
    .st_in  (st_in),
    .flags  (flags),
    .st_out (st_out),
    .low    (col_lo),
    .high   (col_hi)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                st_regs <= '0;
    else if (adv && col_valid) st_regs <= st_out;
  end

endmodule
