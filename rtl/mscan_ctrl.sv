// mscan_ctrl: M-scan sequencer and N-lifting scheduler of the 2-D DWT.
//
// The image is scanned in stripes of 2N rows (N = NLIFT). Inside a stripe the
// scan walks the columns left to right and, in each column, takes N row pairs
// top to bottom, one pair per cycle (the M-shaped scan). Row pair k of a
// column is (row 2k-1, row 2k); k runs from 0 to IMG_H/2+1, where pair 0 holds
// only row 0 and the last two pairs complete the lifting steps of the column
// bottom (symmetric extension), so a column has NSTEP = IMG_H/2+2 steps and
// the image NSTRIPE = ceil(NSTEP/N) stripes.
//
// Time inside a stripe is counted in slots of 2N cycles: slot m feeds columns
// 2m (cycles 0..N-1) and 2m+1 (cycles N..2N-1) to the column DWT. The row DWT
// runs one cycle behind: in slot m it takes row step m (columns 2m-1, 2m) for
// the 2N intermediate rows of the stripe, one row per cycle. Slots IMG_W/2 and
// IMG_W/2+1 carry no columns and finish the row lifting at the right image
// edge, so a stripe takes (IMG_W/2+2)*2N cycles.
//
// Temporal-buffer schedule (N-lifting): a column's four registers are read
// from the single-port RAM in the last cycle of the preceding column group
// (data valid in the group's first cycle), kept in registers for the N steps,
// and written back in the first cycle of the following group. Reads and writes
// therefore fall in different cycles: one access per cycle at most, and two
// accesses per N column steps.
//
// Handshake: in_ready is high when the current cycle consumes a pixel pair
// (image column in_col, rows 2*in_pair-1 and 2*in_pair). If in_valid is low,
// the whole datapath holds (adv low). A row step that is pending while the
// datapath holds is still performed once (row_commit), so outputs drain.
// The scan order, the stripe height 2N and the read/write alternation follow
// the document; cycle offsets, flush slots and the stall rule are this design's.
module mscan_ctrl
  import dwt_pkg::*;
#(
  parameter int IMG_W = 128,
  parameter int IMG_H = 128,
  parameter int NLIFT = 2,
  localparam int NSLOT   = IMG_W/2 + 2,
  localparam int NSTEP   = IMG_H/2 + 2,
  localparam int NSTRIPE = (NSTEP + NLIFT - 1) / NLIFT,
  localparam int T       = 2*NLIFT,
  localparam int CW      = $clog2(IMG_W),
  localparam int HW      = $clog2(IMG_H/2 + 2),
  localparam int QW      = (NLIFT > 1) ? $clog2(NLIFT) : 1,
  localparam int RW      = $clog2(T),
  localparam int JW      = (IMG_H > 2) ? $clog2(IMG_H/2) : 1,
  localparam int IW      = (IMG_W > 2) ? $clog2(IMG_W/2) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel input
  input  logic          in_valid,
  output logic          in_ready,
  output logic [CW-1:0] in_col,
  output logic [HW-1:0] in_pair,
  output logic          adv,
  // column DWT
  output logic          col_valid,
  output logic          col_from_ram,
  output lift_flags_t   col_flags,
  output logic          ram_re,
  output logic          ram_we,
  output logic [CW-1:0] ram_addr,
  // coefficient buffer
  output logic          buf_wr_odd,
  output logic [QW-1:0] buf_wr_q,
  output logic          buf_move,
  // row DWT
  output logic          row_commit,
  output logic          row_emit,
  output logic [RW-1:0] row_r,
  output lift_flags_t   row_flags,
  // tags of the output registered on row_emit
  output vband_e        out_band,
  output logic [JW-1:0] out_j,
  output logic [IW-1:0] out_i
);

  localparam int SW = (NSTRIPE > 1) ? $clog2(NSTRIPE) : 1;
  localparam int MW = $clog2(NSLOT);

  // ---------------- column side: current scan position ----------------
  logic [SW-1:0] s;
  logic [MW-1:0] m;
  logic [RW-1:0] t;
  logic [QW-1:0] q;
  logic          odd;
  int unsigned   k;
  logic [CW-1:0] col;

  always_comb begin
    odd       = (t >= RW'(NLIFT));
    q         = QW'(odd ? t - RW'(NLIFT) : t);
    k         = int'(s) * NLIFT + int'(q);
    col       = CW'(2*int'(m) + int'(odd));
    col_valid = (int'(m) < IMG_W/2);
    in_ready  = col_valid && (k <= IMG_H/2);
    in_col    = col;
    in_pair   = HW'(k);
    adv       = !in_ready || in_valid;

    col_from_ram     = (q == '0);
    col_flags.first1 = (k == 1);
    col_flags.first2 = (k == 2);
    col_flags.last   = (k == IMG_H/2);
    col_flags.flush  = (k == IMG_H/2 + 1);

    buf_wr_odd = odd;
    buf_wr_q   = q;
    buf_move   = adv && (t == RW'(T-1));

    // temporal buffer: write back the previous group, read ahead the next one
    ram_we   = 1'b0;
    ram_re   = 1'b0;
    ram_addr = '0;
    if (t == RW'(NLIFT)) begin
      ram_we   = (int'(m) < IMG_W/2);
      ram_addr = CW'(2*int'(m));
    end else if (t == '0) begin
      ram_we   = (int'(m) >= 1) && (int'(m) <= IMG_W/2);
      ram_addr = CW'(2*int'(m) - 1);
    end else if (t == RW'(NLIFT-1)) begin
      ram_re   = (int'(m) < IMG_W/2);
      ram_addr = CW'(2*int'(m) + 1);
    end else if (t == RW'(T-1)) begin
      ram_re   = (int'(m) + 1 < IMG_W/2) || (int'(m) == NSLOT-1);
      ram_addr = (int'(m) == NSLOT-1) ? '0 : CW'(2*int'(m) + 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
      m <= '0;
      t <= '0;
    end else if (adv) begin
      if (t == RW'(T-1)) begin
        t <= '0;
        if (m == MW'(NSLOT-1)) begin
          m <= '0;
          s <= (s == SW'(NSTRIPE-1)) ? '0 : s + 1'b1;
        end else begin
          m <= m + 1'b1;
        end
      end else begin
        t <= t + 1'b1;
      end
    end
  end

  // ---------------- row side: one cycle behind ----------------
  logic          rv_d, emitted;
  logic [SW-1:0] s_d;
  logic [MW-1:0] m_d;
  logic [RW-1:0] t_d;
  int unsigned   kr;
  logic          row_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_d    <= 1'b0;
      emitted <= 1'b0;
      s_d     <= '0;
      m_d     <= '0;
      t_d     <= '0;
    end else begin
      if (adv) begin
        rv_d <= 1'b1;
        s_d  <= s;
        m_d  <= m;
        t_d  <= t;
      end
      emitted <= adv ? 1'b0 : (emitted | row_commit);
    end
  end

  always_comb begin
    kr     = int'(s_d) * NLIFT + int'(t_d) / 2;
    row_r  = t_d;
    row_commit = rv_d && !emitted;
    row_flags.first1 = (m_d == MW'(1));
    row_flags.first2 = (m_d == MW'(2));
    row_flags.last   = (int'(m_d) == IMG_W/2);
    row_flags.flush  = (int'(m_d) == IMG_W/2 + 1);
    row_ok   = (m_d >= MW'(2)) && (kr >= 2) && (kr <= IMG_H/2 + 1);
    row_emit = row_commit && row_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_band <= BAND_L;
      out_j    <= '0;
      out_i    <= '0;
    end else if (row_emit) begin
      out_band <= vband_e'(t_d[0]);
      out_j    <= JW'(kr - 2);
      out_i    <= IW'(int'(m_d) - 2);
    end
  end

  // The N-lifting schedule needs at least two cycles per column group so that
  // the read and the write of the temporal buffer fall in different cycles.
  initial assert (NLIFT >= 2 && IMG_W % 2 == 0 && IMG_H % 2 == 0 && IMG_W >= 4 && IMG_H >= 4)
    else $error("mscan_ctrl: NLIFT >= 2 and even image sizes >= 4 required");

  always_comb a_single_port: assert (!(ram_re && ram_we));

endmodule
