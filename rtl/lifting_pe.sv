// lifting_pe: one processing element (PE) of the lifting-based (9,7) filter.
//
// A purely combinational 1-D lifting step. Each call takes two new input
// samples, a = x(2n-1) and b = x(2n), and the four core registers (previous
// even sample, d1, s1, d2), and evaluates the four lifting nodes in a chain:
//   d1(2n-1) = a      + alpha*(x(2n-2) + b)
//   s1(2n-2) = x(2n-2)+ beta *(d1(2n-3) + d1(2n-1))
//   d2(2n-3) = d1(2n-3)+gamma*(s1(2n-4) + s1(2n-2))
//   s2(2n-4) = s1(2n-4)+delta*(d2(2n-5) + d2(2n-3))
// It returns the next register values (b, d1, s1, d2) and one output pair:
// lowpass (1/K)*s2(2n-4) and highpass K*d2(2n-3), i.e. the coefficients of
// sample pair n-2. The same PE serves the column DWT and the row DWT.
//
// The dataflow and the four registers follow the document's lifting core; the
// boundary flags (whole-sample symmetric extension, applied by substituting the
// mirrored neighbour), fixed-point format and scaling are this design's choice.
// Timing: no clock; the critical path is four multiply-adds plus the scaling.
module lifting_pe
  import dwt_pkg::*;
(
  input  data_t       a,       // odd sample  x(2n-1)
  input  data_t       b,       // even sample x(2n)
  input  lift_state_t st_in,   // registers before the step
  input  lift_flags_t flags,   // boundary controls
  output lift_state_t st_out,  // registers after the step
  output data_t       low,     // scaled lowpass  of pair n-2
  output data_t       high     // scaled highpass of pair n-2
);

  // base + c*(n0+n1), the product truncated to COEF_FRAC fractional bits
  function automatic data_t lift(input data_t base, input data_t n0, input data_t n1,
                                 input coef_t c);
    logic signed [DATA_W:0]        sum;
    logic signed [DATA_W+COEF_W:0] prod;
    sum  = (DATA_W+1)'(n0) + (DATA_W+1)'(n1);
    prod = (DATA_W+COEF_W+1)'(sum) * (DATA_W+COEF_W+1)'(c);
    return base + DATA_W'(prod >>> COEF_FRAC);
  endfunction

  function automatic data_t scale(input data_t v, input coef_t c);
    logic signed [DATA_W+COEF_W-1:0] prod;
    prod = (DATA_W+COEF_W)'(v) * (DATA_W+COEF_W)'(c);
    return DATA_W'(prod >>> COEF_FRAC);
  endfunction

  data_t b_eff, d1_new, s1_new, d2_new, s2_new;

  always_comb begin
    b_eff  = flags.last ? st_in.x_even : b;
    d1_new = lift(a, st_in.x_even, b_eff, ALPHA);
    s1_new = lift(st_in.x_even, flags.first1 ? d1_new : st_in.d1, d1_new, BETA);
    d2_new = lift(st_in.d1, st_in.s1, flags.flush ? st_in.s1 : s1_new, GAMMA);
    s2_new = lift(st_in.s1, flags.first2 ? d2_new : st_in.d2, d2_new, DELTA);

    st_out.x_even = b;
    st_out.d1     = d1_new;
    st_out.s1     = s1_new;
    st_out.d2     = d2_new;

    low  = scale(s2_new, K_LO);
    high = scale(d2_new, K_HI);
  end

endmodule
