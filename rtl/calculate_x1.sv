// calculate_x1: difference output X1 = x0 - W*x1 of the radix-2 DIT butterfly.
//
// With x0 = a + jb, x1 = c + jd and W = cos + j*sin, the output is
//   Re X1 = a - c*cos + d*sin,   Im X1 = b - c*sin - d*cos.
// Operands use the same packing as calculate_x0:
//   data_a = {c_sin[10:0], c_cos[10:0], a[9:0]}
//   data_b = {d_cos[10:0], d_sin[10:0], b[9:0]}
// Fields are sign-extended to 16 bits, sums wrap modulo 2^16, and the result
// is {Re X1[15:0], Im X1[15:0]}.
//
// The layout, the term structure and the result packing follow the published
// design. Its worked expansion of the imaginary part starts from -b; this
// module starts from +b instead, which is what X1 = x0 - W*x1 requires and
// what the reference software butterfly computes, so that both halves of the
// butterfly give a correct FFT for complex data.
// Timing: combinational, zero clock cycles; no clock or reset.
module calculate_x1
  import fft_ci_pkg::*;
(
  input  logic [WORD_W-1:0] data_a,
  input  logic [WORD_W-1:0] data_b,
  output logic [WORD_W-1:0] result
);

  opnd_a_t   fa;
  opnd_b_t   fb;
  cplx_out_t out;
  logic signed [OUT_W-1:0] a, b, c_cos, c_sin, d_sin, d_cos;
  logic signed [OUT_W-1:0] term5, term6, term7, term8;

  always_comb begin
    fa    = opnd_a_t'(data_a);
    fb    = opnd_b_t'(data_b);
    a     = OUT_W'(fa.a);
    c_cos = OUT_W'(fa.c_cos);
    c_sin = OUT_W'(fa.c_sin);
    b     = OUT_W'(fb.b);
    d_sin = OUT_W'(fb.d_sin);
    d_cos = OUT_W'(fb.d_cos);

    term5 = a - c_cos;
    term6 = term5 + d_sin;   // real part
    term7 = b - c_sin;
    term8 = term7 - d_cos;   // imaginary part

    out.re = term6;
    out.im = term8;
    result = out;
  end

endmodule
