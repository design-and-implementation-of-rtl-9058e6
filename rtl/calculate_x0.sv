// calculate_x0: sum output X0 = x0 + W*x1 of the radix-2 DIT butterfly.
//
// With x0 = a + jb, x1 = c + jd and W = cos + j*sin (sin already carries the
// sign of the forward transform's negative angle), the output is
//   Re X0 = a + c*cos - d*sin,   Im X0 = b + c*sin + d*cos.
// The processor has already formed the four products with ci_multiplier and
// packs them, with the x0 components, into the two operands:
//   data_a = {c_sin[10:0], c_cos[10:0], a[9:0]}
//   data_b = {d_cos[10:0], d_sin[10:0], b[9:0]}
// Every field is sign-extended to 16 bits and the sums wrap modulo 2^16; the
// result is {Re X0[15:0], Im X0[15:0]}.
//
// The field layout, the four adder terms and the {real, imag} result follow
// the published design; two's-complement fields and wrap-around (no
// saturation) are this design's reading of what it leaves open.
// Timing: combinational, zero clock cycles; no clock or reset.
module calculate_x0
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
  logic signed [OUT_W-1:0] term1, term2, term3, term4;

  always_comb begin
    fa    = opnd_a_t'(data_a);
    fb    = opnd_b_t'(data_b);
    a     = OUT_W'(fa.a);
    c_cos = OUT_W'(fa.c_cos);
    c_sin = OUT_W'(fa.c_sin);
    b     = OUT_W'(fb.b);
    d_sin = OUT_W'(fb.d_sin);
    d_cos = OUT_W'(fb.d_cos);

    term1 = a + c_cos;
    term2 = term1 - d_sin;   // real part
    term3 = b + c_sin;
    term4 = term3 + d_cos;   // imaginary part

    out.re = term2;
    out.im = term4;
    result = out;
  end

endmodule
