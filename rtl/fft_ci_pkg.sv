// fft_ci_pkg: shared widths, opcodes and operand layouts of the radix-2 DIT
// FFT butterfly custom instructions.
//
// The butterfly X0 = x0 + W*x1, X1 = x0 - W*x1 with x0 = a + jb and
// x1 = c + jd is split into three single-cycle (combinational) custom
// instructions, because one instruction can return only one 32-bit word:
//   * a 32x32 multiplier that forms the four twiddle products c*cos, c*sin,
//     d*cos and d*sin (the processor rescales them from Q16 fixed point);
//   * calculate_x0 and calculate_x1, which add x0 and the four products and
//     return one butterfly output each as {real[15:0], imag[15:0]}.
// The operand layouts below (a 10-bit x0 component in bits 9:0 and two
// 11-bit products above it) and the opcodes 1, 3 and 4 follow the published
// design. Treating every field as two's complement is this design's choice.
package fft_ci_pkg;

  localparam int unsigned WORD_W = 32;  // custom-instruction operand/result width
  localparam int unsigned X_W    = 10;  // x0 component field (a or b), bits 9:0
  localparam int unsigned P_W    = 11;  // each twiddle-product field
  localparam int unsigned OUT_W  = 16;  // each half of a butterfly result
  localparam int unsigned OPC_W  = 8;   // custom-instruction index n[7:0]

  // Opcodes assigned to the three instructions in the processor system.
  localparam logic [OPC_W-1:0] OPC_MULT_DEFAULT = 8'd1;
  localparam logic [OPC_W-1:0] OPC_X0_DEFAULT   = 8'd3;
  localparam logic [OPC_W-1:0] OPC_X1_DEFAULT   = 8'd4;

  // dataa of calculate_x0 / calculate_x1: products of the real part c of x1.
  typedef struct packed {
    logic signed [P_W-1:0] c_sin;  // bits 31:21
    logic signed [P_W-1:0] c_cos;  // bits 20:10
    logic signed [X_W-1:0] a;      // bits  9:0, real part of x0
  } opnd_a_t;

  // datab of calculate_x0 / calculate_x1: products of the imaginary part d of x1.
  typedef struct packed {
    logic signed [P_W-1:0] d_cos;  // bits 31:21
    logic signed [P_W-1:0] d_sin;  // bits 20:10
    logic signed [X_W-1:0] b;      // bits  9:0, imaginary part of x0
  } opnd_b_t;

  // One complex butterfly output.
  typedef struct packed {
    logic signed [OUT_W-1:0] re;   // bits 31:16
    logic signed [OUT_W-1:0] im;   // bits 15:0
  } cplx_out_t;

endpackage
