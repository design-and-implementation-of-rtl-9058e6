// ci_multiplier: combinational multiply custom instruction.
//
// Returns the low 32 bits of the signed product A*B. The FFT software calls
// it four times per butterfly, with A a Q16 twiddle value (cos or sin of the
// angle) and B the real part c or imaginary part d of x1, and divides the
// product by 2^16 itself; the hardware does no scaling, rounding or
// saturation, as in the published design.
//
// Interface: the custom-instruction slave signals dataa -> A, datab -> B,
// result. Timing: purely combinational, zero clock cycles (the instruction
// completes in the processor's execute stage), so it has no clock or reset.
module ci_multiplier
  import fft_ci_pkg::*;
(
  input  logic [WORD_W-1:0] A,
  input  logic [WORD_W-1:0] B,
  output logic [WORD_W-1:0] result
);

  // In a 32-bit context the signed product is already truncated to its
  // low word, which is what the instruction returns.
  always_comb begin
    result = $signed(A) * $signed(B);
  end

endmodule
