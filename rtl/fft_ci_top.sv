// fft_ci_top: butterfly custom-instruction unit of the FFT processor system.
//
// The processor runs the radix-2 decimation-in-time FFT in software (bit
// reversal, stage and butterfly loops, Q16 twiddle generation and rescaling)
// and hands the arithmetic of every butterfly to three custom instructions
// on its custom-instruction master port:
//   opcode OPC_MULT (1): ci_multiplier, 32x32 signed product;
//   opcode OPC_X0   (3): calculate_x0, {Re, Im} of x0 + W*x1;
//   opcode OPC_X1   (4): calculate_x1, {Re, Im} of x0 - W*x1.
// A butterfly therefore costs four multiplier calls followed by one
// calculate_x0 and one calculate_x1 call. ci_interconnect selects the slave
// by the instruction index n; an unused index returns zero.
//
// Ports are the processor's combinational custom-instruction master signals
// (n, dataa, datab, result). All three instructions are combinational: the
// result is valid in the same cycle as the operands, with no clock, reset or
// handshake. The instruction set, opcodes and the combinational timing
// follow the published system; the memories, SDRAM controller, PLL, JTAG UART
// and timer of that system are vendor parts and are not part of this RTL.
module fft_ci_top
  import fft_ci_pkg::*;
#(
  parameter logic [OPC_W-1:0] OPC_MULT = OPC_MULT_DEFAULT,
  parameter logic [OPC_W-1:0] OPC_X0   = OPC_X0_DEFAULT,
  parameter logic [OPC_W-1:0] OPC_X1   = OPC_X1_DEFAULT
) (
  input  logic [OPC_W-1:0]  ci_n,
  input  logic [WORD_W-1:0] ci_dataa,
  input  logic [WORD_W-1:0] ci_datab,
  output logic [WORD_W-1:0] ci_result
);

  localparam int unsigned NS = 3;

  logic [WORD_W-1:0] slave_result [NS];

  ci_multiplier u_mult (
    .A      (ci_dataa),
    .B      (ci_datab),
    .result (slave_result[0])
  );

  calculate_x0 u_x0 (
    .data_a (ci_dataa),
    .data_b (ci_datab),
    .result (slave_result[1])
  );

  calculate_x1 u_x1 (
    .data_a (ci_dataa),
    .data_b (ci_datab),
    .result (slave_result[2])
  );

  ci_interconnect #(
    .N_SLAVES (NS),
    .OPCODES  ({OPC_X1, OPC_X0, OPC_MULT})
  ) u_ic (
    .n            (ci_n),
    .slave_result (slave_result),
    .sel          (),
    .hit          (),
    .result       (ci_result)
  );

endmodule
