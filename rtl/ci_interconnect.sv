// ci_interconnect: custom-instruction interconnect between one processor
// custom-instruction master and N_SLAVES combinational slaves.
//
// Each slave owns one opcode. The index n[7:0] of the executing custom
// instruction is compared with every opcode; the slave that matches is
// selected and its result is returned to the master. An index that no slave
// owns returns zero and drops `hit`. Operands dataa/datab are broadcast to
// all slaves by plain wiring outside this module.
//
// The document assigns one opcode per instruction (1, 3 and 4) but does not
// describe the interconnect logic, which its system builder generates; this
// compare-and-select structure, the zero result on a miss and the `hit` and
// `sel` outputs are this design's own. Opcodes are checked for uniqueness
// at elaboration. Timing: combinational, zero clock cycles.
module ci_interconnect
  import fft_ci_pkg::*;
#(
  parameter int unsigned                    N_SLAVES = 3,
  // Opcode of slave i in bits [8*i +: 8]; default: slaves 0,1,2 = 1,3,4.
  parameter logic [N_SLAVES*OPC_W-1:0]      OPCODES  = {OPC_X1_DEFAULT, OPC_X0_DEFAULT, OPC_MULT_DEFAULT}
) (
  input  logic [OPC_W-1:0]   n,
  input  logic [WORD_W-1:0]  slave_result [N_SLAVES],
  output logic [N_SLAVES-1:0] sel,
  output logic               hit,
  output logic [WORD_W-1:0]  result
);

  // Elaboration-time rule: no two slaves may share an opcode.
  for (genvar i = 0; i < N_SLAVES; i++) begin : g_chk_i
    for (genvar k = i + 1; k < N_SLAVES; k++) begin : g_chk_k
      if (OPCODES[OPC_W*i +: OPC_W] == OPCODES[OPC_W*k +: OPC_W]) begin : g_dup
        $error("ci_interconnect: slaves %0d and %0d share an opcode", i, k);
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_SLAVES; i++) begin
      sel[i] = (n == OPCODES[OPC_W*i +: OPC_W]);
    end
    hit    = |sel;
    result = '0;
    for (int i = 0; i < N_SLAVES; i++) begin
      if (sel[i]) result = result | slave_result[i];
    end
  end

  // At most one slave answers any opcode.
  always_comb begin
    assert ($onehot0(sel) || $isunknown(sel))
      else $error("ci_interconnect: several slaves selected by n=%0d", n);
  end

endmodule
