// tb_ci_interconnect: self-checking testbench for the custom-instruction
// interconnect.
//
// Gives each of the three slaves a distinct random result and walks the
// instruction index n over all 256 values. For every n it expects the slave
// whose opcode (1, 3 or 4) equals n to be selected alone and its result
// returned, and zero with `hit` low for every other n. Combinational: each
// output is checked 1 ns after n changes.
module tb_ci_interconnect;
  import fft_ci_pkg::*;

  localparam int unsigned NS = 3;
  localparam logic [7:0] OPC [NS] = '{8'd1, 8'd3, 8'd4};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [OPC_W-1:0]  n;
  logic [WORD_W-1:0] slave_result [NS];
  logic [NS-1:0]     sel;
  logic              hit;
  logic [WORD_W-1:0] result;
  int checks = 0, failures = 0;

  ci_interconnect dut (
    .n(n), .slave_result(slave_result), .sel(sel), .hit(hit), .result(result)
  );

  task automatic check_all();
    for (int v = 0; v < 256; v++) begin
      logic [NS-1:0]     exp_sel;
      logic [WORD_W-1:0] exp_res;
      n = 8'(v);
      #1;
      exp_sel = '0;
      exp_res = '0;
      for (int s = 0; s < NS; s++)
        if (OPC[s] == 8'(v)) begin
          exp_sel[s] = 1'b1;
          exp_res    = slave_result[s];
        end
      checks++;
      if (sel !== exp_sel || hit !== (|exp_sel) || result !== exp_res) begin
        failures++;
        $display("FAIL: n=%0d sel=%b hit=%b result=%h, expected sel=%b result=%h",
                 v, sel, hit, result, exp_sel, exp_res);
      end
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int s = 0; s < NS; s++) slave_result[s] = $urandom;
      if (r == 0) slave_result[0] = 32'hFFFF_FFFF;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
