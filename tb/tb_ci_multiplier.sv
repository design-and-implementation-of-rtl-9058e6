// tb_ci_multiplier: self-checking testbench for the multiply custom instruction.
//
// Applies corner cases, Q16 twiddle-times-sample products as the FFT software
// issues them, and random 32-bit operands, and compares the result with the
// low word of a 64-bit product computed here. The instruction is
// combinational, so every result is checked 1 ns after its operands change,
// without any clock edge in between. A watchdog ends the run after a fixed
// number of cycles of a free-running reference clock.
module tb_ci_multiplier;
  import fft_ci_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] A, B, result;
  int checks = 0, failures = 0;

  ci_multiplier dut (.A(A), .B(B), .result(result));

  task automatic check(input logic [31:0] a, input logic [31:0] b);
    longint pe;
    logic [31:0] expv;
    A = a;
    B = b;
    #1;
    pe   = longint'($signed(a)) * longint'($signed(b));
    expv = pe[31:0];
    checks++;
    if (result !== expv) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d, expected %0d", $signed(a), $signed(b),
               $signed(result), $signed(expv));
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd0, 32'd0);
    check(32'd1, 32'hFFFF_FFFF);
    check(32'h7FFF_FFFF, 32'd2);
    check(32'h8000_0000, 32'hFFFF_FFFF);
    check(32'd65536, 32'd6);            // cos(0) in Q16 times 6
    check(32'd65536, -32'sd6);
    check(-32'sd46340, 32'd300);        // cos(3*pi/4) in Q16 times 300
    check(32'd46340, -32'sd511);
    check(-32'sd65536, 32'd12345);
    check(32'h0001_2345, 32'h0002_0001);  // operand bits above bit 15 matter
    for (int i = 0; i < 5000; i++) check($urandom, $urandom);
    for (int i = 0; i < 2000; i++)
      check(32'($signed($urandom_range(131072)) - 65536),
            32'($signed($urandom_range(2047)) - 1024));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
