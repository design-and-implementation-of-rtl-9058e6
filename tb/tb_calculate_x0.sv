// tb_calculate_x0: self-checking testbench for the X0 butterfly instruction.
//
// Packs x0 = a + jb and the four twiddle products into the two operand words
// (a, c*cos, c*sin in dataa; b, d*sin, d*cos in datab), then compares the
// result with {a + c*cos - d*sin, b + c*sin + d*cos} worked out here in
// integer arithmetic and wrapped to 16 bits. Covers the two-point example
// (2 and 6 give X0 = 8), field extremes and random fields. Combinational:
// each result is checked 1 ns after its operands change.
module tb_calculate_x0;
  import fft_ci_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] data_a, data_b, result;
  int checks = 0, failures = 0;

  calculate_x0 dut (.data_a(data_a), .data_b(data_b), .result(result));

  function automatic logic [31:0] pack(input int hi, input int mid, input int lo);
    logic [10:0] h = hi[10:0];
    logic [10:0] m = mid[10:0];
    logic [9:0]  l = lo[9:0];
    return {h, m, l};
  endfunction

  task automatic check(input int a, input int b, input int c_cos, input int c_sin,
                       input int d_sin, input int d_cos);
    int re, im;
    logic [15:0] exp_re, exp_im;
    data_a = pack(c_sin, c_cos, a);
    data_b = pack(d_cos, d_sin, b);
    #1;
    re = a + c_cos - d_sin;
    im = b + c_sin + d_cos;
    exp_re = re[15:0];
    exp_im = im[15:0];
    checks++;
    if (result !== {exp_re, exp_im}) begin
      failures++;
      $display("FAIL: a=%0d b=%0d cc=%0d cs=%0d ds=%0d dc=%0d -> %h, expected %h",
               a, b, c_cos, c_sin, d_sin, d_cos, result, {exp_re, exp_im});
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
    check(2, 0, 6, 0, 0, 0);                 // two-point example: X0 = 8 + 0j
    check(0, 0, 0, 0, 0, 0);
    check(-512, -512, -1024, -1024, 1023, -1024);
    check(511, 511, 1023, 1023, -1024, 1023);
    check(-1, 1, 0, 0, 0, 0);
    check(0, 0, 0, 0, 5, 0);                  // d*sin alone, real part only
    check(0, 0, 0, 0, 0, 7);                  // d*cos alone, imaginary part only
    check(0, 0, 0, 9, 0, 0);                  // c*sin alone, imaginary part only
    for (int i = 0; i < 5000; i++)
      check($urandom_range(1023) - 512, $urandom_range(1023) - 512,
            $urandom_range(2047) - 1024, $urandom_range(2047) - 1024,
            $urandom_range(2047) - 1024, $urandom_range(2047) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
