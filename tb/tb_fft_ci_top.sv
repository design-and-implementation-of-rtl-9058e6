// tb_fft_ci_top: end-to-end testbench of the butterfly custom-instruction
// unit, at its default parameters.
//
// The testbench plays the processor: it runs a complete radix-2 DIT FFT in
// "software" (bit-reversal permutation, stage loop, Q16 twiddles truncated
// toward zero, products divided by 2^16 with truncation toward zero) and
// issues every butterfly as four multiplier calls (opcode 1) followed by one
// calculate_x0 (opcode 3) and one calculate_x1 (opcode 4) call on the unit's
// custom-instruction port. One call occupies one cycle of the reference
// clock: operands are driven after a falling edge and the result is taken at
// the next rising edge. The result is also sampled 1 ns after the operands
// change and must already be final, which checks the zero-cycle latency.
//
// Two independent references are kept:
//   * a software FFT with the same fixed-point steps but butterflies in plain
//     integer arithmetic, compared bit-exactly after every butterfly;
//   * the exact DFT, compared within the rounding error of the Q16 steps:
//     for an impulse (closed-form DFT) each stage can add at most about 2,
//     so the bound is 2*log2(N) + 2; for random data (direct-sum DFT) the
//     truncation errors of all butterflies feeding a bin add up like a
//     random walk, so the bound is 4*sqrt(N) + 4.
// Workloads: the two-point example (2 and 6 give 8 and -4), an 8-point and a
// 128-point random complex input, impulses at N = 128, 256, 512, 1024 and
// 4096 (the transform lengths that were timed on the processor), and random
// inputs with components in {-1, 0, 1} at 256, 512, 1024 and 4096. Inputs are
// kept small enough that every x0 field stays within its 10-bit range and
// every product within its 11-bit field at every stage; the testbench counts
// a failure if one does not. It also counts each mechanism of the unit (each
// opcode, an unused opcode returning zero, negative fields being
// sign-extended) and fails if one never occurs.
module tb_fft_ci_top;
  import fft_ci_pkg::*;

  localparam int MAXN = 4096;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [OPC_W-1:0]  ci_n = '0;
  logic [WORD_W-1:0] ci_dataa = '0, ci_datab = '0;
  logic [WORD_W-1:0] ci_result;

  fft_ci_top dut (
    .ci_n(ci_n), .ci_dataa(ci_dataa), .ci_datab(ci_datab), .ci_result(ci_result)
  );

  int checks = 0, failures = 0;
  int n_mult = 0, n_x0 = 0, n_x1 = 0, n_miss = 0, n_neg_field = 0, n_neg_out = 0;
  longint cycles = 0;

  int re [MAXN], im [MAXN];     // data transformed through the custom instructions
  int rre[MAXN], rim[MAXN];     // software reference with the same fixed-point steps
  int xre[MAXN], xim[MAXN];     // original input

  task automatic fail(input string msg);
    failures++;
    if (failures <= 20) $display("FAIL: %s", msg);
  endtask

  // One custom instruction: drive after a falling edge, take the result at
  // the rising edge, and require that it was already there 1 ns after drive.
  task automatic ci_call(input logic [7:0] n, input logic [31:0] a,
                         input logic [31:0] b, output logic [31:0] r);
    logic [31:0] early;
    @(negedge clk);
    ci_n = n;
    ci_dataa = a;
    ci_datab = b;
    #1 early = ci_result;
    @(posedge clk);
    r = ci_result;
    cycles++;
    checks++;
    if (early !== r) fail($sformatf("result of opcode %0d not ready in the issue cycle", n));
    case (n)
      8'd1: n_mult++;
      8'd3: n_x0++;
      8'd4: n_x1++;
      default: ;
    endcase
  endtask

  function automatic int sx16(input logic [15:0] v);
    return int'($signed(v));
  endfunction

  function automatic logic [31:0] pack(input int hi, input int mid, input int lo);
    logic [10:0] h = hi[10:0];
    logic [10:0] m = mid[10:0];
    logic [9:0]  l = lo[9:0];
    return {h, m, l};
  endfunction

  function automatic int bitrev(input int i, input int bits);
    int j = 0;
    for (int k = 0; k < bits; k++) j = (j << 1) | ((i >> k) & 1);
    return j;
  endfunction

  task automatic range_chk(input int v, input int lo, input int hi, input string what);
    if (v < lo || v > hi) fail($sformatf("workload exceeds the %s field: %0d", what, v));
    if (v < 0) n_neg_field++;
  endtask

  // Complete FFT of length n on re/im through the unit, and on rre/rim in
  // plain integer arithmetic.
  task automatic run_fft(input int n);
    int bits, step, half, ai, w_re, w_im;
    int p_cc, p_ds, p_dc, p_cs, q_cc, q_ds, q_dc, q_cs, t_re, t_im, u_re, u_im;
    logic [31:0] r, da, db, r0, r1;
    bits = $clog2(n);
    for (int i = 0; i < n; i++) begin
      re[i] = xre[i]; im[i] = xim[i]; rre[i] = xre[i]; rim[i] = xim[i];
    end
    for (int i = 0; i < n; i++) begin
      int j, t;
      j = bitrev(i, bits);
      if (j > i) begin
        t = re[i];  re[i]  = re[j];  re[j]  = t;
        t = im[i];  im[i]  = im[j];  im[j]  = t;
        t = rre[i]; rre[i] = rre[j]; rre[j] = t;
        t = rim[i]; rim[i] = rim[j]; rim[j] = t;
      end
    end
    for (int stage = 1; stage <= bits; stage++) begin
      step = 1 << stage;
      half = step / 2;
      for (int m = 0; m < half; m++) begin
        ai   = m * n / step;
        w_re = $rtoi($cos(-2.0 * PI * ai / n) * 65536.0);
        w_im = $rtoi($sin(-2.0 * PI * ai / n) * 65536.0);
        for (int i = m; i < n; i += step) begin
          int j;
          j = i + half;
          ci_call(OPC_MULT_DEFAULT, w_re, re[j], r); p_cc = int'($signed(r)) / 65536;
          ci_call(OPC_MULT_DEFAULT, w_im, im[j], r); p_ds = int'($signed(r)) / 65536;
          ci_call(OPC_MULT_DEFAULT, w_re, im[j], r); p_dc = int'($signed(r)) / 65536;
          ci_call(OPC_MULT_DEFAULT, w_im, re[j], r); p_cs = int'($signed(r)) / 65536;
          range_chk(re[i], -512, 511, "a");
          range_chk(im[i], -512, 511, "b");
          range_chk(p_cc, -1024, 1023, "c*cos");
          range_chk(p_cs, -1024, 1023, "c*sin");
          range_chk(p_ds, -1024, 1023, "d*sin");
          range_chk(p_dc, -1024, 1023, "d*cos");
          da = pack(p_cs, p_cc, re[i]);
          db = pack(p_dc, p_ds, im[i]);
          ci_call(OPC_X0_DEFAULT, da, db, r0);
          ci_call(OPC_X1_DEFAULT, da, db, r1);
          re[i] = sx16(r0[31:16]); im[i] = sx16(r0[15:0]);
          re[j] = sx16(r1[31:16]); im[j] = sx16(r1[15:0]);
          if (re[i] < 0 || im[i] < 0 || re[j] < 0 || im[j] < 0) n_neg_out++;

          // Reference butterfly.
          q_cc = int'((longint'(w_re) * rre[j]) / 65536);
          q_ds = int'((longint'(w_im) * rim[j]) / 65536);
          q_dc = int'((longint'(w_re) * rim[j]) / 65536);
          q_cs = int'((longint'(w_im) * rre[j]) / 65536);
          t_re = q_cc - q_ds;
          t_im = q_cs + q_dc;
          u_re = rre[i];
          u_im = rim[i];
          rre[i] = u_re + t_re; rim[i] = u_im + t_im;
          rre[j] = u_re - t_re; rim[j] = u_im - t_im;
          checks++;
          if (re[i] != rre[i] || im[i] != rim[i] || re[j] != rre[j] || im[j] != rim[j])
            fail($sformatf("N=%0d stage %0d butterfly (%0d,%0d): unit %0d (%0d)j %0d (%0d)j, reference %0d (%0d)j %0d (%0d)j",
                           n, stage, i, j, re[i], im[i], re[j], im[j], rre[i], rim[i], rre[j], rim[j]));
        end
      end
    end
  endtask

  // Compare re/im with the exact DFT of xre/xim (direct sum over a table of
  // exp(-j*2*pi*i/N)).
  real ctab[MAXN], stab[MAXN];
  task automatic check_dft(input int n, input real tol);
    real sr, si;
    int idx;
    for (int i = 0; i < n; i++) begin
      ctab[i] = $cos(-2.0 * PI * i / n);
      stab[i] = $sin(-2.0 * PI * i / n);
    end
    for (int k = 0; k < n; k++) begin
      sr = 0.0;
      si = 0.0;
      for (int t = 0; t < n; t++) begin
        idx = (k * t) % n;
        sr += xre[t] * ctab[idx] - xim[t] * stab[idx];
        si += xre[t] * stab[idx] + xim[t] * ctab[idx];
      end
      checks++;
      if ((re[k] - sr) > tol || (sr - re[k]) > tol || (im[k] - si) > tol || (si - im[k]) > tol)
        fail($sformatf("N=%0d X[%0d] = %0d (%0d)j, DFT %f (%f)j", n, k, re[k], im[k], sr, si));
    end
  endtask

  // Random complex input with components in {-1, 0, 1} at length n.
  task automatic run_random_small(input int n);
    for (int i = 0; i < n; i++) begin
      xre[i] = int'($urandom_range(2)) - 1;
      xim[i] = int'($urandom_range(2)) - 1;
    end
    run_fft(n);
    check_dft(n, 4.0 * $sqrt(real'(n)) + 4.0);
    $display("N=%0d random input in {-1,0,1}: checked against the DFT", n);
  endtask

  // Impulse v at position p: X[k] = v * exp(-j*2*pi*k*p/N).
  task automatic run_impulse(input int n, input int p, input int vr, input int vi);
    real tol, ang, er, ei;
    longint c0;
    for (int i = 0; i < n; i++) begin xre[i] = 0; xim[i] = 0; end
    xre[p] = vr;
    xim[p] = vi;
    c0 = cycles;
    run_fft(n);
    checks++;
    if (cycles - c0 != 6 * (n / 2) * $clog2(n))
      fail($sformatf("N=%0d took %0d instruction cycles, expected %0d", n, cycles - c0,
                     6 * (n / 2) * $clog2(n)));
    tol = 2.0 * $clog2(n) + 2.0;
    for (int k = 0; k < n; k++) begin
      ang = -2.0 * PI * ((k * p) % n) / n;
      er  = vr * $cos(ang) - vi * $sin(ang);
      ei  = vr * $sin(ang) + vi * $cos(ang);
      checks++;
      if ((re[k] - er) > tol || (er - re[k]) > tol || (im[k] - ei) > tol || (ei - im[k]) > tol)
        fail($sformatf("impulse N=%0d X[%0d] = %0d (%0d)j, expected %f (%f)j", n, k, re[k], im[k], er, ei));
    end
    $display("N=%0d impulse at %0d: %0d butterflies, %0d instruction cycles", n, p,
             (n / 2) * $clog2(n), cycles - c0);
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;

    // Unused instruction indices return zero.
    for (int v = 0; v < 256; v += 1) begin
      if (v == 1 || v == 3 || v == 4) continue;
      if (v > 8 && v % 37 != 0 && v != 255) continue;
      ci_call(8'(v), 32'h1234_5678, 32'h0000_0100, r);
      n_miss++;
      if (r !== 32'd0) fail($sformatf("unused opcode %0d returned %h", v, r));
    end

    // Two-point example: inputs 2 and 6 give X[0] = 8 and X[1] = -4.
    xre[0] = 2; xim[0] = 0; xre[1] = 6; xim[1] = 0;
    run_fft(2);
    checks++;
    if (re[0] != 8 || im[0] != 0 || re[1] != -4 || im[1] != 0)
      fail($sformatf("two-point FFT gave %0d (%0d)j, %0d (%0d)j", re[0], im[0], re[1], im[1]));

    // 8-point random complex input.
    for (int i = 0; i < 8; i++) begin
      xre[i] = int'($urandom_range(60)) - 30;
      xim[i] = int'($urandom_range(60)) - 30;
    end
    run_fft(8);
    check_dft(8, 4.0 * $sqrt(8.0) + 4.0);

    // 128-point random complex input with components in [-3, 3].
    for (int i = 0; i < 128; i++) begin
      xre[i] = int'($urandom_range(6)) - 3;
      xim[i] = int'($urandom_range(6)) - 3;
    end
    run_fft(128);
    check_dft(128, 4.0 * $sqrt(128.0) + 4.0);

    // Impulses at the transform lengths timed on the processor.
    run_impulse(128,  37,   300, -200);
    run_impulse(256,  101, -250,  180);
    run_impulse(512,  300,  200,  250);
    run_impulse(1024, 777, -300, -150);
    run_impulse(4096, 2901, 280, -220);

    // Random data at the same lengths.
    run_random_small(256);
    run_random_small(512);
    run_random_small(1024);
    run_random_small(4096);

    $display("mechanisms: multiply=%0d x0=%0d x1=%0d unused_opcode=%0d negative_fields=%0d negative_results=%0d",
             n_mult, n_x0, n_x1, n_miss, n_neg_field, n_neg_out);
    if (n_mult == 0)      fail("multiply instruction never issued");
    if (n_x0 == 0)        fail("calculate_x0 never issued");
    if (n_x1 == 0)        fail("calculate_x1 never issued");
    if (n_miss == 0)      fail("unused opcode never issued");
    if (n_neg_field == 0) fail("no negative operand field");
    if (n_neg_out == 0)   fail("no negative butterfly result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
