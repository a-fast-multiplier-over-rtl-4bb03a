// End-to-end testbench for gf2n_modified_mult at its default size
// (n = 163, K = 82 iteration cycles, M = 81).
//
// Field: the pentanomial x^163 + x^7 + x^6 + x^3 + 1, plus random
// polynomials with f_0 = 1. Every product is checked as
//     r * x^M == a * b   (mod f)
// against the reference package, together with the cycle count (done exactly
// K+1 edges after the start edge). It also exercises the Montgomery
// representation M(a) = a x^M: conversion in by multiplying with x^(2M),
// a product in that representation, and conversion out by multiplying with 1.
// Counted behaviours, each of which must occur: classical-half reductions,
// Montgomery-half reductions, the idle Montgomery cycle of odd n, starts
// ignored while busy, back-to-back operations, domain conversions.
module tb_gf2n_modified_mult;
  import gf2n_ref_pkg::*;

  localparam int N = 163;
  localparam int K = 82;
  localparam int M = 81;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0, f = '0;
  logic         busy, done;
  logic [N-1:0] r;

  int checks = 0, failures = 0, cycles = 0;
  int n_red_c = 0, n_red_m = 0, n_idle_m = 0, n_ignored = 0, n_b2b = 0, n_conv = 0;

  gf2n_modified_mult dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (start && busy) n_ignored++;
  end

  // Number of reduction steps the textbook serial algorithms takes for one
  // product: classical half (top coefficient set before the shift) and
  // Montgomery half (x^0 coefficient set after adding a_i b). Used only to
  // show that both reductions were exercised.
  task automatic count_reductions(input poly_t av, input poly_t bv, input poly_t fv);
    poly_t rc, rm;
    rc = '0;
    rm = '0;
    for (int i = N - 1; i >= M; i--) begin
      if (rc[N-1]) n_red_c++;
      rc = trunc(rc << 1, N) ^ (rc[N-1] ? trunc(fv, N) : '0) ^ (av[i] ? bv : '0);
    end
    for (int i = 0; i < M; i++) begin
      rm = rm ^ (av[i] ? bv : '0);
      if (rm[0]) begin
        n_red_m++;
        rm = rm ^ trunc(fv, N);
        rm[N] = 1'b1;
      end
      rm = rm >> 1;
    end
    if (K > M) n_idle_m++;
  endtask

  task automatic finish_tb();
    $display("reductions: classical=%0d montgomery=%0d  idle_mont=%0d ignored_starts=%0d back_to_back=%0d conversions=%0d",
             n_red_c, n_red_m, n_idle_m, n_ignored, n_b2b, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  task automatic check(input poly_t got, input poly_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // One multiplication through the handshake; returns r. If 'noisy', start
  // is pulsed again while busy with different operands, which must be ignored.
  task automatic mult(input poly_t av, input poly_t bv, input poly_t fv,
                      input bit noisy, output poly_t res);
    int c0, d, exp_d;
    @(negedge clk);
    a = av[N-1:0]; b = bv[N-1:0]; f = fv[N-1:0];
    start = 1'b1;
    @(posedge clk);
    c0 = cycles;
    @(negedge clk);
    start = 1'b0;
    if (noisy) begin
      a = ~a; b = ~b;
      repeat (5) @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
    end
    while (!done) @(negedge clk);
    d = cycles - c0;
    exp_d = K + 1;
    check(poly_t'(d), poly_t'(exp_d), "done K+1 edges after start");
    res = poly_t'(r);
    count_reductions(av, bv, fv);
    check(poly_t'(busy), '0, "idle with done");
    // result holds after done
    @(negedge clk);
    check(poly_t'(r), res, "result held");
  endtask

  task automatic check_prod(input poly_t av, input poly_t bv, input poly_t fv, input bit noisy);
    poly_t res;
    mult(av, bv, fv, noisy, res);
    check(mulmod(res, xpow(M, fv, N), fv, N), mulmod(av, bv, fv, N), "r*x^M == a*b mod f");
  endtask

  initial begin
    poly_t nist, fv, x2m, ma, mb, mab, back, res, av, bv;
    nist = '0;
    nist[7] = 1'b1; nist[6] = 1'b1; nist[3] = 1'b1; nist[0] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(poly_t'({busy, done}), '0, "idle after reset");

    check_prod(trunc('1, N), trunc('1, N), nist, 1'b0);
    check_prod('0, rand_poly(N), nist, 1'b0);
    for (int k = 0; k < 30; k++) check_prod(rand_poly(N), rand_poly(N), nist, k % 3 == 0);
    for (int k = 0; k < 15; k++) begin
      fv = rand_poly(N);
      fv[0] = 1'b1;
      check_prod(rand_poly(N), rand_poly(N), fv, 1'b0);
    end

    // Montgomery representation round trip: M(a) = MM[a, x^2M], then
    // MM[M(a), M(b)] = M(ab), then MM[M(ab), 1] = ab.
    x2m = xpow(2 * M, nist, N);
    for (int k = 0; k < 5; k++) begin
      av = rand_poly(N);
      bv = rand_poly(N);
      mult(av, x2m, nist, 1'b0, ma);
      check(ma, mulmod(av, xpow(M, nist, N), nist, N), "conversion in");
      mult(bv, x2m, nist, 1'b0, mb);
      mult(ma, mb, nist, 1'b0, mab);
      check(mab, mulmod(mulmod(av, bv, nist, N), xpow(M, nist, N), nist, N), "M(a)M(b) = M(ab)");
      mult(mab, poly_t'(1), nist, 1'b0, back);
      check(back, mulmod(av, bv, nist, N), "conversion out");
      n_conv += 3;
    end

    // back-to-back: start held high in the done cycle starts the next one
    begin
      av = rand_poly(N); bv = rand_poly(N);
      @(negedge clk);
      a = av[N-1:0]; b = bv[N-1:0]; f = nist[N-1:0];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      res = poly_t'(r);
      check(mulmod(res, xpow(M, nist, N), nist, N), mulmod(av, bv, nist, N), "first of pair");
      av = rand_poly(N); bv = rand_poly(N);
      a = av[N-1:0]; b = bv[N-1:0];
      start = 1'b1;                    // same cycle as done
      @(negedge clk);
      start = 1'b0;
      check(poly_t'(busy), poly_t'(1), "restarted in done cycle");
      n_b2b++;
      while (!done) @(negedge clk);
      res = poly_t'(r);
      check(mulmod(res, xpow(M, nist, N), nist, N), mulmod(av, bv, nist, N), "second of pair");
    end

    if (n_red_c == 0)  begin failures++; $display("no classical reduction seen"); end
    if (n_red_m == 0)  begin failures++; $display("no Montgomery reduction seen"); end
    if (n_idle_m == 0) begin failures++; $display("no idle Montgomery cycle seen"); end
    if (n_ignored == 0) begin failures++; $display("no ignored start seen"); end
    if (n_b2b == 0)    begin failures++; $display("no back-to-back operation"); end
    if (n_conv == 0)   begin failures++; $display("no domain conversion"); end
    checks += 6;
    finish_tb();
  end
endmodule
