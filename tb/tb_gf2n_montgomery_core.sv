// Self-checking testbench for gf2n_montgomery_core at n = 163.
//
// Feeds the k least significant coefficients of a, a_0 first, for k = n
// (the full Montgomery product a*b*x^-n) and for random k, and checks
// r * x^k == (a mod x^k) * b  (mod f) with the reference package, which
// needs no inverse. Also checks hold with 'en' low and 'clear'.
module tb_gf2n_montgomery_core;
  import gf2n_ref_pkg::*;

  localparam int N = 163;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clear = 1'b0, en = 1'b0, a_bit = 1'b0;
  logic [N-1:0] b = '0, f = '0, r;
  int           checks = 0, failures = 0;
  int           cycles = 0;

  gf2n_montgomery_core #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input poly_t got, input poly_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run(input poly_t av, input poly_t bv, input poly_t fv, input int k);
    poly_t lo, exp;
    int    c0, d;
    b = bv[N-1:0];
    f = fv[N-1:0];
    lo = trunc(av, k);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    c0 = cycles;
    for (int i = 0; i < k; i++) begin
      en = 1'b1;
      a_bit = av[i];
      @(negedge clk);
    end
    en = 1'b0;
    d = cycles - c0;
    check(poly_t'(d), poly_t'(k), "iteration count");
    exp = mulmod(lo, bv, fv, N);
    check(mulmod(poly_t'(r), xpow(k, fv, N), fv, N), exp, "r*x^k == a_lo*b mod f");
    a_bit = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(mulmod(poly_t'(r), xpow(k, fv, N), fv, N), exp, "hold with en low");
  endtask

  initial begin
    poly_t nist, fv;
    nist = '0;
    nist[7] = 1'b1; nist[6] = 1'b1; nist[3] = 1'b1; nist[0] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(poly_t'(r), '0, "reset value");
    run(trunc('1, N), trunc('1, N), nist, N);
    run(poly_t'(1), poly_t'(1), nist, 1);
    for (int j = 0; j < 20; j++) run(rand_poly(N), rand_poly(N), nist, N);
    for (int j = 0; j < 20; j++) run(rand_poly(N), rand_poly(N), nist, 1 + ($urandom % N));
    for (int j = 0; j < 15; j++) begin
      fv = rand_poly(N);
      fv[0] = 1'b1;
      run(rand_poly(N), rand_poly(N), fv, 1 + ($urandom % N));
    end
    @(negedge clk) clear = 1'b1; en = 1'b1;
    @(negedge clk) clear = 1'b0; en = 1'b0;
    check(poly_t'(r), '0, "clear has priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
