// Self-checking testbench for gf2n_classical_core at n = 163.
//
// Feeds all n coefficients of a, most significant first, and compares the
// accumulator with a*b mod f from the reference package. Uses the degree-163
// pentanomial x^163 + x^7 + x^6 + x^3 + 1 and random field polynomials with
// f_0 = 1 (the congruence holds whether or not f is irreducible). Also checks
// that 'en' low holds the register, that 'clear' zeroes it, and that a run
// takes exactly n enabled cycles.
module tb_gf2n_classical_core;
  import gf2n_ref_pkg::*;

  localparam int N = 163;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clear = 1'b0, en = 1'b0, a_bit = 1'b0;
  logic [N-1:0] b = '0, f = '0, r;
  int           checks = 0, failures = 0;
  int           cycles = 0;

  gf2n_classical_core #(.N(N)) dut (.*);

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

  task automatic run(input poly_t av, input poly_t bv, input poly_t fv);
    poly_t exp;
    int    c0, d;
    b = bv[N-1:0];
    f = fv[N-1:0];
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    c0 = cycles;
    for (int i = N - 1; i >= 0; i--) begin
      en = 1'b1;
      a_bit = av[i];
      @(negedge clk);
    end
    en = 1'b0;
    d = cycles - c0;
    check(poly_t'(d), poly_t'(N), "iteration count");
    exp = mulmod(av, bv, fv, N);
    check(poly_t'(r), exp, "a*b mod f");
    // hold while disabled
    a_bit = 1'b1;
    b = ~b;
    @(negedge clk);
    @(negedge clk);
    check(poly_t'(r), exp, "hold with en low");
  endtask

  initial begin
    poly_t nist, fv;
    nist = '0;
    nist[7] = 1'b1; nist[6] = 1'b1; nist[3] = 1'b1; nist[0] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(poly_t'(r), '0, "reset value");
    // corner operands
    run('0, rand_poly(N), nist);
    run(poly_t'(1), rand_poly(N), nist);
    run(trunc('1, N), trunc('1, N), nist);
    for (int k = 0; k < 40; k++) run(rand_poly(N), rand_poly(N), nist);
    for (int k = 0; k < 20; k++) begin
      fv = rand_poly(N);
      fv[0] = 1'b1;
      run(rand_poly(N), rand_poly(N), fv);
    end
    // clear after a nonzero result
    @(negedge clk) clear = 1'b1; en = 1'b1;
    @(negedge clk) clear = 1'b0; en = 1'b0;
    check(poly_t'(r), '0, "clear has priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
