// Drives one gf2n_modified_mult of size N through NOPS random products and
// checks each one (r * x^M == a*b mod f) and its latency (K+1 edges from the
// start edge to done). The field polynomial's low coefficients are F_LOW;
// if RAND_F is set, each product uses a fresh random polynomial with f_0 = 1
// instead (the congruence checked holds for any such f).
module mult_size_runner
  import gf2n_ref_pkg::*;
#(
  parameter int    N      = 163,
  parameter poly_t F_LOW  = poly_t'(1),
  parameter bit    RAND_F = 1'b0,
  parameter int    NOPS   = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int K = N - N / 2;
  localparam int M = N / 2;

  logic         start = 1'b0;
  logic [N-1:0] a = '0, b = '0, f = '0;
  logic         busy, done;
  logic [N-1:0] r;
  int           cycles = 0;

  gf2n_modified_mult #(.N(N)) dut (.*);

  always @(posedge clk) cycles++;

  initial begin
    poly_t av, bv, fv;
    int c0, d;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    @(posedge rst_n);
    for (int k = 0; k < NOPS; k++) begin
      av = rand_poly(N);
      bv = rand_poly(N);
      fv = RAND_F ? rand_poly(N) : F_LOW;
      fv[0] = 1'b1;
      @(negedge clk);
      a = av[N-1:0]; b = bv[N-1:0]; f = fv[N-1:0];
      start = 1'b1;
      @(posedge clk);
      c0 = cycles;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      d = cycles - c0;
      checks += 2;
      if (d != K + 1) begin
        failures++;
        $display("FAIL n=%0d latency %0d, expected %0d", N, d, K + 1);
      end
      if (mulmod(poly_t'(r), xpow(M, fv, N), fv, N) !== mulmod(av, bv, fv, N)) begin
        failures++;
        $display("FAIL n=%0d product %0d", N, k);
      end
    end
    finished = 1'b1;
  end
endmodule
