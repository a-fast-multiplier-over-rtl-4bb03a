// Runs the multiplier at every field size the design is evaluated at:
// n = 163, 233 and 283 (timing comparison; NIST binary-field polynomials
// x^163+x^7+x^6+x^3+1, x^233+x^74+1, x^283+x^12+x^7+x^5+1) and n = 96, 192,
// 304 and 384 (area comparison; random polynomials with f_0 = 1), plus the
// small even size n = 8. Each size is a separate instance built with that n;
// each checks products and the ceil(n/2)+1 cycle latency.
module tb_gf2n_field_sizes;
  import gf2n_ref_pkg::*;

  localparam poly_t F163 = poly_t'((1 << 7) | (1 << 6) | (1 << 3) | 1);
  localparam poly_t F233 = (poly_t'(1) << 74) | poly_t'(1);
  localparam poly_t F283 = poly_t'((1 << 12) | (1 << 7) | (1 << 5) | 1);

  localparam int NS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   ck [NS];
  int   fl [NS];
  bit   fin [NS];

  mult_size_runner #(.N(163), .F_LOW(F163)) r163 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  mult_size_runner #(.N(233), .F_LOW(F233)) r233 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  mult_size_runner #(.N(283), .F_LOW(F283)) r283 (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  mult_size_runner #(.N(96),  .RAND_F(1'b1)) r96  (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  mult_size_runner #(.N(192), .RAND_F(1'b1)) r192 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  mult_size_runner #(.N(304), .RAND_F(1'b1)) r304 (.clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));
  mult_size_runner #(.N(384), .RAND_F(1'b1)) r384 (.clk, .rst_n, .checks(ck[6]), .failures(fl[6]), .finished(fin[6]));
  mult_size_runner #(.N(8),   .RAND_F(1'b1), .NOPS(200)) r8 (.clk, .rst_n, .checks(ck[7]), .failures(fl[7]), .finished(fin[7]));

  always #5 clk = ~clk;

  task automatic report(input int extra);
    int c, f;
    c = 0;
    f = extra;
    for (int i = 0; i < NS; i++) begin
      c += ck[i];
      f += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all = 1'b1;
      for (int i = 0; i < NS; i++) all &= fin[i];
    end while (!all);
    report(0);
  end
endmodule
