// Checker used by tb_gf2n_mult_ctrl: watches one sequencer and checks, for
// every accepted start, that exactly K classical and M Montgomery steps
// follow, that the Montgomery steps come first, that busy covers exactly
// the steps, and that done pulses once, K+1 edges after the start edge.
module ctrl_scoreboard #(
  parameter int K = 82,
  parameter int M = 81
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic load,
  input  logic step_c,
  input  logic step_m,
  input  logic busy,
  input  logic done,
  output int   checks,
  output int   failures,
  output int   ops,
  output int   ignored_starts,
  output int   idle_mont_steps
);
  int  nc = 0, nm = 0, age = 0;
  logic active = 1'b0;

  initial begin
    checks = 0; failures = 0; ops = 0; ignored_starts = 0; idle_mont_steps = 0;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (K=%0d M=%0d) %s at %0t", K, M, what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (start && busy) ignored_starts++;
    if (step_c && !step_m) idle_mont_steps++;
    chk(load == (start && !busy), "load == start while idle");
    chk(step_c == busy, "classical step exactly while busy");
    chk(!(step_m && !step_c), "Montgomery step only with classical step");
    if (step_m) chk(nm == nc, "Montgomery steps come first");
    if (active) begin
      age++;
      if (step_c) nc++;
      if (step_m) nm++;
    end
    if (done) begin
      chk(active, "done only after a start");
      chk(age == K + 1, "done K+1 edges after start");
      chk(nc == K, "K classical steps");
      chk(nm == M, "M Montgomery steps");
      chk(!busy, "idle when done");
      active = 1'b0;
      ops++;
    end
    if (load) begin
      active = 1'b1;
      age = 0; nc = 0; nm = 0;
    end
  end
endmodule
