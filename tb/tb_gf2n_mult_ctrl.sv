// Self-checking testbench for gf2n_mult_ctrl.
//
// Runs the sequencer for an odd field size (n = 163: 82 cycles, the
// Montgomery half idles in the last one) and an even one (n = 8: 4 cycles,
// both halves busy throughout), with isolated, back-to-back and random
// start patterns, including starts while busy, which must be ignored.
// ctrl_scoreboard checks step counts, ordering, busy and done timing.
module tb_gf2n_mult_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;

  logic load_o, step_c_o, step_m_o, busy_o, done_o;
  logic load_e, step_c_e, step_m_e, busy_e, done_e;
  int   ck_o, fl_o, ops_o, ign_o, idl_o;
  int   ck_e, fl_e, ops_e, ign_e, idl_e;
  int   checks, failures;

  gf2n_mult_ctrl u_odd (.clk, .rst_n, .start, .load(load_o), .step_c(step_c_o),
                        .step_m(step_m_o), .busy(busy_o), .done(done_o));
  gf2n_mult_ctrl #(.N(8)) u_even (.clk, .rst_n, .start, .load(load_e), .step_c(step_c_e),
                        .step_m(step_m_e), .busy(busy_e), .done(done_e));

  ctrl_scoreboard #(.K(82), .M(81)) sb_odd (.clk, .rst_n, .start, .load(load_o), .step_c(step_c_o),
      .step_m(step_m_o), .busy(busy_o), .done(done_o), .checks(ck_o), .failures(fl_o),
      .ops(ops_o), .ignored_starts(ign_o), .idle_mont_steps(idl_o));
  ctrl_scoreboard #(.K(4), .M(4)) sb_even (.clk, .rst_n, .start, .load(load_e), .step_c(step_c_e),
      .step_m(step_m_e), .busy(busy_e), .done(done_e), .checks(ck_e), .failures(fl_e),
      .ops(ops_e), .ignored_starts(ign_e), .idle_mont_steps(idl_e));

  always #5 clk = ~clk;

  task automatic finish_tb(input int extra_fail);
    checks   = ck_o + ck_e + 6;
    failures = fl_o + fl_e + extra_fail;
    $display("odd: ops=%0d ignored=%0d idle_mont=%0d  even: ops=%0d ignored=%0d idle_mont=%0d",
             ops_o, ign_o, idl_o, ops_e, ign_e, idl_e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    finish_tb(1);
  end

  initial begin
    int extra;
    extra = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // isolated starts
    repeat (3) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      repeat (100) @(negedge clk);
    end
    // start held high: back-to-back operations, starts while busy ignored
    @(negedge clk) start = 1'b1;
    repeat (300) @(negedge clk);
    start = 1'b0;
    repeat (100) @(negedge clk);
    // random start pattern
    repeat (3000) begin
      @(negedge clk) start = ($urandom % 7) == 0;
    end
    start = 1'b0;
    repeat (100) @(negedge clk);
    // each behaviour must have happened
    if (ops_o < 5)  extra++;
    if (ops_e < 20) extra++;
    if (ign_o == 0) extra++;
    if (ign_e == 0) extra++;
    if (idl_o != ops_o) extra++;   // one idle Montgomery cycle per odd-n product
    if (idl_e != 0) extra++;       // none for even n
    finish_tb(extra);
  end
endmodule
