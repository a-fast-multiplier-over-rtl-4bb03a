// Sequencer for the split GF(2^n) multiplier.
//
// Runs the iteration loop: K = ceil(n/2) cycles, in each of which the
// classical half takes one coefficient of a; the Montgomery half takes one
// in the first M = floor(n/2) of them and idles in the last one when n is
// odd. The cycle count follows the published split-multiplier method; the start/busy/done
// handshake and the separate load cycle are this RTL's choices.
//
// Interface and timing:
//   start  sampled only while idle; in that cycle 'load' is high (operands
//          are captured and both accumulators cleared at the same edge).
//   busy   high for the K iteration cycles that follow.
//   step_c / step_m  enables for the classical / Montgomery accumulator.
//   done   registered one-cycle pulse in the cycle after the last iteration,
//          i.e. K+1 clock edges after the edge that sampled start.
// A start that arrives while busy is ignored. rst_n also disables the
// assertion below, which lint reports as mixed synchronous/asynchronous use
// of the reset; it has no effect on the logic.
module gf2n_mult_ctrl
  import gf2n_pkg::*;
#(
  parameter int unsigned N = 163
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic step_c,
  output logic step_m,
  output logic busy,
  output logic done
);

  localparam int unsigned K  = clas_bits(N);
  localparam int unsigned M  = mont_bits(N);
  localparam int unsigned CW = $clog2(K + 1);   // also holds the value M

  mult_state_e   state;
  logic [CW-1:0] cnt;
  logic          last;

  assign busy   = (state == ST_RUN);
  assign load   = (state == ST_IDLE) && start;
  assign last   = (cnt == CW'(K - 1));
  assign step_c = busy;
  assign step_m = busy && (cnt < CW'(M));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          cnt <= '0;
          if (start) state <= ST_RUN;
        end
        ST_RUN: begin
          cnt <= cnt + 1'b1;
          if (last) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The Montgomery half never takes more coefficients than it owns.
  a_mont_steps : assert property (@(posedge clk) disable iff (!rst_n)
                                  step_m |-> step_c);

endmodule
