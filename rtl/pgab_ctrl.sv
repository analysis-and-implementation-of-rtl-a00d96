// pgab_ctrl: iteration controller of the PGaB decoder.
//
// A frame starts with a one-cycle start_i pulse while idle: the controller
// issues load_o (channel word into the node arrays, iteration 0), captures
// the iteration limit max_iter_i and the switch-over point k_iter_i, and
// enters ST_RUN. In ST_RUN, each cycle it looks at the syndrome decision
// valid_i of the current hard decisions:
//   valid_i = 1          -> stop, success
//   iterations = limit   -> stop, failure
//   otherwise            -> step_o: one decoding iteration in this cycle.
// Once k iterations have been done without convergence, prob_en_o enables
// the random disturbance for all further iterations (probabilistic GaB);
// k_iter_i >= max_iter_i gives plain Gallager B. The switch after k
// iterations follows the published design; the iteration limit, the
// start/done handshake and the widths are this design's own choices.
//
// Timing: a frame that needs I iterations raises done_o (one cycle) I + 2
// cycles after start_i; one iteration costs one cycle. success_o and iter_o
// hold their values until the next start.
module pgab_ctrl #(
  parameter int unsigned ITER_W = pgab_pkg::ITER_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [ITER_W-1:0] max_iter_i,  // iteration limit
  input  logic [ITER_W-1:0] k_iter_i,    // GaB iterations before disturbance
  input  logic              valid_i,     // syndrome is zero
  output logic              load_o,      // capture channel word
  output logic              step_o,      // perform one iteration
  output logic              prob_en_o,   // random disturbance active
  output logic              busy_o,
  output logic              done_o,      // one-cycle end-of-frame pulse
  output logic              success_o,   // frame decoded to a codeword
  output logic [ITER_W-1:0] iter_o       // iterations performed
);

  import pgab_pkg::*;

  ctrl_state_t       state_q;
  logic [ITER_W-1:0] iter_q, max_q, k_q;
  logic              stop;

  assign load_o    = (state_q == ST_IDLE) && start_i;
  assign stop      = valid_i || (iter_q == max_q);
  assign step_o    = (state_q == ST_RUN) && !stop;
  assign prob_en_o = (state_q == ST_RUN) && (iter_q >= k_q);
  assign busy_o    = (state_q == ST_RUN);
  assign iter_o    = iter_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_IDLE;
      iter_q    <= '0;
      max_q     <= '0;
      k_q       <= '0;
      done_o    <= 1'b0;
      success_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start_i) begin
          state_q   <= ST_RUN;
          iter_q    <= '0;
          max_q     <= max_iter_i;
          k_q       <= k_iter_i;
          success_o <= 1'b0;
        end
        ST_RUN: if (stop) begin
          state_q   <= ST_IDLE;
          done_o    <= 1'b1;
          success_o <= valid_i;
        end else begin
          iter_q <= iter_q + 1'b1;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // The iteration count never passes the captured limit.
  a_iter_limit: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_RUN) |-> (iter_q <= max_q));
  // Loading and iterating never happen in the same cycle.
  a_load_step: assert property (@(posedge clk) disable iff (!rst_n)
    !(load_o && step_o));

endmodule
