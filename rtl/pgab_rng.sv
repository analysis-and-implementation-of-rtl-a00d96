// pgab_rng: binary random number generator of the PGaB decoder.
//
// A 32-bit Fibonacci LFSR (polynomial x^32 + x^22 + x^2 + x + 1) is advanced
// PROB_W steps per enabled cycle, so each cycle provides a fresh PROB_W-bit
// uniform value. That value is compared with the user setting prob_i: the
// new random bit is 1 when value < prob_i, so P(1) = prob_i / 2^PROB_W
// (for example prob_i = 205 gives about 0.8). The bit is shifted into an
// N-bit register that holds one random bit per variable node; every enabled
// cycle the register moves by one place, so each VNU sees a new bit each
// iteration.
//
// From the published design: a 32-bit LFSR, a user-specified distribution,
// and an N-bit register with one random bit per VNU. The polynomial, the
// threshold comparison, the PROB_W steps per cycle and the seed are this
// design's own choices.
//
// Timing: p_o changes on the clock edge after a cycle with en_i = 1.
// Reset loads the seed into the LFSR and clears the register.
module pgab_rng #(
  parameter int unsigned N      = pgab_pkg::CODE_N,
  parameter int unsigned PROB_W = pgab_pkg::PROB_W,
  parameter logic [31:0] SEED   = pgab_pkg::LFSR_SEED
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,     // advance one step
  input  logic [PROB_W-1:0] prob_i,   // P(bit = 1) * 2^PROB_W
  output logic [N-1:0]      p_o       // one random bit per VNU
);

  logic [pgab_pkg::LFSR_W-1:0] lfsr_q, lfsr_d;
  logic        bit_d;

  always_comb begin
    lfsr_d = lfsr_q;
    for (int k = 0; k < PROB_W; k++) lfsr_d = pgab_pkg::lfsr_step(lfsr_d);
  end

  assign bit_d = (lfsr_q[PROB_W-1:0] < prob_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= (SEED == '0) ? 32'h1 : SEED;
      p_o    <= '0;
    end else if (en_i) begin
      lfsr_q <= lfsr_d;
      p_o    <= {p_o[N-2:0], bit_d};
    end
  end

endmodule
