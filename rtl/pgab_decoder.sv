// pgab_decoder: fully parallel probabilistic Gallager B (PGaB) LDPC decoder.
//
// Hard-decision iterative decoder for a regular quasi-cyclic LDPC code of
// length N with variable degree DV and check degree DC (defaults: N = 1296,
// DV = 4, DC = 8, rate 0.5; DC = 16 gives the rate-0.75 code). One VNU per
// code bit and one CNU per parity check work in parallel, so a decoding
// iteration takes one clock cycle. The VNUs run the Gallager B majority rule;
// after k iterations without convergence each VNU also xors a random bit
// into its channel value when forming the messages to the checks, which
// shakes the decoder out of trapping sets. The random bits come from a
// 32-bit LFSR through an N-bit register, one bit per VNU, with P(1) set by
// prob_i. The syndrome unit stops decoding as soon as the hard decisions
// form a codeword.
//
// Blocks: pgab_ctrl (frame and iteration control), pgab_core (VNU array,
// H-matrix interconnect, CNU array, message registers), pgab_rng (random
// bits), pgab_syndrome (stop decision).
//
// Interface and timing: hold r_i and pulse start_i while busy_o is low. One
// cycle loads the frame; each following cycle either ends the frame or does
// one iteration. done_o pulses I + 2 cycles after start_i for a frame that
// took I iterations (iter_o); success_o tells whether dec_o is a codeword.
// dec_o, success_o and iter_o stay valid until the next start. valid_o is
// the live syndrome decision for the current dec_o.
module pgab_decoder #(
  parameter int unsigned N      = pgab_pkg::CODE_N,
  parameter int unsigned DV     = pgab_pkg::CODE_DV,
  parameter int unsigned DC     = pgab_pkg::CODE_DC,
  parameter int unsigned ITER_W = pgab_pkg::ITER_W,
  parameter int unsigned PROB_W = pgab_pkg::PROB_W,
  parameter logic [31:0] SEED   = pgab_pkg::LFSR_SEED
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [N-1:0]      r_i,         // hard-decision channel word
  input  logic [ITER_W-1:0] max_iter_i,  // iteration limit
  input  logic [ITER_W-1:0] k_iter_i,    // GaB iterations before disturbance
  input  logic [PROB_W-1:0] prob_i,      // P(random bit = 1) * 2^PROB_W
  output logic              busy_o,
  output logic              done_o,
  output logic              success_o,
  output logic [ITER_W-1:0] iter_o,
  output logic [N-1:0]      dec_o,       // decoded word
  output logic              valid_o      // syndrome of dec_o is zero
);

  localparam int unsigned M = N * DV / DC;

  logic         load, step, prob_en;
  logic [N-1:0] p_rng, p_vnu;
  logic [M-1:0] syn;

  pgab_ctrl #(.ITER_W(ITER_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_i    (start_i),
    .max_iter_i (max_iter_i),
    .k_iter_i   (k_iter_i),
    .valid_i    (valid_o),
    .load_o     (load),
    .step_o     (step),
    .prob_en_o  (prob_en),
    .busy_o     (busy_o),
    .done_o     (done_o),
    .success_o  (success_o),
    .iter_o     (iter_o)
  );

  pgab_rng #(.N(N), .PROB_W(PROB_W), .SEED(SEED)) u_rng (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (step),
    .prob_i (prob_i),
    .p_o    (p_rng)
  );

  assign p_vnu = p_rng & {N{prob_en}};

  pgab_core #(.N(N), .DV(DV), .DC(DC)) u_core (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (load),
    .r_i    (r_i),
    .step_i (step),
    .p_i    (p_vnu),
    .dec_o  (dec_o),
    .syn_o  (syn)
  );

  pgab_syndrome #(.M(M)) u_syn (
    .syn_i   (syn),
    .valid_o (valid_o)
  );

endmodule
