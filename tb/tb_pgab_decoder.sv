// tb_pgab_decoder: end-to-end self-checking test of the complete PGaB
// decoder at its default size (N = 1296, DV = 4, DC = 8, rate 0.5).
//
// Frames are codewords (all-zero, or an even number of whole 162-bit block
// columns set) with a given number of random bit errors. For each frame the
// reference model, which includes the random-bit source, predicts the
// iteration count, the success flag and the decoded word; the decoder must
// match all three, raise done exactly iterations + 2 cycles after start, and
// show the live syndrome decision matching success.
//
// Mechanisms that must each happen at least once (a failure is counted for
// any that never does):
//   clean      : received word already a codeword, zero iterations
//   gab_fix    : converged within the first k plain Gallager B iterations
//   prob_fix   : converged after the switch to probabilistic mode
//   limit      : stopped at the iteration limit without a codeword
//   plain_gab  : frame run with the disturbance disabled (k >= limit)
//   corrected  : decoded word equal to the transmitted codeword with errors
module tb_pgab_decoder;

  import pgab_ref_pkg::*;

  localparam int N = 1296;
  localparam int Z = 162;
  localparam int FRAMES = 60;

  int checks = 0, failures = 0;
  int n_clean = 0, n_gab_fix = 0, n_prob_fix = 0, n_limit = 0;
  int n_plain = 0, n_corrected = 0;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] r;
  logic [7:0]   max_iter, k_iter, prob;
  logic         busy, done, success, valid;
  logic [7:0]   iter;
  logic [N-1:0] dec;

  pgab_decoder dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .r_i(r),
    .max_iter_i(max_iter), .k_iter_i(k_iter), .prob_i(prob),
    .busy_o(busy), .done_o(done), .success_o(success), .iter_o(iter),
    .dec_o(dec), .valid_o(valid)
  );

  pgab_ref rm;

  // Fixed xorshift generator for error positions, so that every run sees
  // the same frames whatever the simulator's seed.
  bit [31:0] xs = 32'h2545_F491;
  function automatic int next_pos();
    xs ^= xs << 13;
    xs ^= xs >> 17;
    xs ^= xs << 5;
    return int'(xs % N);
  endfunction

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    // Watchdog: far beyond FRAMES * (limit + 3) cycles.
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit sent[], word[];
    sent = new[N]; word = new[N];
    rm = new(N, 4, 8, 32'hACE1_2468);
    r = '0; max_iter = '0; k_iter = '0; prob = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int errs, exp_it, prob_its, cycles, wrong, mx, kk, pr;
      bit exp_ok, same;
      // Transmitted codeword.
      foreach (sent[v]) sent[v] = 0;
      if (f % 4 == 1) for (int v = 3 * Z; v < 5 * Z; v++) sent[v] = 1;
      if (f % 4 == 3) for (int v = 0; v < N; v++) sent[v] = 1;
      // Channel errors.
      errs = (f % 8 == 0) ? 0 : 10 + 5 * (f % 7) + f / 2;
      word = new[N](sent);
      for (int e = 0; e < errs; e++) begin
        int v;
        v = next_pos();
        word[v] = !word[v];
      end
      mx = 40;
      kk = (f % 5 == 4) ? 255 : 10;
      pr = (f % 3 == 0) ? 205 : 26;
      exp_it = rm.decode(word, mx, kk, pr, exp_ok, prob_its);
      // Drive the decoder.
      for (int v = 0; v < N; v++) r[v] = word[v];
      max_iter = 8'(mx); k_iter = 8'(kk); prob = 8'(pr);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 1;
      while (!done && cycles < 1000) begin
        @(negedge clk);
        cycles++;
      end
      expect_eq($sformatf("frame %0d latency", f), cycles, exp_it + 2);
      expect_eq($sformatf("frame %0d iterations", f), int'(iter), exp_it);
      expect_eq($sformatf("frame %0d success", f), int'(success), int'(exp_ok));
      expect_eq($sformatf("frame %0d syndrome decision", f), int'(valid), int'(exp_ok));
      wrong = 0; same = 1;
      for (int v = 0; v < N; v++) begin
        if (dec[v] !== rm.dec[v]) wrong++;
        if (dec[v] !== sent[v]) same = 0;
      end
      expect_eq($sformatf("frame %0d decoded bits differing from model", f), wrong, 0);
      $display("frame %2d: errors %2d k %3d prob %3d -> iterations %2d (%2d probabilistic) %s%s",
               f, errs, kk, pr, exp_it, prob_its, exp_ok ? "codeword" : "no codeword",
               (exp_ok && same) ? ", corrected" : "");
      if (exp_ok && exp_it == 0) n_clean++;
      if (exp_ok && exp_it > 0 && exp_it <= kk) n_gab_fix++;
      if (exp_ok && exp_it > kk) n_prob_fix++;
      if (!exp_ok) n_limit++;
      if (kk >= mx) n_plain++;
      if (exp_ok && same && errs > 0) n_corrected++;
    end
    $display("clean %0d, gab_fix %0d, prob_fix %0d, limit %0d, plain_gab %0d, corrected %0d",
             n_clean, n_gab_fix, n_prob_fix, n_limit, n_plain, n_corrected);
    checks += 6;
    if (n_clean == 0)     begin failures++; $display("no clean frame"); end
    if (n_gab_fix == 0)   begin failures++; $display("no frame fixed by plain iterations"); end
    if (n_prob_fix == 0)  begin failures++; $display("no frame fixed in probabilistic mode"); end
    if (n_limit == 0)     begin failures++; $display("no frame hit the iteration limit"); end
    if (n_plain == 0)     begin failures++; $display("no plain Gallager B frame"); end
    if (n_corrected == 0) begin failures++; $display("no frame corrected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
