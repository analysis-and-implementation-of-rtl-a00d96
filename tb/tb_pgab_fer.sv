// tb_pgab_fer: frame-error-rate run of the default decoder (N = 1296,
// rate 0.5) over a binary symmetric channel.
//
// For each crossover probability (0.01, 0.02, 0.03, 0.04) a set of frames
// is sent: the transmitted codeword is all-zero or all-one (both codewords
// of this code), and each bit is flipped with the crossover probability by
// a fixed xorshift generator. Every frame is decoded three times: plain
// Gallager B (k above the limit) and probabilistic GaB with P(p=1) of about
// 0.8 and 0.1, switching after 10 iterations; the limit is 60 iterations.
// Each decoding is checked against the reference model (iterations,
// success, decoded word, latency). A frame error is a decoded word that
// differs from the transmitted codeword. The error counts are printed; with
// this few frames they show the trend, not the low error rates of long
// Monte-Carlo runs.
module tb_pgab_fer;

  import pgab_ref_pkg::*;

  localparam int N = 1296;
  localparam int FRAMES = 40;
  localparam int MAXIT = 60;
  localparam int KIT = 10;

  int checks = 0, failures = 0;

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

  always #5 clk = ~clk;

  bit [31:0] xs = 32'h1234_5678;
  function automatic int unsigned next_rand();
    xs ^= xs << 13;
    xs ^= xs >> 17;
    xs ^= xs << 5;
    return xs;
  endfunction

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  // Decode one word on the decoder and the model; returns 1 on frame error.
  task automatic run_one(bit word[], bit sent[], int kk, int pr,
                         output bit ferr, output int its);
    int exp_it, prob_its, cycles, wrong;
    bit exp_ok;
    exp_it = rm.decode(word, MAXIT, kk, pr, exp_ok, prob_its);
    for (int v = 0; v < N; v++) r[v] = word[v];
    max_iter = 8'(MAXIT); k_iter = 8'(kk); prob = 8'(pr);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
    expect_eq("latency", cycles, exp_it + 2);
    expect_eq("iterations", int'(iter), exp_it);
    expect_eq("success", int'(success), int'(exp_ok));
    wrong = 0; ferr = 0;
    for (int v = 0; v < N; v++) begin
      if (dec[v] !== rm.dec[v]) wrong++;
      if (dec[v] !== sent[v]) ferr = 1;
    end
    expect_eq("decoded word against model", wrong, 0);
    its = exp_it;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cross_ppm[4] = '{10000, 20000, 30000, 40000};
    int kmode[3]     = '{255, KIT, KIT};
    int pmode[3]     = '{0, 205, 26};
    string names[3]  = '{"GaB        ", "PGaB p=0.8 ", "PGaB p=0.1 "};
    bit sent[], word[];
    sent = new[N]; word = new[N];
    rm = new(N, 4, 8, 32'hACE1_2468);
    r = '0; max_iter = '0; k_iter = '0; prob = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (cross_ppm[x]) begin
      int fe[3], itsum[3];
      fe = '{0, 0, 0}; itsum = '{0, 0, 0};
      for (int f = 0; f < FRAMES; f++) begin
        foreach (sent[v]) sent[v] = f[0];
        foreach (word[v]) word[v] = sent[v] ^ ((next_rand() % 1000000) < cross_ppm[x]);
        for (int md = 0; md < 3; md++) begin
          bit ferr;
          int its;
          run_one(word, sent, kmode[md], pmode[md], ferr, its);
          fe[md] += int'(ferr);
          itsum[md] += its;
        end
      end
      for (int md = 0; md < 3; md++)
        $display("crossover %0.2f  %s frame errors %2d of %0d, mean iterations %0.1f",
                 real'(cross_ppm[x]) / 1.0e6, names[md], fe[md], FRAMES,
                 real'(itsum[md]) / FRAMES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
