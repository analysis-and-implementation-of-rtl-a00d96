// tb_pgab_ctrl: self-checking test of the iteration controller.
//
// The syndrome decision is played by the testbench: for each frame it
// becomes 1 after a chosen number of iterations, or never. Checked per
// frame: load in the start cycle only, one step per cycle, done after
// I + 2 cycles, iteration count, success flag, the iteration limit, and that
// the disturbance enable is off for the first k iterations and on after.
// A start while busy must be ignored.
module tb_pgab_ctrl;

  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, start = 0, valid = 0;
  logic [7:0] max_iter = '0, k_iter = '0;
  logic       load, step, prob_en, busy, done, success;
  logic [7:0] iter;

  int steps_seen;

  pgab_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .max_iter_i(max_iter),
    .k_iter_i(k_iter), .valid_i(valid), .load_o(load), .step_o(step),
    .prob_en_o(prob_en), .busy_o(busy), .done_o(done), .success_o(success),
    .iter_o(iter)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  // One frame: converges after conv iterations (-1: never).
  task automatic frame(int mx, int k, int conv);
    int cycles, exp_iter;
    bit exp_ok;
    exp_ok   = (conv >= 0) && (conv <= mx);
    exp_iter = exp_ok ? conv : mx;
    @(negedge clk);
    max_iter = 8'(mx); k_iter = 8'(k); start = 1; valid = 0;
    #1; expect_eq("load in start cycle", int'(load), 1);
    @(negedge clk);
    start = 0;
    cycles = 1; steps_seen = 0;
    while (!done) begin
      valid = (conv >= 0) && (steps_seen >= conv);
      #1;
      expect_eq("no load while busy", int'(load), 0);
      expect_eq("step", int'(step), int'(!valid && (steps_seen < mx)));
      if (step) begin
        expect_eq("prob_en", int'(prob_en), int'(steps_seen >= k));
        steps_seen++;
      end
      // A second start while busy must not disturb the frame.
      if (cycles == 2) start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
      if (cycles > 300) break;
    end
    expect_eq("latency", cycles, exp_iter + 2);
    expect_eq("iterations", int'(iter), exp_iter);
    expect_eq("success", int'(success), int'(exp_ok));
    expect_eq("busy after done", int'(busy), 0);
    valid = 0;
    @(negedge clk);
    expect_eq("done is one cycle", int'(done), 0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(20, 5, 0);     // already a codeword
    frame(20, 5, 3);     // converges before the switch
    frame(20, 5, 9);     // converges in probabilistic mode
    frame(20, 5, -1);    // never converges: stops at the limit
    frame(10, 20, -1);   // k above the limit: plain GaB throughout
    frame(1, 0, 1);      // converges exactly at the limit
    frame(0, 0, -1);     // limit 0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
