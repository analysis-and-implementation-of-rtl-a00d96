// tb_pgab_rng: self-checking test of the random number generator at the
// default size (N = 1296 bits, 8-bit probability setting).
//
// A model of the LFSR (x^32 + x^22 + x^2 + x + 1, eight steps per enabled
// cycle) and of the N-bit random register runs beside the block and the
// whole register is compared every cycle. The register must hold still while
// en_i is low. The fraction of ones is measured for several settings
// (0, about 0.1, 0.5, 0.8 and 255/256) and must lie near prob_i / 256.
module tb_pgab_rng;

  localparam int N = 1296;

  int checks = 0, failures = 0;

  logic         clk = 0, rst_n = 0, en = 0;
  logic [7:0]   prob = '0;
  logic [N-1:0] p;

  logic [31:0]  m_lfsr;
  logic [N-1:0] m_p;

  pgab_rng dut (.clk(clk), .rst_n(rst_n), .en_i(en), .prob_i(prob), .p_o(p));

  always #5 clk = ~clk;

  function automatic logic [31:0] step1(logic [31:0] s);
    logic fb;
    fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[30:0], fb};
  endfunction

  // Model update, at the same edge as the block.
  always @(posedge clk) begin
    if (rst_n && en) begin
      logic [31:0] s;
      m_p <= {m_p[N-2:0], (m_lfsr[7:0] < prob)};
      s = m_lfsr;
      for (int k = 0; k < 8; k++) s = step1(s);
      m_lfsr <= s;
    end
  end

  task automatic compare(string what);
    checks++;
    if (p !== m_p) begin
      failures++;
      $display("%s: register mismatch at %0t", what, $time);
    end
  endtask

  task automatic run_prob(logic [7:0] pr, int cycles, real lo, real hi);
    int ones;
    ones = 0;
    @(negedge clk);
    prob = pr; en = 1;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      compare("run");
      ones += int'(p[0]);
    end
    checks++;
    if (real'(ones) / cycles < lo || real'(ones) / cycles > hi) begin
      failures++;
      $display("prob=%0d: fraction of ones %f outside [%f, %f]", pr,
               real'(ones) / cycles, lo, hi);
    end else begin
      $display("prob=%0d: fraction of ones %f", pr, real'(ones) / cycles);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_lfsr = 32'hACE1_2468;
    m_p    = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare("after reset");
    run_prob(8'd0,   2000, 0.0,  0.0);
    run_prob(8'd26,  8000, 0.07, 0.13);
    run_prob(8'd128, 8000, 0.46, 0.54);
    run_prob(8'd205, 8000, 0.76, 0.84);
    run_prob(8'd255, 4000, 0.98, 1.0);
    // Hold: with en low the register must not move.
    @(negedge clk);
    en = 0;
    begin
      logic [N-1:0] held;
      @(negedge clk);
      held = p;
      repeat (10) @(negedge clk);
      checks++;
      if (p !== held) begin failures++; $display("register moved with en low"); end
      compare("hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
