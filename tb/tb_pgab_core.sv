// tb_pgab_core: self-checking test of the node arrays and H-matrix
// interconnect, at N = 1296 for both codes: DC = 8 (rate 0.5, 648 checks)
// and DC = 16 (rate 0.75, 324 checks).
//
// Both instances get the same frames: a codeword (all-zero, or an even
// number of whole block columns set, which every check of this code sees an
// even number of times) with random bit errors. The random-bit input is
// driven with random patterns, zero in some frames. After the load and after
// every iteration the hard decisions and all syndrome bits are compared with
// the reference model, which evaluates the node rules edge by edge.
module tb_pgab_core;

  import pgab_ref_pkg::*;

  localparam int N = 1296;

  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0, load = 0, step = 0;
  logic [N-1:0]  r, p;
  logic [N-1:0]  dec8, dec16;
  logic [647:0]  syn8;
  logic [323:0]  syn16;

  pgab_core dut8 (.clk(clk), .rst_n(rst_n), .load_i(load), .r_i(r),
                  .step_i(step), .p_i(p), .dec_o(dec8), .syn_o(syn8));
  pgab_core #(.N(N), .DV(4), .DC(16)) dut16 (
                  .clk(clk), .rst_n(rst_n), .load_i(load), .r_i(r),
                  .step_i(step), .p_i(p), .dec_o(dec16), .syn_o(syn16));

  pgab_ref ref8, ref16;

  always #5 clk = ~clk;

  task automatic compare(string what);
    int bad;
    bad = 0;
    for (int v = 0; v < N; v++) begin
      if (dec8[v] !== ref8.dec[v]) bad++;
      if (dec16[v] !== ref16.dec[v]) bad++;
    end
    for (int c = 0; c < 648; c++) if (syn8[c] !== ref8.check_bit(c)) bad++;
    for (int c = 0; c < 324; c++) if (syn16[c] !== ref16.check_bit(c)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: %0d mismatching bits", what, bad);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit word[], sent[];
    int converged8;
    word = new[N];
    converged8 = 0;
    ref8  = new(N, 4, 8, 32'h1);
    ref16 = new(N, 4, 16, 32'h1);
    r = '0; p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int errs;
      // Codeword: the first 324 bits set are two whole block columns of the
      // rate-0.5 code and four of the rate-0.75 code, so a codeword of both.
      foreach (word[v]) word[v] = 0;
      if (f % 3 == 1)
        for (int v = 0; v < 4 * 81; v++) word[v] = 1;
      if (f % 3 == 2)
        for (int v = 0; v < N; v++) word[v] = 1;
      sent = new[N](word);
      errs = 4 + 4 * f;
      for (int e = 0; e < errs; e++) begin
        int v;
        v = $urandom_range(0, N - 1);
        word[v] = !word[v];
      end
      for (int v = 0; v < N; v++) r[v] = word[v];
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      ref8.load(word); ref16.load(word);
      compare($sformatf("frame %0d load", f));
      for (int it = 0; it < 12; it++) begin
        for (int v = 0; v < N; v++) begin
          p[v] = (f % 2 == 1) ? ($urandom_range(0, 4) == 0) : 1'b0;
          ref8.p[v] = p[v]; ref16.p[v] = p[v];
        end
        step = 1;
        @(negedge clk);
        step = 0;
        ref8.iterate(1); ref16.iterate(1);
        compare($sformatf("frame %0d iteration %0d", f, it));
      end
      // Without step the state must hold.
      @(negedge clk);
      compare($sformatf("frame %0d hold", f));
      if (ref8.is_codeword()) converged8++;
      if (f % 3 != 0) begin
        // The transmitted word itself must satisfy every check of both codes.
        ref8.load(sent); ref16.load(sent);
        checks++;
        if (!ref8.is_codeword() || !ref16.is_codeword()) begin
          failures++; $display("frame %0d: transmitted word is not a codeword", f);
        end
      end
    end
    $display("frames ending in a codeword (rate 0.5): %0d of 12", converged8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
