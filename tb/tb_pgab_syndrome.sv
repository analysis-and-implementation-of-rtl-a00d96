// tb_pgab_syndrome: self-checking test of the syndrome unit at the default
// size (648 checks). The decision must be 1 for the all-zero syndrome only:
// all-zero, every single set bit, and random patterns are applied.
module tb_pgab_syndrome;

  localparam int M = 648;

  int checks = 0, failures = 0;

  logic [M-1:0] syn;
  logic         valid;

  pgab_syndrome dut (.syn_i(syn), .valid_o(valid));

  task automatic check(bit expected);
    #1;
    checks++;
    if (valid !== expected) begin
      failures++;
      $display("mismatch: expected %b got %b", expected, valid);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syn = '0; check(1'b1);
    for (int c = 0; c < M; c++) begin
      syn = '0; syn[c] = 1'b1; check(1'b0);
    end
    for (int n = 0; n < 200; n++) begin
      bit any = 0;
      for (int c = 0; c < M; c++) syn[c] = ($urandom_range(0, 99) == 0);
      for (int c = 0; c < M; c++) any |= syn[c];
      check(!any);
    end
    syn = '0; check(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
