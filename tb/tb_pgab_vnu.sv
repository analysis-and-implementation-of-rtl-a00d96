// tb_pgab_vnu: exhaustive self-checking test of the variable node unit.
//
// All 2^(DV+2) combinations of the DV check messages, the channel bit and the
// random bit are applied. The expected messages are worked out per edge by
// counting: a disturbed channel value plus the other messages above the
// threshold ceil(DV/2) sends 1, below sends 0, equal sends the channel bit.
// The expected hard decision is the majority of the channel bit and all
// check messages. Two instances are checked: DV = 4 (the code of the design)
// and DV = 3.
module tb_pgab_vnu;

  int checks = 0, failures = 0;

  logic [3:0] c2v4, v2c4;
  logic       r4, p4, dec4;
  logic [2:0] c2v3, v2c3;
  logic       r3, p3, dec3;

  pgab_vnu #(.DV(4)) dut4 (.c2v_i(c2v4), .r_i(r4), .p_i(p4), .v2c_o(v2c4), .dec_o(dec4));
  pgab_vnu #(.DV(3)) dut3 (.c2v_i(c2v3), .r_i(r3), .p_i(p3), .v2c_o(v2c3), .dec_o(dec3));

  // Reference: message on edge e for degree dv.
  function automatic bit ref_msg(int dv, logic [7:0] c, bit r, bit p, int e);
    int t, b;
    b = (dv + 1) / 2;
    t = int'(r ^ p);
    for (int k = 0; k < dv; k++) if (k != e) t += int'(c[k]);
    if (t > b) return 1'b1;
    if (t < b) return 1'b0;
    return r;
  endfunction

  function automatic bit ref_dec(int dv, logic [7:0] c, bit r);
    int ones;
    ones = int'(r);
    for (int k = 0; k < dv; k++) ones += int'(c[k]);
    if (2 * ones > dv + 1) return 1'b1;
    if (2 * ones < dv + 1) return 1'b0;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flips = 0;
    for (int x = 0; x < 64; x++) begin
      c2v4 = x[3:0]; r4 = x[4]; p4 = x[5];
      c2v3 = x[2:0]; r3 = x[4]; p3 = x[5];
      #1;
      for (int e = 0; e < 4; e++) begin
        checks++;
        if (v2c4[e] !== ref_msg(4, {4'b0, c2v4}, r4, p4, e)) begin
          failures++;
          $display("DV4 msg mismatch x=%0d e=%0d got %b", x, e, v2c4[e]);
        end
        if (v2c4[e] != r4) flips++;
      end
      for (int e = 0; e < 3; e++) begin
        checks++;
        if (v2c3[e] !== ref_msg(3, {5'b0, c2v3}, r3, p3, e)) begin
          failures++;
          $display("DV3 msg mismatch x=%0d e=%0d got %b", x, e, v2c3[e]);
        end
      end
      checks += 2;
      if (dec4 !== ref_dec(4, {4'b0, c2v4}, r4)) begin
        failures++; $display("DV4 dec mismatch x=%0d", x);
      end
      if (dec3 !== ref_dec(3, {5'b0, c2v3}, r3)) begin
        failures++; $display("DV3 dec mismatch x=%0d", x);
      end
    end
    // Spot checks of the Gallager B rule for DV = 4 without disturbance:
    // r = 0 is overturned only when all three other checks say 1.
    c2v4 = 4'b1110; r4 = 1'b0; p4 = 1'b0; #1;
    checks++; if (v2c4 !== 4'b0001) begin failures++; $display("spot 1: %b", v2c4); end
    c2v4 = 4'b0001; r4 = 1'b1; p4 = 1'b0; #1;
    checks++; if (v2c4 !== 4'b1110) begin failures++; $display("spot 2: %b", v2c4); end
    checks++; if (flips == 0) begin failures++; $display("no message ever differed from r"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
