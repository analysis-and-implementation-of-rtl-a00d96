// tb_pgab_cnu: self-checking test of the check node unit.
//
// Random message and decision vectors are applied to a DC = 8 (rate 0.5)
// and a DC = 16 (rate 0.75) instance. Each output message must equal the
// xor of the other inputs, computed bit by bit here, and the syndrome bit
// must equal the parity of the decisions.
module tb_pgab_cnu;

  int checks = 0, failures = 0;

  logic [7:0]  v8, d8, c8;
  logic        s8;
  logic [15:0] v16, d16, c16;
  logic        s16;

  pgab_cnu #(.DC(8))  dut8  (.v2c_i(v8),  .dec_i(d8),  .c2v_o(c8),  .syn_o(s8));
  pgab_cnu #(.DC(16)) dut16 (.v2c_i(v16), .dec_i(d16), .c2v_o(c16), .syn_o(s16));

  function automatic bit xor_others(logic [15:0] v, int dc, int e);
    bit x = 0;
    for (int k = 0; k < dc; k++) if (k != e) x ^= v[k];
    return x;
  endfunction

  function automatic bit parity(logic [15:0] v, int dc);
    bit x = 0;
    for (int k = 0; k < dc; k++) x ^= v[k];
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      v8 = 8'($urandom); d8 = 8'($urandom);
      v16 = 16'($urandom); d16 = 16'($urandom);
      if (n == 0) begin v8 = '0; d8 = '0; v16 = '0; d16 = '0; end
      if (n == 1) begin v8 = '1; d8 = '1; v16 = '1; d16 = '1; end
      #1;
      for (int e = 0; e < 8; e++) begin
        checks++;
        if (c8[e] !== xor_others({8'b0, v8}, 8, e)) begin
          failures++; $display("DC8 n=%0d e=%0d mismatch", n, e);
        end
      end
      for (int e = 0; e < 16; e++) begin
        checks++;
        if (c16[e] !== xor_others(v16, 16, e)) begin
          failures++; $display("DC16 n=%0d e=%0d mismatch", n, e);
        end
      end
      checks += 2;
      if (s8 !== parity({8'b0, d8}, 8)) begin failures++; $display("DC8 syn n=%0d", n); end
      if (s16 !== parity(d16, 16)) begin failures++; $display("DC16 syn n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
