// pgab_ref_pkg: bit-true software model of the PGaB decoder, used by the
// testbenches as the independent reference.
//
// The model keeps one message per Tanner-graph edge in each direction and
// evaluates the node rules by counting, edge by edge, in plain loops:
//   check to variable : xor of the check's other incoming messages
//   variable to check : t = (p xor r) + other check messages of the variable;
//                       1 if t > ceil(dv/2), 0 if below, r if equal
//   hard decision     : majority of r and all check messages (r on a tie)
// The code is the quasi-cyclic one of the design: circulant size z = n/dc,
// check i*z+u joined to variable j*z + ((u + s(i,j)) mod z) for each block
// column j, with the shift tables of the two codes written out again here
// (and s = i*j mod z for any other size). The random-bit source is modelled as well: a 32-bit LFSR
// (taps 32, 22, 2, 1) stepped eight times per iteration whose low byte,
// compared with the probability setting, is shifted into an n-bit register.
package pgab_ref_pkg;

  const int R050 [4][8] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0}, '{0, 137, 43, 131, 90, 13, 93, 154},
    '{0, 103, 49, 105, 151, 48, 116, 31}, '{0, 82, 6, 147, 44, 77, 136, 80}};
  const int R075 [4][16] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 38, 76, 63, 5, 21, 29, 56, 46, 23, 51, 53, 44, 9, 50, 80},
    '{0, 41, 2, 10, 22, 27, 42, 64, 60, 33, 62, 18, 4, 75, 19, 24},
    '{0, 61, 11, 24, 40, 68, 26, 32, 34, 12, 23, 66, 30, 48, 13, 19}};

  class pgab_ref;
    int n, dv, dc, z, m;
    bit r[], dec[], vm[], cm[];     // vm/cm indexed by check*dc + slot
    int var_of[];                   // check*dc + slot -> variable
    int edge_of[];                  // variable*dv + block row -> check*dc + slot
    bit [31:0] lfsr;
    bit p[];

    function new(int n_, int dv_, int dc_, bit [31:0] seed);
      n = n_; dv = dv_; dc = dc_; z = n / dc; m = n * dv / dc;
      r = new[n]; dec = new[n]; p = new[n];
      vm = new[m * dc]; cm = new[m * dc];
      var_of = new[m * dc]; edge_of = new[n * dv];
      for (int i = 0; i < dv; i++)
        for (int u = 0; u < z; u++)
          for (int j = 0; j < dc; j++) begin
            int c, v;
            c = i * z + u;
            v = j * z + ((u + shift(i, j)) % z);
            var_of[c * dc + j] = v;
            edge_of[v * dv + i] = c * dc + j;
          end
      lfsr = seed;
      foreach (p[k]) p[k] = 0;
    endfunction

    // Random-bit source: one step per iteration.
    function void rng_step(int prob);
      bit nb;
      nb = (int'(lfsr[7:0]) < prob);
      for (int k = n - 1; k > 0; k--) p[k] = p[k-1];
      p[0] = nb;
      for (int s = 0; s < 8; s++)
        lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    endfunction

    function int shift(int i, int j);
      if (dv == 4 && dc == 8 && z == 162) return R050[i][j];
      if (dv == 4 && dc == 16 && z == 81) return R075[i][j];
      return (i * j) % z;
    endfunction

    function void load(bit word[]);
      foreach (r[v]) begin r[v] = word[v]; dec[v] = word[v]; end
      for (int e = 0; e < m * dc; e++) vm[e] = r[var_of[e]];
    endfunction

    // One iteration; use_p selects probabilistic messages.
    function void iterate(bit use_p);
      bit nvm[];
      nvm = new[m * dc];
      for (int c = 0; c < m; c++)
        for (int j = 0; j < dc; j++) begin
          bit x = 0;
          for (int k = 0; k < dc; k++) if (k != j) x ^= vm[c * dc + k];
          cm[c * dc + j] = x;
        end
      for (int v = 0; v < n; v++) begin
        int all, b;
        b = (dv + 1) / 2;
        all = int'(r[v]);
        for (int i = 0; i < dv; i++) all += int'(cm[edge_of[v * dv + i]]);
        for (int i = 0; i < dv; i++) begin
          int t;
          t = int'(r[v] ^ (use_p & p[v]));
          for (int k = 0; k < dv; k++) if (k != i) t += int'(cm[edge_of[v * dv + k]]);
          nvm[edge_of[v * dv + i]] = (t > b) ? 1'b1 : (t < b) ? 1'b0 : r[v];
        end
        dec[v] = (2 * all > dv + 1) ? 1'b1 : (2 * all < dv + 1) ? 1'b0 : r[v];
      end
      vm = nvm;
    endfunction

    function bit check_bit(int c);
      bit x = 0;
      for (int j = 0; j < dc; j++) x ^= dec[var_of[c * dc + j]];
      return x;
    endfunction

    function bit is_codeword();
      for (int c = 0; c < m; c++) if (check_bit(c)) return 0;
      return 1;
    endfunction

    // Whole frame as the decoder runs it; returns the iteration count.
    function int decode(bit word[], int max_iter, int k_iter, int prob,
                        output bit ok, output int prob_iters);
      int it;
      load(word);
      it = 0; prob_iters = 0;
      while (!is_codeword() && it < max_iter) begin
        iterate(it >= k_iter);
        if (it >= k_iter) prob_iters++;
        rng_step(prob);
        it++;
      end
      ok = is_codeword();
      return it;
    endfunction
  endclass

endpackage
