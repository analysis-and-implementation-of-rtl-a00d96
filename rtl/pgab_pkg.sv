// pgab_pkg: constants and helpers shared by the probabilistic Gallager B
// (PGaB) LDPC decoder.
//
// The decoder targets a regular quasi-cyclic (QC) LDPC code of length
// N = 1296 with variable-node degree DV = 4. The check-node degree DC sets the
// rate: DC = 8 gives rate 0.5 (648 checks), DC = 16 gives rate 0.75 (324
// checks). Code length, degrees and rates follow the published design.
//
// The parity-check matrix H is a DV x DC array of Z x Z circulant
// permutation matrices, Z = N / DC. Check c = i*Z + u is connected to
// variable v = j*Z + ((u + s(i, j)) mod Z) for every block column j, where
// s(i, j) is the shift of circulant (block row i, block column j).
// The exact matrices are not published, so the shifts are this design's own:
//   - rate 0.5 (DC = 8, Z = 162): table SHIFT_R050, chosen by a search so
//     that the Tanner graph has no cycles of length 4 or 6 (girth 8);
//   - rate 0.75 (DC = 16, Z = 81): table SHIFT_R075, no cycles of length 4;
//   - any other size: s(i, j) = (i * j) mod Z, free of 4-cycles whenever
//     (DV-1)*(DC-1) < Z.
// Row 0 and column 0 of both tables are zero, the usual normalisation.
package pgab_pkg;

  // Code of the main configuration: N = 1296, dv = 4, dc = 8, rate 0.5.
  localparam int unsigned CODE_N  = 1296;
  localparam int unsigned CODE_DV = 4;
  localparam int unsigned CODE_DC = 8;

  // Width of the iteration counter and of the probability setting.
  localparam int unsigned ITER_W  = 8;
  localparam int unsigned PROB_W  = 8;

  // Random number generator: 32-bit LFSR (x^32 + x^22 + x^2 + x + 1).
  localparam int unsigned LFSR_W    = 32;
  localparam logic [31:0] LFSR_SEED = 32'hACE1_2468;

  // Decoder controller states.
  typedef enum logic {
    ST_IDLE,   // waiting for a frame
    ST_RUN     // iterating until the syndrome is zero or the limit is hit
  } ctrl_state_t;

  // Circulant shifts of the two codes of the design.
  localparam int unsigned SHIFT_R050 [4][8] = '{
    '{0,   0,   0,   0,   0,   0,   0,   0},
    '{0, 137,  43, 131,  90,  13,  93, 154},
    '{0, 103,  49, 105, 151,  48, 116,  31},
    '{0,  82,   6, 147,  44,  77, 136,  80}
  };
  localparam int unsigned SHIFT_R075 [4][16] = '{
    '{0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{0, 38, 76, 63,  5, 21, 29, 56, 46, 23, 51, 53, 44,  9, 50, 80},
    '{0, 41,  2, 10, 22, 27, 42, 64, 60, 33, 62, 18,  4, 75, 19, 24},
    '{0, 61, 11, 24, 40, 68, 26, 32, 34, 12, 23, 66, 30, 48, 13, 19}
  };

  // Shift of circulant (block row i, block column j) for a code with
  // dv block rows, dc block columns and circulant size z.
  function automatic int unsigned qc_shift(int unsigned i, int unsigned j,
                                           int unsigned dv, int unsigned dc,
                                           int unsigned z);
    if (dv == 4 && dc == 8 && z == 162)  return SHIFT_R050[i][j];
    if (dv == 4 && dc == 16 && z == 81)  return SHIFT_R075[i][j];
    return (i * j) % z;
  endfunction

  // Variable connected to edge j of check u of block row i.
  function automatic int unsigned qc_var(int unsigned i, int unsigned u,
                                         int unsigned j, int unsigned dv,
                                         int unsigned dc, int unsigned z);
    return j * z + ((u + qc_shift(i, j, dv, dc, z)) % z);
  endfunction

  // One step of the Fibonacci LFSR: shift left, feedback from taps 32,22,2,1.
  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

endpackage
