// pgab_syndrome: the syndrome unit of the PGaB decoder.
//
// It collects the M parity bits returned by the check node units (one per
// row of H, computed from the variables' hard decisions) and raises its
// decision output when every one of them is zero: the current hard-decision
// word then satisfies all parity checks and decoding can stop.
//
// A NOR reduction over all M bits; purely combinational. The published design
// shows this unit and its inputs; the reduction itself is the obvious one.
module pgab_syndrome #(
  parameter int unsigned M = pgab_pkg::CODE_N * pgab_pkg::CODE_DV / pgab_pkg::CODE_DC
) (
  input  logic [M-1:0] syn_i,      // one parity bit per check, 1 = violated
  output logic         valid_o     // 1: all checks satisfied (codeword)
);

  assign valid_o = ~(|syn_i);

endmodule
