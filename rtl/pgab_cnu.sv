// pgab_cnu: check node unit of the probabilistic Gallager B decoder.
//
// Each CNU returns on every edge the modulo-2 sum of the messages on its
// other DC-1 edges (the published check-node rule), computed as the parity of
// all DC inputs xor the edge's own input. It also takes the DC hard decisions
// of its variables and returns their parity: one syndrome bit, 0 when this
// check is satisfied. The syndrome bits of all CNUs feed the syndrome unit.
//
// Purely combinational.
module pgab_cnu #(
  parameter int unsigned DC = pgab_pkg::CODE_DC
) (
  input  logic [DC-1:0] v2c_i,   // messages from the DC variable nodes
  input  logic [DC-1:0] dec_i,   // hard decisions of the DC variable nodes
  output logic [DC-1:0] c2v_o,   // messages to the DC variable nodes
  output logic          syn_o    // parity of the hard decisions
);

  logic parity;

  assign parity = ^v2c_i;
  assign c2v_o  = {DC{parity}} ^ v2c_i;
  assign syn_o  = ^dec_i;

endmodule
