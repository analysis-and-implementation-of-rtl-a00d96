// pgab_vnu: variable node unit of the probabilistic Gallager B decoder.
//
// Each VNU has DV message inputs from its check nodes, the channel bit r and
// one random bit p. For every edge e it sends its check node the message
//   t = (p xor r) + sum of the other DV-1 incoming check messages
//   m(e) = 1 if t > b,  0 if t < b,  r otherwise,   b = ceil(DV/2),
// which is the published Gallager B rule with the probabilistic term added.
// With p = 0 it is plain Gallager B; the random bit only enters the messages
// sent to the check nodes, never the hard decision.
//
// The hard decision is the majority of r and all DV check messages, and r on
// a tie (ties are only possible for odd DV). This decision rule is this
// design's own choice: the published text does not spell it out.
//
// Purely combinational; the decoder registers the outputs.
module pgab_vnu #(
  parameter int unsigned DV = pgab_pkg::CODE_DV
) (
  input  logic [DV-1:0] c2v_i,   // messages from the DV check nodes
  input  logic          r_i,     // received channel bit
  input  logic          p_i,     // random disturbance bit (0 = plain GaB)
  output logic [DV-1:0] v2c_o,   // messages to the DV check nodes
  output logic          dec_o    // hard decision
);

  localparam int unsigned B  = (DV + 1) / 2;   // ceil(DV/2)
  localparam int unsigned SW = $clog2(DV + 2);

  logic          rp;
  logic [SW-1:0] sum_all;

  assign rp = p_i ^ r_i;

  always_comb begin
    sum_all = SW'(r_i);
    for (int k = 0; k < DV; k++) sum_all += SW'(c2v_i[k]);
  end

  always_comb begin
    logic [SW-1:0] t;
    for (int e = 0; e < DV; e++) begin
      t = SW'(rp);
      for (int k = 0; k < DV; k++)
        if (k != e) t += SW'(c2v_i[k]);
      if (t > SW'(B))      v2c_o[e] = 1'b1;
      else if (t < SW'(B)) v2c_o[e] = 1'b0;
      else                 v2c_o[e] = r_i;
    end
  end

  // Majority of DV+1 votes; compared as 2*sum against DV+1.
  always_comb begin
    if ({1'b0, sum_all, 1'b0} > (SW + 2)'(DV + 1))      dec_o = 1'b1;
    else if ({1'b0, sum_all, 1'b0} < (SW + 2)'(DV + 1)) dec_o = 1'b0;
    else                                                 dec_o = r_i;
  end

endmodule
