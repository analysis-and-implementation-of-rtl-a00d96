// pgab_core: the fully parallel node arrays of the PGaB decoder and the
// H-matrix interconnect between them.
//
// N variable node units and M = N*DV/DC check node units are instantiated,
// one per node of the Tanner graph. The interconnect wires each check to its
// DC variables following the quasi-cyclic H of pgab_pkg (circulant size
// Z = N/DC, circulant shifts s(i,j) from the package): edge i of variable
// j*Z+t meets edge j of check i*Z+((t - s(i,j)) mod Z). Every edge carries
// one bit each way, and every variable also sends its hard decision to its
// checks, which return one syndrome bit each.
//
// State: the channel word (N bits), the VNU-to-CNU messages (N*DV bits) and
// the hard decisions (N bits). The check side is combinational, so one full
// decoding iteration (CNU, then VNU) takes one clock cycle.
//
// Interface and timing:
//   load_i : r_i is captured, every VNU sends r on all its edges and its
//            hard decision is r (iteration 0).
//   step_i : one iteration; messages and decisions are replaced with the
//            VNU outputs computed from the current check messages and p_i.
//   syn_o  : per-check parity of the current hard decisions (dec_o),
//            combinational from the registers.
// load_i has priority over step_i. Registers reset to zero.
module pgab_core #(
  parameter int unsigned N  = pgab_pkg::CODE_N,
  parameter int unsigned DV = pgab_pkg::CODE_DV,
  parameter int unsigned DC = pgab_pkg::CODE_DC
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [N-1:0] r_i,
  input  logic         step_i,
  input  logic [N-1:0] p_i,
  output logic [N-1:0] dec_o,
  output logic [N*DV/DC-1:0] syn_o
);

  localparam int unsigned Z = N / DC;
  localparam int unsigned M = N * DV / DC;

  // Registered state.
  logic [N-1:0]  r_q;
  logic [DV-1:0] v2c_q [N];
  logic [N-1:0]  dec_q;

  // Per-node wiring.
  logic [DV-1:0] c2v_v  [N];   // check messages, gathered at each variable
  logic [DV-1:0] v2c_d  [N];   // new variable messages
  logic [N-1:0]  dec_d;
  logic [DC-1:0] v2c_c  [M];   // variable messages, gathered at each check
  logic [DC-1:0] dec_c  [M];
  logic [DC-1:0] c2v_c  [M];   // check messages, leaving each check

  // Variable node units.
  for (genvar v = 0; v < N; v++) begin : g_vnu
    pgab_vnu #(.DV(DV)) u_vnu (
      .c2v_i (c2v_v[v]),
      .r_i   (r_q[v]),
      .p_i   (p_i[v]),
      .v2c_o (v2c_d[v]),
      .dec_o (dec_d[v])
    );
  end

  // Check node units.
  for (genvar c = 0; c < M; c++) begin : g_cnu
    pgab_cnu #(.DC(DC)) u_cnu (
      .v2c_i (v2c_c[c]),
      .dec_i (dec_c[c]),
      .c2v_o (c2v_c[c]),
      .syn_o (syn_o[c])
    );
  end

  // Topology (H matrix): block row i, check offset u, block column j.
  for (genvar i = 0; i < DV; i++) begin : g_row
    for (genvar u = 0; u < Z; u++) begin : g_chk
      for (genvar j = 0; j < DC; j++) begin : g_edge
        localparam int unsigned C = i * Z + u;
        localparam int unsigned V = pgab_pkg::qc_var(i, u, j, DV, DC, Z);
        assign v2c_c[C][j] = v2c_q[V][i];
        assign dec_c[C][j] = dec_q[V];
        assign c2v_v[V][i] = c2v_c[C][j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q   <= '0;
      dec_q <= '0;
      for (int v = 0; v < N; v++) v2c_q[v] <= '0;
    end else if (load_i) begin
      r_q   <= r_i;
      dec_q <= r_i;
      for (int v = 0; v < N; v++) v2c_q[v] <= {DV{r_i[v]}};
    end else if (step_i) begin
      dec_q <= dec_d;
      for (int v = 0; v < N; v++) v2c_q[v] <= v2c_d[v];
    end
  end

  assign dec_o = dec_q;

endmodule
