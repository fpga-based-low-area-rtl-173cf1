// pe_select: the three selectors in front of the shared checker.
//
// MUX1 passes the SAD of the tested PE_i to the RQCG; MUX2 and MUX3 pass the
// residue R_Ti and quotient Q_Ti of the matching TCG_i to the EDC and DRC.
// All three use the same index sel, driven by the test sequencer.
//
// Interface: N_PE-entry arrays in, one entry of each out; sel is the PE index.
// Combinational.
module pe_select #(
  parameter int unsigned N_PE  = bisdc_pkg::N_PE,
  parameter int unsigned SAD_W = bisdc_pkg::SAD_W,
  parameter int unsigned J     = bisdc_pkg::J,
  parameter int unsigned Q_W   = bisdc_pkg::Q_W,
  parameter int unsigned IDX_W = $clog2(N_PE)
) (
  input  logic [IDX_W-1:0] sel,
  input  logic [SAD_W-1:0] sad [N_PE],
  input  logic [J-1:0]     r_t [N_PE],
  input  logic [Q_W-1:0]   q_t [N_PE],
  output logic [SAD_W-1:0] sad_i,
  output logic [J-1:0]     r_ti,
  output logic [Q_W-1:0]   q_ti
);

  always_comb begin
    sad_i = '0;
    r_ti  = '0;
    q_ti  = '0;
    for (int unsigned p = 0; p < N_PE; p++) begin
      if (IDX_W'(p) == sel) begin
        sad_i = sad[p];  // MUX1
        r_ti  = r_t[p];  // MUX2
        q_ti  = q_t[p];  // MUX3
      end
    end
  end

endmodule
