// edc: error detection circuit (EDC).
//
// Compares the RQ code of the tested PE's SAD (r_pe, q_pe, from the RQCG)
// with the test code predicted by that PE's TCG (r_t, q_t). The PE is
// error-free if and only if both residue and quotient agree. The result is
// the select S4 of the output multiplexer: 0 = error-free, 1 = error.
// Because r < m, the pair (q, r) fixes the value uniquely, so any change of
// the SAD that stays within SAD_W bits is detected.
//
// Interface: residues J bits, quotients Q_W bits; s4 one bit. Combinational.
module edc #(
  parameter int unsigned J   = bisdc_pkg::J,
  parameter int unsigned Q_W = bisdc_pkg::Q_W
) (
  input  logic [J-1:0]   r_pe,
  input  logic [Q_W-1:0] q_pe,
  input  logic [J-1:0]   r_t,
  input  logic [Q_W-1:0] q_t,
  output logic           s4
);

  assign s4 = (r_pe != r_t) || (q_pe != q_t);

endmodule
