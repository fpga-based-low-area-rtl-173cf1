// rqcg: residue-and-quotient code generator (RQCG).
//
// Splits an unsigned value v into its RQ code for the modulus m = 2^J - 1:
//   r = v mod m,   q = floor(v / m),   so that v = m*q + r, 0 <= r < m.
// The code is produced by a plain division by the constant m, which synthesis
// turns into fixed logic; this replaces a bit-serial residue/quotient unit.
// Used stand-alone to code the SAD of the tested PE, and inside the test code
// generator for the per-pixel codes.
//
// Interface: v is IN_W bits (IN_W >= J); r is J bits; q is IN_W - J + 1 bits,
// enough because m >= 2^(J-1). Combinational.
module rqcg #(
  parameter int unsigned IN_W = bisdc_pkg::SAD_W,
  parameter int unsigned J    = bisdc_pkg::J
) (
  input  logic [IN_W-1:0]  v,
  output logic [J-1:0]     r,
  output logic [IN_W-J:0]  q
);

  localparam logic [IN_W-1:0] M = IN_W'((1 << J) - 1);

  always_comb begin
    r = J'(v % M);
    q = (IN_W-J+1)'(v / M);
  end

endmodule
