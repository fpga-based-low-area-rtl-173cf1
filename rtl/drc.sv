// drc: data recovery circuit (DRC).
//
// Rebuilds a SAD from the test code of its TCG alone:
//   SAD = m*Q_T + R_T = 2^J * Q_T - Q_T + R_T,   m = 2^J - 1.
// A barrel shifter forms 2^J * Q_T and a corrector adds R_T - Q_T, as the
// recovery scheme prescribes. The shift amount is the constant J here; the
// shifter keeps it as an input so that the same structure serves any J.
//
// Interface: r_t J bits, q_t Q_W bits, sad_rec SAD_W bits. Combinational;
// runs in parallel with error detection, so the repaired value is ready in
// the same cycle as S4.
module drc #(
  parameter int unsigned J     = bisdc_pkg::J,
  parameter int unsigned Q_W   = bisdc_pkg::Q_W,
  parameter int unsigned SAD_W = bisdc_pkg::SAD_W
) (
  input  logic [J-1:0]     r_t,
  input  logic [Q_W-1:0]   q_t,
  output logic [SAD_W-1:0] sad_rec
);

  // Q_W + J bits hold 2^J * Q_T without loss
  localparam int unsigned W    = Q_W + J;
  localparam int unsigned SH_W = $clog2(J + 1);

  logic [W-1:0] shifted;

  barrel_shifter #(.W(W), .SH_W(SH_W)) u_shift (
    .din  (W'(q_t)),
    .shamt(SH_W'(J)),
    .dout (shifted)
  );

  // corrector: -Q_T + R_T
  assign sad_rec = SAD_W'(shifted - W'(q_t) + W'(r_t));

endmodule
