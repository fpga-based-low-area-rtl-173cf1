// bisdc_checker: self-detection and self-correction path for one PE.
//
// Given the SAD of the PE under test (sad_i) and the test code its TCG
// predicted (r_t, q_t), this block
//   - codes sad_i into (R_PE, Q_PE) with an RQCG,
//   - compares the two codes in the EDC: s4 = 1 when they differ,
//   - rebuilds 63*Q_T + R_T (in general (2^J - 1)*Q_T + R_T) in the DRC,
//     at the same time as the detection,
//   - lets MUX4 pass sad_i when it is error-free, the rebuilt value otherwise.
// This is the per-PE testing arrangement of the document; in the array a
// single instance is shared by all PEs through selectors.
//
// Interface: sad_i SAD_W bits, r_t J bits, q_t Q_W bits in; sad_chk SAD_W
// bits and s4 out. Combinational.
module bisdc_checker #(
  parameter int unsigned J     = bisdc_pkg::J,
  parameter int unsigned SAD_W = bisdc_pkg::SAD_W,
  parameter int unsigned Q_W   = SAD_W - J + 1
) (
  input  logic [SAD_W-1:0] sad_i,
  input  logic [J-1:0]     r_t,
  input  logic [Q_W-1:0]   q_t,
  output logic [SAD_W-1:0] sad_chk,
  output logic             s4
);

  logic [J-1:0]     r_pe;
  logic [Q_W-1:0]   q_pe;
  logic [SAD_W-1:0] sad_rec;

  rqcg #(.IN_W(SAD_W), .J(J)) u_rqcg (.v(sad_i), .r(r_pe), .q(q_pe));

  edc #(.J(J), .Q_W(Q_W)) u_edc (.r_pe, .q_pe, .r_t, .q_t, .s4);

  drc #(.J(J), .Q_W(Q_W), .SAD_W(SAD_W)) u_drc (.r_t, .q_t, .sad_rec);

  result_mux #(.SAD_W(SAD_W)) u_mux4 (
    .pe_data(sad_i), .rec_data(sad_rec), .s4, .dout(sad_chk)
  );

endmodule
