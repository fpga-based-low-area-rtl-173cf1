// tcg: test code generator (TCG) for one PE.
//
// Works out, from the same pixels the PE sees, the RQ code (R_T, Q_T) that the
// PE's SAD must have, without computing the SAD itself. Each absolute
// difference d_k = |cur_pix[k] - ref_pix[k]| is coded as d_k = m*q_k + r_k
// (m = 2^J - 1); then
//   R_T = (sum_k r_k) mod m
//   Q_T = sum_k q_k + floor((sum_k r_k) / m)
// which is the decomposition of SAD / m into quotient and remainder.
// The document writes the residue of the signed differences X - Y; as the
// checked quantity is the SAD, this design codes the absolute differences.
//
// Interface: cur_pix/ref_pix as for sad_pe; r_t is J bits, q_t is SAD_W - J + 1 bits.
// Combinational.
module tcg #(
  parameter int unsigned N_PIX = bisdc_pkg::N_PIX,
  parameter int unsigned PIX_W = bisdc_pkg::PIX_W,
  parameter int unsigned J     = bisdc_pkg::J,
  parameter int unsigned SAD_W = PIX_W + $clog2(N_PIX),
  parameter int unsigned Q_W   = SAD_W - J + 1
) (
  input  logic [PIX_W-1:0] cur_pix [N_PIX],
  input  logic [PIX_W-1:0] ref_pix [N_PIX],
  output logic [J-1:0]     r_t,
  output logic [Q_W-1:0]   q_t
);

  // width of the sum of N_PIX residues, each below 2^J
  localparam int unsigned RS_W = J + $clog2(N_PIX);

  logic [PIX_W-1:0] d   [N_PIX];
  logic [J-1:0]     r_k [N_PIX];
  logic [PIX_W-J:0] q_k [N_PIX];
  logic [RS_W-1:0]  r_sum;
  logic [Q_W-1:0]   q_sum;
  logic [RS_W-J:0]  q_carry;

  for (genvar k = 0; k < N_PIX; k++) begin : g_pix
    assign d[k] = (cur_pix[k] >= ref_pix[k]) ? cur_pix[k] - ref_pix[k] : ref_pix[k] - cur_pix[k];
    rqcg #(.IN_W(PIX_W), .J(J)) u_rq (.v(d[k]), .r(r_k[k]), .q(q_k[k]));
  end

  always_comb begin
    r_sum = '0;
    q_sum = '0;
    for (int unsigned k = 0; k < N_PIX; k++) begin
      r_sum += RS_W'(r_k[k]);
      q_sum += Q_W'(q_k[k]);
    end
  end

  // fold the residue sum back into a residue and a quotient carry
  rqcg #(.IN_W(RS_W), .J(J)) u_rq_sum (.v(r_sum), .r(r_t), .q(q_carry));

  assign q_t = q_sum + Q_W'(q_carry);

endmodule
