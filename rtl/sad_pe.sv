// sad_pe: processing element (PE) of the motion estimation array.
//
// Computes the sum of absolute differences between a block of current-frame
// pixels (cur_pix) and a block of reference-frame pixels (ref_pix):
//   SAD = sum_k |cur_pix[k] - ref_pix[k]|, k = 0 .. N_PIX-1.
// The block size (4x4, 16 pixels) is the one the design is evaluated with; the
// PE is purely combinational, one SAD per evaluation, as its operation time is
// quoted as a single propagation delay. The adder chain below is this design's
// own choice; synthesis is free to rebalance it into a tree.
//
// Interface: cur_pix/ref_pix are N_PIX unsigned PIX_W-bit pixels, sad is SAD_W bits,
// wide enough for N_PIX * (2^PIX_W - 1). No clock: output follows the inputs.
module sad_pe #(
  parameter int unsigned N_PIX = bisdc_pkg::N_PIX,
  parameter int unsigned PIX_W = bisdc_pkg::PIX_W,
  parameter int unsigned SAD_W = PIX_W + $clog2(N_PIX)
) (
  input  logic [PIX_W-1:0] cur_pix [N_PIX],
  input  logic [PIX_W-1:0] ref_pix [N_PIX],
  output logic [SAD_W-1:0] sad
);

  always_comb begin
    logic [SAD_W-1:0] acc;
    acc = '0;
    for (int unsigned k = 0; k < N_PIX; k++) begin
      if (cur_pix[k] >= ref_pix[k]) acc += SAD_W'(cur_pix[k] - ref_pix[k]);
      else                  acc += SAD_W'(ref_pix[k] - cur_pix[k]);
    end
    sad = acc;
  end

endmodule
