// barrel_shifter: logarithmic left shifter used by the data recovery circuit.
//
// Shifts din left by shamt bit positions in $clog2(W) stages; stage s shifts
// by 2^s when bit s of shamt is set. Bits shifted past the top are dropped.
//
// Interface: din/dout W bits, shamt SH_W bits. Combinational.
module barrel_shifter #(
  parameter int unsigned W    = 16,
  parameter int unsigned SH_W = $clog2(W)
) (
  input  logic [W-1:0]    din,
  input  logic [SH_W-1:0] shamt,
  output logic [W-1:0]    dout
);

  logic [W-1:0] stage [SH_W+1];

  assign stage[0] = din;
  for (genvar s = 0; s < SH_W; s++) begin : g_stage
    assign stage[s+1] = shamt[s] ? (stage[s] << (2**s)) : stage[s];
  end
  assign dout = stage[SH_W];

endmodule
