// result_mux: output selector MUX4.
//
// Passes the SAD of the tested PE when the EDC finds it error-free (s4 = 0)
// and the value rebuilt by the DRC when it does not (s4 = 1).
//
// Interface: two SAD_W-bit data inputs, select s4, SAD_W-bit output.
// Combinational.
module result_mux #(
  parameter int unsigned SAD_W = bisdc_pkg::SAD_W
) (
  input  logic [SAD_W-1:0] pe_data,
  input  logic [SAD_W-1:0] rec_data,
  input  logic             s4,
  output logic [SAD_W-1:0] dout
);

  assign dout = s4 ? rec_data : pe_data;

endmodule
