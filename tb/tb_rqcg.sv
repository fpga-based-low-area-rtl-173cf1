// tb_rqcg: self-checking testbench for rqcg.
// Sweeps every 12-bit input of the SAD-width coder and every 8-bit input of
// the pixel-width coder, comparing (r, q) with integer mod/div by m = 63, and
// checks that m*q + r rebuilds the input.
module tb_rqcg;
  localparam int M = 63;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] v12;
  logic [5:0]  r12;
  logic [6:0]  q12;
  logic [7:0]  v8;
  logic [5:0]  r8;
  logic [2:0]  q8;
  int checks = 0, failures = 0;

  rqcg dut12 (.v(v12), .r(r12), .q(q12));
  rqcg #(.IN_W(8), .J(6)) dut8 (.v(v8), .r(r8), .q(q8));

  initial begin
    for (int v = 0; v < 4096; v++) begin
      v12 = 12'(v);
      #1;
      checks++;
      if (int'(r12) != v % M || int'(q12) != v / M || int'(q12) * M + int'(r12) != v) begin
        failures++;
        $display("FAIL 12-bit v=%0d r=%0d q=%0d", v, r12, q12);
      end
    end
    for (int v = 0; v < 256; v++) begin
      v8 = 8'(v);
      #1;
      checks++;
      if (int'(r8) != v % M || int'(q8) != v / M) begin
        failures++;
        $display("FAIL 8-bit v=%0d r=%0d q=%0d", v, r8, q8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
