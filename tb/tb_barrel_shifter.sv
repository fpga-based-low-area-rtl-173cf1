// tb_barrel_shifter: self-checking testbench for barrel_shifter.
// For random 13-bit words and every shift amount 0..15 the output must equal
// the input shifted left, with bits beyond the top dropped.
module tb_barrel_shifter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [12:0] din, dout;
  logic [3:0]  shamt;
  int checks = 0, failures = 0;

  barrel_shifter #(.W(13), .SH_W(4)) dut (.din, .shamt, .dout);

  initial begin
    for (int t = 0; t < 200; t++) begin
      din = 13'($urandom);
      for (int s = 0; s < 16; s++) begin
        shamt = 4'(s);
        #1;
        checks++;
        if (dout !== 13'(longint'(din) * (longint'(1) << s))) begin
          failures++;
          $display("FAIL din=%h shamt=%0d dout=%h", din, s, dout);
        end
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
