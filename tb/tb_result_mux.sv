// tb_result_mux: self-checking testbench for result_mux (MUX4).
// S4 = 0 must pass the PE data, S4 = 1 the recovered data.
module tb_result_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] pe_data, rec_data, dout;
  logic        s4;
  int checks = 0, failures = 0;

  result_mux dut (.pe_data, .rec_data, .s4, .dout);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      pe_data  = 12'($urandom);
      rec_data = ~pe_data;
      s4 = 1'b0;
      #1;
      checks++;
      if (dout !== pe_data) begin failures++; $display("FAIL s4=0"); end
      s4 = 1'b1;
      #1;
      checks++;
      if (dout !== rec_data) begin failures++; $display("FAIL s4=1"); end
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
