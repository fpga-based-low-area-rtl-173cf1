// tb_edc: self-checking testbench for edc.
// Equal codes must give S4 = 0; a differing residue, a differing quotient, or
// both must give S4 = 1.
module tb_edc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] r_pe, r_t;
  logic [6:0] q_pe, q_t;
  logic       s4;
  int checks = 0, failures = 0;

  edc dut (.r_pe, .q_pe, .r_t, .q_t, .s4);

  task automatic expect_s4(input logic e);
    #1;
    checks++;
    if (s4 !== e) begin
      failures++;
      $display("FAIL r_pe=%0d q_pe=%0d r_t=%0d q_t=%0d s4=%0b", r_pe, q_pe, r_t, q_t, s4);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      r_t = 6'($urandom_range(62)); q_t = 7'($urandom_range(65));
      r_pe = r_t; q_pe = q_t;
      expect_s4(1'b0);
      r_pe = r_t ^ 6'(1 << $urandom_range(5));
      expect_s4(1'b1);
      r_pe = r_t; q_pe = q_t ^ 7'(1 << $urandom_range(6));
      expect_s4(1'b1);
      r_pe = ~r_t;
      expect_s4(1'b1);
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
