// tb_bisdc_checker: self-checking testbench for bisdc_checker.
// Takes a true SAD, forms its test code (SAD mod 63, SAD div 63) here, and
// presents either the true SAD (must pass unchanged with s4 = 0) or a
// corrupted one with a single-bit or random error (must raise s4 and output
// the true SAD rebuilt from the test code).
module tb_bisdc_checker;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] sad_i, sad_chk;
  logic [5:0]  r_t;
  logic [6:0]  q_t;
  logic        s4;
  int checks = 0, failures = 0;

  bisdc_checker dut (.sad_i, .r_t, .q_t, .sad_chk, .s4);

  task automatic apply(input int true_sad, input logic [11:0] err);
    r_t   = 6'(true_sad % 63);
    q_t   = 7'(true_sad / 63);
    sad_i = 12'(true_sad) ^ err;
    #1;
    checks++;
    if (s4 !== (err != '0) || int'(sad_chk) != true_sad) begin
      failures++;
      $display("FAIL sad=%0d err=%h s4=%0b sad_chk=%0d", true_sad, err, s4, sad_chk);
    end
  endtask

  initial begin
    apply(0, '0);
    apply(4080, '0);
    apply(4080, 12'h800);
    apply(0, 12'hfff);
    for (int t = 0; t < 2000; t++) begin
      int s = $urandom_range(4080);
      apply(s, '0);
      apply(s, 12'(1 << $urandom_range(11)));
      apply(s, 12'($urandom_range(4095, 1)));
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
