// tb_tcg: self-checking testbench for tcg.
// For corner and random blocks, the test code (R_T, Q_T) must equal
// SAD mod 63 and SAD div 63, where the SAD is computed here directly.
module tb_tcg;
  localparam int unsigned N_PIX = 16;
  localparam int M = 63;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] cur_pix [N_PIX];
  logic [7:0] ref_pix [N_PIX];
  logic [5:0] r_t;
  logic [6:0] q_t;
  int checks = 0, failures = 0;

  tcg dut (.cur_pix, .ref_pix, .r_t, .q_t);

  task automatic check_now();
    int s = 0;
    #1;
    for (int k = 0; k < N_PIX; k++) begin
      int d = int'(cur_pix[k]) - int'(ref_pix[k]);
      s += (d < 0) ? -d : d;
    end
    checks++;
    if (int'(r_t) != s % M || int'(q_t) != s / M) begin
      failures++;
      $display("FAIL sad=%0d r_t=%0d q_t=%0d", s, r_t, q_t);
    end
  endtask

  initial begin
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'd10; ref_pix[k] = 8'd10; end
    check_now();
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'hff; ref_pix[k] = 8'h00; end
    check_now();
    // every difference 62: residues sum to 992, exercising the quotient carry
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'd0; ref_pix[k] = 8'd62; end
    check_now();
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < N_PIX; k++) begin
        cur_pix[k] = 8'($urandom);
        ref_pix[k] = 8'($urandom);
      end
      check_now();
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
