// tb_sad_pe: self-checking testbench for sad_pe.
// Drives corner blocks (equal, maximum difference in both directions) and
// random blocks, and compares the SAD with a sum worked out here with
// integer arithmetic.
module tb_sad_pe;
  localparam int unsigned N_PIX = 16;
  localparam int unsigned PIX_W = 8;
  localparam int unsigned SAD_W = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [PIX_W-1:0] cur_pix [N_PIX];
  logic [PIX_W-1:0] ref_pix [N_PIX];
  logic [SAD_W-1:0] sad;
  int checks = 0, failures = 0;

  sad_pe dut (.cur_pix, .ref_pix, .sad);

  task automatic check_now();
    int exp_sad = 0;
    #1;
    for (int k = 0; k < N_PIX; k++) begin
      int d = int'(cur_pix[k]) - int'(ref_pix[k]);
      exp_sad += (d < 0) ? -d : d;
    end
    checks++;
    if (int'(sad) != exp_sad) begin
      failures++;
      $display("FAIL sad=%0d expected %0d", sad, exp_sad);
    end
  endtask

  initial begin
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'd37; ref_pix[k] = 8'd37; end
    check_now();
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'hff; ref_pix[k] = 8'h00; end
    check_now();
    for (int k = 0; k < N_PIX; k++) begin cur_pix[k] = 8'h00; ref_pix[k] = 8'hff; end
    check_now();
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < N_PIX; k++) begin
        cur_pix[k] = PIX_W'($urandom);
        ref_pix[k] = PIX_W'($urandom);
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
