// tb_drc: self-checking testbench for drc.
// For every quotient 0..64 and residue 0..62 whose value fits the 12-bit SAD,
// the recovered value must be 63*Q + R.
module tb_drc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  r_t;
  logic [6:0]  q_t;
  logic [11:0] sad_rec;
  int checks = 0, failures = 0;

  drc dut (.r_t, .q_t, .sad_rec);

  initial begin
    for (int q = 0; q <= 65; q++) begin
      for (int r = 0; r < 63; r++) begin
        if (63 * q + r < 4096) begin
          q_t = 7'(q); r_t = 6'(r);
          #1;
          checks++;
          if (int'(sad_rec) != 63 * q + r) begin
            failures++;
            $display("FAIL q=%0d r=%0d sad_rec=%0d", q, r, sad_rec);
          end
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
