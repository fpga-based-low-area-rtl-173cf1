// tb_test_ctrl: self-checking testbench for test_ctrl.
// Checks the load pulse on start, the walk of sel over 0..15 with we high
// (one PE per cycle), last on the final PE only, done exactly 17 cycles
// after start, and that a start while busy is ignored.
module tb_test_ctrl;
  localparam int unsigned N_PE = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, start, load, we, last, busy, done;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  test_ctrl dut (.clk, .rst_n, .start, .load, .sel, .we, .last, .busy, .done);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    chk(!busy && !we && !done && !load, "idle after reset");
    for (int run = 0; run < 5; run++) begin
      start = 1'b1;
      #1;
      chk(load, $sformatf("load with start t=%0t busy=%0b", $time, busy));
      @(posedge clk);
      #1;
      start = 1'b0;
      for (int p = 0; p < N_PE; p++) begin
        chk(busy && we && int'(sel) == p, $sformatf("step %0d sel=%0d", p, sel));
        chk(last == (p == N_PE - 1), "last");
        chk(!done, "no early done");
        // a start while busy must be ignored
        start = (p == 3);
        #1;
        chk(!load, "no load while busy");
        @(posedge clk);
        #1;
        start = 1'b0;
      end
      chk(done && busy && !we, "done after N_PE steps");
      @(posedge clk);
      #1;
      chk(!done && !busy, "back to idle");
      repeat (run) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
