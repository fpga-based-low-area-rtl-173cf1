// tb_result_demux: self-checking testbench for result_demux.
// Writes every slot in turn with random data and error flags, as the
// sequencer does, then checks the stored results, the error map, the error
// count, the one-cycle export pulse after the last slot, and that clear
// empties the store.
module tb_result_demux;
  localparam int unsigned N_PE = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, clear, we, last, err_in, export_valid;
  logic [3:0]  sel;
  logic [11:0] din;
  logic [11:0] results [N_PE];
  logic [15:0] err_map;
  logic [4:0]  err_count;
  logic [11:0] exp_res [N_PE];
  logic [15:0] exp_map;
  int checks = 0, failures = 0;
  int exports = 0;

  result_demux dut (.clk, .rst_n, .clear, .we, .sel, .last, .din, .err_in,
                    .results, .err_map, .err_count, .export_valid);

  always @(posedge clk) if (export_valid) exports++;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; we = 1'b0; last = 1'b0; err_in = 1'b0;
    sel = '0; din = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 20; run++) begin
      @(posedge clk);
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      #1;
      chk(err_map == '0 && err_count == '0 && results[N_PE-1] == '0, "clear");
      exp_map = '0;
      for (int p = 0; p < N_PE; p++) begin
        exp_res[p] = 12'($urandom);
        exp_map[p] = 1'($urandom);
        we <= 1'b1; sel <= 4'(p); din <= exp_res[p]; err_in <= exp_map[p];
        last <= (p == N_PE - 1);
        @(posedge clk);
        #1;
        chk(export_valid == (p == N_PE - 1), "export_valid timing");
      end
      we <= 1'b0; last <= 1'b0;
      @(posedge clk);
      #1;
      chk(!export_valid, "export pulse length");
      for (int p = 0; p < N_PE; p++) chk(results[p] == exp_res[p], $sformatf("slot %0d", p));
      chk(err_map == exp_map, "err_map");
      chk(int'(err_count) == $countones(exp_map), "err_count");
    end
    chk(exports == 20, "export count");
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
