// tb_me_bisdc_top: end-to-end testbench of the motion estimation array with
// built-in self-detection and correction, at its default size (16 PEs, 4x4
// blocks, 8-bit pixels, m = 63).
//
// Each run loads a random current block and 16 random reference blocks,
// injects errors into a random subset of PEs (single-bit, multi-bit, or
// none), and checks after done that:
//   - every exported SAD equals the true SAD computed here (faulty PEs are
//     repaired from their test code, healthy ones pass through);
//   - err_map flags exactly the PEs that were given an error, err_count
//     counts them;
//   - done and export_valid come N_PE + 1 cycles after start;
//   - a start while busy is ignored.
// It counts how often each mechanism occurred (error-free pass, detection and
// repair of a single-bit and of a multi-bit error, export, ignored start)
// and fails a mechanism that never happened.
module tb_me_bisdc_top;
  localparam int unsigned N_PE  = 16;
  localparam int unsigned N_PIX = 16;
  localparam int          RUNS  = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, start, busy, done, export_valid;
  logic [7:0]  cur_blk    [N_PIX];
  logic [7:0]  ref_blk    [N_PE][N_PIX];
  logic [11:0] err_inject [N_PE];
  logic [11:0] sad_out    [N_PE];
  logic [15:0] err_map;
  logic [4:0]  err_count;

  int checks = 0, failures = 0;
  int n_pass = 0, n_single = 0, n_multi = 0, n_export = 0, n_ignored = 0;

  me_bisdc_top dut (.clk, .rst_n, .start, .cur_blk, .ref_blk, .err_inject,
                    .sad_out, .err_map, .err_count, .busy, .done, .export_valid);

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int true_sad(input int p);
    int s = 0;
    for (int k = 0; k < N_PIX; k++) begin
      int d = int'(cur_blk[k]) - int'(ref_blk[p][k]);
      s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  initial begin
    int exp_sad [N_PE];
    logic [15:0] exp_map;
    int cycles;
    rst_n = 1'b0; start = 1'b0;
    for (int k = 0; k < N_PIX; k++) cur_blk[k] = '0;
    for (int p = 0; p < N_PE; p++) begin
      err_inject[p] = '0;
      for (int k = 0; k < N_PIX; k++) ref_blk[p][k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int run = 0; run < RUNS; run++) begin
      // stimulus; some runs use extreme blocks
      for (int k = 0; k < N_PIX; k++) cur_blk[k] = (run % 10 == 1) ? 8'hff : 8'($urandom);
      exp_map = '0;
      for (int p = 0; p < N_PE; p++) begin
        for (int k = 0; k < N_PIX; k++) ref_blk[p][k] = (run % 10 == 1) ? 8'h00 : 8'($urandom);
        exp_sad[p] = true_sad(p);
        err_inject[p] = '0;
        if (run % 4 != 0 && $urandom_range(3) == 0) begin
          if ($urandom_range(1) == 0) begin
            err_inject[p] = 12'(1 << $urandom_range(11));
            n_single++;
          end else begin
            err_inject[p] = 12'($urandom_range(4095, 1));
            if ($countones(err_inject[p]) == 1) n_single++;
            else n_multi++;
          end
          exp_map[p] = 1'b1;
        end else begin
          n_pass++;
        end
      end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cycles = 1;
      // a second start during the test must change nothing
      @(posedge clk);
      cycles++;
      if (run % 3 == 0) begin
        for (int k = 0; k < N_PIX; k++) cur_blk[k] = ~cur_blk[k];
        start <= 1'b1;
        n_ignored++;
      end
      @(posedge clk);
      start <= 1'b0;
      cycles++;
      while (!done) begin
        @(posedge clk);
        cycles++;
      end
      // done is seen at the edge after it rises: N_PE + 1 cycles after start
      chk(cycles == N_PE + 2, $sformatf("latency %0d", cycles));
      chk(export_valid, "export_valid with done");
      if (export_valid) n_export++;
      for (int p = 0; p < N_PE; p++)
        chk(int'(sad_out[p]) == exp_sad[p],
            $sformatf("run %0d PE %0d sad=%0d expected %0d", run, p, sad_out[p], exp_sad[p]));
      chk(err_map == exp_map, $sformatf("run %0d err_map %h expected %h", run, err_map, exp_map));
      chk(int'(err_count) == $countones(exp_map), "err_count");
      @(posedge clk);
      chk(!busy && !export_valid, "idle after done");
    end
    $display("mechanisms: error-free pass %0d, single-bit repair %0d, multi-bit repair %0d, export %0d, start ignored while busy %0d",
             n_pass, n_single, n_multi, n_export, n_ignored);
    chk(n_pass > 0, "error-free pass never happened");
    chk(n_single > 0, "single-bit repair never happened");
    chk(n_multi > 0, "multi-bit repair never happened");
    chk(n_export == RUNS, "export");
    chk(n_ignored > 0, "ignored start never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUNS * 40 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
