// tb_pe_select: self-checking testbench for pe_select (MUX1, MUX2, MUX3).
// Fills the three arrays with distinct random values and checks, for every
// index, that each output is the entry at that index.
module tb_pe_select;
  localparam int unsigned N_PE = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  sel;
  logic [11:0] sad [N_PE];
  logic [5:0]  r_t [N_PE];
  logic [6:0]  q_t [N_PE];
  logic [11:0] sad_i;
  logic [5:0]  r_ti;
  logic [6:0]  q_ti;
  int checks = 0, failures = 0;

  pe_select dut (.sel, .sad, .r_t, .q_t, .sad_i, .r_ti, .q_ti);

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int p = 0; p < N_PE; p++) begin
        sad[p] = 12'($urandom);
        r_t[p] = 6'($urandom);
        q_t[p] = 7'($urandom);
      end
      for (int p = 0; p < N_PE; p++) begin
        sel = 4'(p);
        #1;
        checks++;
        if (sad_i !== sad[p] || r_ti !== r_t[p] || q_ti !== q_t[p]) begin
          failures++;
          $display("FAIL sel=%0d", p);
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
