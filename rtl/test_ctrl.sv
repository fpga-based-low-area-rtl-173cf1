// test_ctrl: sequencer of the built-in self-detection and correction.
//
// The PEs are checked one after another through a single shared checker
// (RQCG, EDC, DRC), so the whole array costs the delay of checking one PE per
// step. On start (while idle) the sequencer pulses load, so the block
// registers capture the pixels; it then walks sel over PE 0 .. N_PE-1, one PE
// per clock cycle, with we high so that the De-MUX stores each checked SAD;
// last marks the final PE. One cycle later done pulses.
//
// Timing: start in cycle 0 -> sel = 0 in cycle 1 ... sel = N_PE-1 in cycle
// N_PE -> done in cycle N_PE + 1. start is ignored while busy.
// The one-PE-per-cycle step is this design's choice.
//
// Interface: clk, active-low synchronous reset rst_n, start; load, sel, we,
// last, busy, done.
module test_ctrl
#(
  parameter int unsigned N_PE  = bisdc_pkg::N_PE,
  parameter int unsigned IDX_W = $clog2(N_PE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             load,
  output logic [IDX_W-1:0] sel,
  output logic             we,
  output logic             last,
  output logic             busy,
  output logic             done
);

  bisdc_pkg::test_state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= bisdc_pkg::ST_IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        bisdc_pkg::ST_IDLE: if (start) begin
          state <= bisdc_pkg::ST_TEST;
          sel   <= '0;
        end
        bisdc_pkg::ST_TEST: if (last) state <= bisdc_pkg::ST_DONE;
                 else      sel   <= sel + 1'b1;
        bisdc_pkg::ST_DONE: state <= bisdc_pkg::ST_IDLE;
        default: state <= bisdc_pkg::ST_IDLE;
      endcase
    end
  end

  assign load = (state == bisdc_pkg::ST_IDLE) && start;
  assign we   = (state == bisdc_pkg::ST_TEST);
  assign last = we && (sel == IDX_W'(N_PE - 1));
  assign busy = (state != bisdc_pkg::ST_IDLE);
  assign done = (state == bisdc_pkg::ST_DONE);

  // done is a single-cycle pulse
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  // the tested index stays inside the array
  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n) we |-> int'(sel) < int'(N_PE));

endmodule
