// result_demux: the De-MUX after MUX4, with the result store it feeds.
//
// Each cycle the sequencer tests a PE, the checked (or repaired) SAD of PE_sel
// and its error flag S4 are routed to slot sel; meanwhile the next PE is
// tested. When the last PE has been written, the whole set is exported:
// results[] and err_map[] hold and export_valid pulses for one cycle.
// clear empties the store and the error count at the start of a new run.
// Keeping a per-PE error map and count is this design's choice, for
// diagnosis; the document only routes the data.
//
// Interface: clk, active-low synchronous reset rst_n; clear, we, sel, last,
// din, err_in in; results[N_PE], err_map, err_count, export_valid out.
// Slot sel is updated on the clock edge that ends the cycle in which we is high.
module result_demux #(
  parameter int unsigned N_PE  = bisdc_pkg::N_PE,
  parameter int unsigned SAD_W = bisdc_pkg::SAD_W,
  parameter int unsigned IDX_W = $clog2(N_PE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              we,
  input  logic [IDX_W-1:0]  sel,
  input  logic              last,
  input  logic [SAD_W-1:0]  din,
  input  logic              err_in,
  output logic [SAD_W-1:0]  results [N_PE],
  output logic [N_PE-1:0]   err_map,
  output logic [IDX_W:0]    err_count,
  output logic              export_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < N_PE; p++) results[p] <= '0;
      err_map      <= '0;
      err_count    <= '0;
      export_valid <= 1'b0;
    end else begin
      export_valid <= we && last;
      if (clear) begin
        for (int unsigned p = 0; p < N_PE; p++) results[p] <= '0;
        err_map   <= '0;
        err_count <= '0;
      end else if (we) begin
        results[sel] <= din;
        err_map[sel] <= err_in;
        if (err_in) err_count <= err_count + 1'b1;
      end
    end
  end

  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n) we |-> int'(sel) < int'(N_PE));
  a_last_with_we: assert property (@(posedge clk) disable iff (!rst_n) last |-> we);

endmodule
