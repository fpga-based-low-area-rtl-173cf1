// me_bisdc_top: motion estimation array with built-in self-detection and
// correction (BISDC) of its processing elements.
//
// N_PE PEs each compute the SAD between the current 4x4 block and one
// candidate 4x4 reference block. Beside every PE_i a test code generator
// TCG_i predicts, from the same pixels, the residue-and-quotient code
// (R_Ti, Q_Ti) of that SAD modulo m = 2^J - 1. The PEs are then checked one
// at a time through one shared checker:
//   MUX1/2/3 (pe_select) pick SAD_i, R_Ti, Q_Ti;
//   the RQCG codes SAD_i into (R_PEi, Q_PEi);
//   the EDC compares the two codes and raises S4 on a mismatch;
//   the DRC rebuilds m*Q_Ti + R_Ti in parallel;
//   MUX4 (result_mux) passes SAD_i if S4 = 0, the rebuilt value if S4 = 1;
//   the De-MUX (result_demux) stores it in slot i while PE_i+1 is checked,
//   and exports all results after the last PE.
// This follows the document's overall BISDC architecture. The block
// registers, the one-PE-per-cycle sequencing, the shared current block and
// the per-PE error map are this design's own choices.
//
// err_inject is a fault-injection input for exercising the self-test: it is
// captured with the pixels and XORed onto each PE's SAD, modelling an error e
// in PE_i. Tie it to zero in normal use.
//
// Timing: start (while busy is low) loads cur_blk, ref_blk and err_inject;
// PE i is checked in cycle i+1 after start; export_valid and done pulse
// N_PE + 1 cycles after start, with sad_out, err_map and err_count valid and
// held until the next start.
//
// Interface: clk, active-low synchronous reset rst_n, start; cur_blk[N_PIX],
// ref_blk[N_PE][N_PIX] pixels; err_inject[N_PE]; sad_out[N_PE] checked SADs,
// err_map (bit i = PE i was found in error and repaired), err_count, busy,
// done, export_valid.
module me_bisdc_top
#(
  parameter int unsigned N_PE  = bisdc_pkg::N_PE,
  parameter int unsigned N_PIX = bisdc_pkg::N_PIX,
  parameter int unsigned PIX_W = bisdc_pkg::PIX_W,
  parameter int unsigned J     = bisdc_pkg::J,
  parameter int unsigned SAD_W = PIX_W + $clog2(N_PIX),
  parameter int unsigned Q_W   = SAD_W - J + 1,
  parameter int unsigned IDX_W = $clog2(N_PE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PIX_W-1:0] cur_blk    [N_PIX],
  input  logic [PIX_W-1:0] ref_blk    [N_PE][N_PIX],
  input  logic [SAD_W-1:0] err_inject [N_PE],
  output logic [SAD_W-1:0] sad_out    [N_PE],
  output logic [N_PE-1:0]  err_map,
  output logic [IDX_W:0]   err_count,
  output logic             busy,
  output logic             done,
  output logic             export_valid
);

  // ---------------------------------------------------------------- sequencer
  logic             load, we, last;
  logic [IDX_W-1:0] sel;

  test_ctrl #(.N_PE(N_PE), .IDX_W(IDX_W)) u_ctrl (
    .clk, .rst_n, .start, .load, .sel, .we, .last, .busy, .done
  );

  // ---------------------------------------------------------- block registers
  logic [PIX_W-1:0] cur_q [N_PIX];
  logic [PIX_W-1:0] ref_q [N_PE][N_PIX];
  logic [SAD_W-1:0] inj_q [N_PE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N_PIX; k++) cur_q[k] <= '0;
      for (int unsigned p = 0; p < N_PE; p++) begin
        inj_q[p] <= '0;
        for (int unsigned k = 0; k < N_PIX; k++) ref_q[p][k] <= '0;
      end
    end else if (load) begin
      cur_q <= cur_blk;
      ref_q <= ref_blk;
      inj_q <= err_inject;
    end
  end

  // ------------------------------------------------------------- PEs and TCGs
  logic [SAD_W-1:0] pe_sad  [N_PE];
  logic [SAD_W-1:0] sad_cut [N_PE];  // PE output as seen by the checker
  logic [J-1:0]     r_t     [N_PE];
  logic [Q_W-1:0]   q_t     [N_PE];

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    sad_pe #(.N_PIX(N_PIX), .PIX_W(PIX_W), .SAD_W(SAD_W)) u_pe (
      .cur_pix(cur_q), .ref_pix(ref_q[p]), .sad(pe_sad[p])
    );
    assign sad_cut[p] = pe_sad[p] ^ inj_q[p];

    tcg #(.N_PIX(N_PIX), .PIX_W(PIX_W), .J(J), .SAD_W(SAD_W), .Q_W(Q_W)) u_tcg (
      .cur_pix(cur_q), .ref_pix(ref_q[p]), .r_t(r_t[p]), .q_t(q_t[p])
    );
  end

  // ----------------------------------------------------------- shared checker
  logic [SAD_W-1:0] sad_i, sad_chk;
  logic [J-1:0]     r_ti;
  logic [Q_W-1:0]   q_ti;
  logic             s4;

  pe_select #(.N_PE(N_PE), .SAD_W(SAD_W), .J(J), .Q_W(Q_W), .IDX_W(IDX_W)) u_sel (
    .sel, .sad(sad_cut), .r_t, .q_t, .sad_i, .r_ti, .q_ti
  );

  // RQCG, EDC, DRC and MUX4
  bisdc_checker #(.J(J), .SAD_W(SAD_W), .Q_W(Q_W)) u_chk (
    .sad_i, .r_t(r_ti), .q_t(q_ti), .sad_chk, .s4
  );

  result_demux #(.N_PE(N_PE), .SAD_W(SAD_W), .IDX_W(IDX_W)) u_demux (
    .clk, .rst_n, .clear(load), .we, .sel, .last, .din(sad_chk), .err_in(s4),
    .results(sad_out), .err_map, .err_count, .export_valid
  );

endmodule
