// dwt_pe: processing element of the 1-D DBWT, one decomposition level of a
// 9/7 biorthogonal analysis filter bank with decimation by two.
//
// Samples enter word-serially through a valid/ready port into a 9-sample
// window (the newest sample plus eight delay registers). Each time an odd
// sample (zero-based index 2m+1) is accepted, the symmetric taps of the window
// are pre-added (h[k] = h[8-k], g[k] = g[6-k]) and a job is handed to a folded
// multiply-accumulate engine with M multipliers (dwt_fold_core). Exploiting
// the decimation (one job per two samples) and the filter symmetry this way is
// what the design relies on to cut multipliers; the exact folding is this
// implementation's choice. A sample flagged `in_first` starts a new sequence:
// the history is treated as zero (zero padding before the first sample).
//
// Outputs: one (low, high) pair per two input samples, valid for one cycle on
// out_valid (out_first marks the first pair of a sequence), both rounded and
// saturated to W_O bits (shift SHIFT) and as raw accumulator values (for
// blocks that sum several PEs before rounding). There
// is no output back-pressure. Latency from the odd sample to out_valid is
// ceil(9/M) + 1 cycles. With M >= 5 the PE accepts one sample every cycle;
// with fewer multipliers in_ready drops while the engine is still busy.
module dwt_pe #(
  parameter int DW    = 16,
  parameter int CW    = 12,
  parameter int M     = 5,
  parameter int ACC_W = 36,
  parameter int SHIFT = 10,
  parameter int CL [5] = '{27, -17, -80, 273, 617},
  parameter int CH [4] = '{93, -59, -605, 1142}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic signed [DW-1:0]    in_data,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic                    out_first,
  output logic signed [15:0]      out_lo,
  output logic signed [15:0]      out_hi,
  output logic signed [ACC_W-1:0] out_acc_lo,
  output logic signed [ACC_W-1:0] out_acc_hi
);
  import dbwt_pkg::*;

  logic signed [DW-1:0] hist [8];    // hist[k] = x[n-1-k]
  logic signed [DW-1:0] win  [9];    // win[k]  = x[n-k], n = incoming sample
  logic                 odd_next;    // the next sample has an odd index
  logic                 seq_head;    // no pair of this sequence started yet
  logic                 pair_now;
  logic                 can_start;
  logic signed [DW:0]   op_lo [5];
  logic signed [DW:0]   op_hi [4];

  always_comb begin
    win[0] = in_data;
    for (int k = 1; k < 9; k++) win[k] = in_first ? '0 : hist[k-1];
    for (int k = 0; k < 4; k++) op_lo[k] = (DW+1)'(win[k]) + (DW+1)'(win[8-k]);
    op_lo[4] = (DW+1)'(win[4]);
    for (int k = 0; k < 3; k++) op_hi[k] = (DW+1)'(win[k]) + (DW+1)'(win[6-k]);
    op_hi[3] = (DW+1)'(win[3]);
  end

  assign in_ready = !(odd_next && !in_first) || can_start;
  assign pair_now = in_valid && in_ready && odd_next && !in_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_next <= 1'b0;
      seq_head <= 1'b0;
      for (int k = 0; k < 8; k++) hist[k] <= '0;
    end else if (in_valid && in_ready) begin
      for (int k = 0; k < 8; k++) hist[k] <= win[k];
      odd_next <= in_first ? 1'b1 : !odd_next;
      if (in_first)      seq_head <= 1'b1;
      else if (pair_now) seq_head <= 1'b0;
    end
  end

  dwt_fold_core #(
    .DW(DW + 1), .CW(CW), .M(M), .ACC_W(ACC_W), .TW(1), .CL(CL), .CH(CH)
  ) u_core (
    .clk, .rst_n,
    .start    (pair_now),
    .op_lo    (op_lo),
    .op_hi    (op_hi),
    .tag_in   (seq_head),
    .can_start(can_start),
    .done     (out_valid),
    .acc_lo   (out_acc_lo),
    .acc_hi   (out_acc_hi),
    .tag_out  (out_first)
  );

  assign out_lo = round_sat(64'(out_acc_lo), SHIFT);
  assign out_hi = round_sat(64'(out_acc_hi), SHIFT);

endmodule
