// arc1d_pipe: Arc1D-I, the balanced pipelined 1-D DBWT.
//
// The J decomposition levels are computed by J processing elements in a
// chain; PE_j filters the approximation a^{j-1} coming from PE_{j-1} and emits
// the detail d^j and the approximation a^j. Because every level halves the
// sample rate, PE_j is given M_j = ceil(L / 2^j) multipliers (L = 9): 5, 3,
// 2, 1, ... so every stage is just busy enough to keep up with its input and
// the pipeline is balanced. The folding of the nine products onto M_j
// multipliers is done inside dwt_pe.
//
// Interface: one W_I-bit sample per cycle on x_valid/x (x_first marks the
// first sample of a frame, before which the signal is taken as zero; x_ready
// is low only if PE_1 is busy, which at M_1 = 5 never happens). Per level j
// the detail stream d_valid[j]/d[j] (d_first marks the first coefficient of a
// frame) carries N0/2^(j+1) coefficients for a frame of N0 samples (index j
// counts from 0 for level 1); a_valid/a carries the N0/2^J coefficients of
// a^J. Stage j's output appears ceil(9/M_j) + 1 cycles after the odd input
// sample. Inner stages have no back-pressure; an assertion checks that none
// is ever offered a sample it cannot take.
module arc1d_pipe #(
  parameter int J = 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           x_valid,
  input  logic                           x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] x,
  output logic                           x_ready,
  output logic                           d_valid [J],
  output logic                           d_first [J],
  output logic signed [dbwt_pkg::W_O-1:0] d       [J],
  output logic                           a_valid,
  output logic                           a_first,
  output logic signed [dbwt_pkg::W_O-1:0] a
);
  import dbwt_pkg::*;

  logic                   s_valid [J+1];
  logic                   s_first [J+1];
  logic signed [W_O-1:0]  s_data  [J+1];
  logic                   s_ready [J];

  assign s_valid[0] = x_valid;
  assign s_first[0] = x_first;
  assign s_data[0]  = W_O'(x);
  assign x_ready    = s_ready[0];

  for (genvar j = 0; j < J; j++) begin : g_stage
    logic signed [35:0] acc_lo, acc_hi;
    dwt_pe #(.DW(W_O), .M(mults_of_level(L_LO, j + 1))) u_pe (
      .clk, .rst_n,
      .in_valid  (s_valid[j]),
      .in_first  (s_first[j]),
      .in_data   (s_data[j]),
      .in_ready  (s_ready[j]),
      .out_valid (s_valid[j+1]),
      .out_first (s_first[j+1]),
      .out_lo    (s_data[j+1]),
      .out_hi    (d[j]),
      .out_acc_lo(acc_lo),
      .out_acc_hi(acc_hi)
    );
    assign d_valid[j] = s_valid[j+1];
    assign d_first[j] = s_first[j+1];

    if (j > 0) begin : g_chk
      assert property (@(posedge clk) disable iff (!rst_n) s_valid[j] |-> s_ready[j])
        else $error("arc1d_pipe: stage %0d overrun", j + 1);
    end
  end

  assign a_valid = s_valid[J];
  assign a_first = s_first[J];
  assign a       = s_data[J];

endmodule
