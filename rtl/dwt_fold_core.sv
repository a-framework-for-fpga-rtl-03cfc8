// dwt_fold_core: folded multiply-accumulate engine of a DBWT processing
// element.
//
// One job computes a decimated low-pass/high-pass output pair of a symmetric
// filter pair whose symmetric taps have already been pre-added: the caller
// supplies NU_LO = 5 low-pass operands and NU_HI = 4 high-pass operands, and
// the engine forms sum(op_lo[i] * CL[i]) and sum(op_hi[i] * CH[i]). The nine
// products are spread over C = ceil(9 / M) clock cycles on M multipliers, so
// the multiplier count M trades area against the cycles per output pair, as
// the per-stage multiplier budget M_j of the balanced pipeline requires. The
// split of the nine products into groups of M is this implementation's.
//
// Timing: `start` latches the operands and the tag. The products are
// accumulated in the C following cycles; `done` pulses for one cycle after the
// last group, with the full-precision sums on acc_lo / acc_hi and the job's
// tag on tag_out (latency C+1 cycles). A new job may start whenever
// `can_start` is high, which includes the cycle of the last group, so jobs
// can follow each other every C cycles. Starting while `can_start` is low is
// a protocol error (asserted).
module dwt_fold_core #(
  parameter int DW    = 17,                      // operand width (after pre-add)
  parameter int CW    = 12,                      // coefficient width
  parameter int M     = 5,                       // multipliers
  parameter int ACC_W = 36,                      // accumulator width
  parameter int TW    = 1,                       // tag width
  parameter int CL [5] = '{27, -17, -80, 273, 617},
  parameter int CH [4] = '{93, -59, -605, 1142}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [DW-1:0]    op_lo [5],
  input  logic signed [DW-1:0]    op_hi [4],
  input  logic [TW-1:0]           tag_in,
  output logic                    can_start,
  output logic                    done,
  output logic signed [ACC_W-1:0] acc_lo,
  output logic signed [ACC_W-1:0] acc_hi,
  output logic [TW-1:0]           tag_out
);
  localparam int NP = 9;
  localparam int C  = (NP + M - 1) / M;
  localparam int CNT_W = (C > 1) ? $clog2(C) : 1;

  typedef logic signed [CW-1:0] coef_t;

  function automatic coef_t coef_of(int idx);
    return (idx < 5) ? coef_t'(CL[idx]) : coef_t'(CH[idx-5]);
  endfunction

  logic signed [DW-1:0]    op [NP];
  logic                    busy;
  logic [CNT_W-1:0]        cnt;
  logic [TW-1:0]           tag;
  logic signed [ACC_W-1:0] sum_lo, sum_hi;   // running sums
  logic signed [ACC_W-1:0] grp_lo, grp_hi;   // this cycle's products
  logic                    last;

  assign last      = busy && (int'(cnt) == C - 1);
  assign can_start = !busy || last;

  always_comb begin
    grp_lo = '0;
    grp_hi = '0;
    for (int m = 0; m < M; m++) begin
      for (int i = 0; i < NP; i++) begin
        if (int'(cnt) * M + m == i) begin
          if (i < 5) grp_lo += ACC_W'(op[i] * coef_of(i));
          else       grp_hi += ACC_W'(op[i] * coef_of(i));
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      tag     <= '0;
      sum_lo  <= '0;
      sum_hi  <= '0;
      done    <= 1'b0;
      acc_lo  <= '0;
      acc_hi  <= '0;
      tag_out <= '0;
      for (int i = 0; i < NP; i++) op[i] <= '0;
    end else begin
      done <= 1'b0;
      if (last) begin
        acc_lo  <= sum_lo + grp_lo;
        acc_hi  <= sum_hi + grp_hi;
        tag_out <= tag;
        done    <= 1'b1;
        sum_lo  <= '0;
        sum_hi  <= '0;
        busy    <= 1'b0;
      end else if (busy) begin
        sum_lo <= sum_lo + grp_lo;
        sum_hi <= sum_hi + grp_hi;
        cnt    <= cnt + 1'b1;
      end
      if (start) begin
        for (int i = 0; i < 5; i++) op[i]   <= op_lo[i];
        for (int i = 0; i < 4; i++) op[5+i] <= op_hi[i];
        tag  <= tag_in;
        busy <= 1'b1;
        cnt  <= '0;
      end
    end
  end

  // A job may only start when the engine can take it.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> can_start)
    else $error("dwt_fold_core: start while busy");

endmodule
