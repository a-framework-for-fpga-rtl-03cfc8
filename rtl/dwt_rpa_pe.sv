// dwt_rpa_pe: PE_2 of the hybrid 1-D DBWT (Arc1D-II), one processing element
// that computes all decomposition levels 2..J by recursive pyramid (RPA)
// scheduling.
//
// The approximation a^1 from PE_1 enters on a valid/ready port. For every
// level j = 2..J the PE keeps a 9-sample window of that level's input
// (a^{j-1}); a window becomes pending when its odd sample arrives. One folded
// multiply-accumulate engine with M multipliers (M = ceil(L/4) = 3 for
// L = 9) serves all levels: each cycle it can start, the highest pending
// level is computed. The result a^j of a level below J is fed back into the
// window of level j+1 (the feedback path through the input multiplexer),
// and d^j and a^j are output. Serving the highest level first guarantees
// that a fed-back coefficient never lands in a window that is still waiting
// for the engine; this priority rule and the per-level windows are this
// implementation's choices.
//
// Interface: in_valid/in_first/in_data/in_ready carry a^1 (in_first marks a
// frame start; all levels restart from zero history). in_ready drops while
// the level-2 window is pending and not yet started. Results leave on
// out_valid with out_level (2..J), out_first, out_d and out_a, one cycle
// per coefficient pair, ceil(9/M) + 1 cycles after the job starts. With
// M = 3 the engine needs 3 cycles per pair, so for a full-rate a^1 stream
// (one coefficient every two cycles) the PE throttles its input.
module dwt_rpa_pe #(
  parameter int J = 3,
  parameter int M = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic                            in_first,
  input  logic signed [dbwt_pkg::W_O-1:0] in_data,
  output logic                            in_ready,
  output logic                            out_valid,
  output logic [7:0]                      out_level,
  output logic                            out_first,
  output logic signed [dbwt_pkg::W_O-1:0] out_d,
  output logic signed [dbwt_pkg::W_O-1:0] out_a
);
  import dbwt_pkg::*;

  localparam int NLV = (J > 1) ? J - 1 : 1;     // windows, index 0 = level 2
  localparam int LW  = (NLV > 1) ? $clog2(NLV) : 1;
  localparam int TW  = LW + 1;                  // {level index, first}

  logic signed [W_O-1:0] win      [NLV][9];     // win[l][k] = x[n-k]
  logic                  odd_next [NLV];
  logic                  pending  [NLV];
  logic                  head     [NLV];        // window holds the first pair

  // writes into the windows
  logic                  wr_en    [NLV];
  logic                  wr_first [NLV];
  logic signed [W_O-1:0] wr_data  [NLV];

  // scheduler
  logic                  sel_any;
  logic [LW-1:0]         sel;
  logic                  can_start, start;
  logic signed [W_O:0]   op_lo [5];
  logic signed [W_O:0]   op_hi [4];

  // engine results
  logic                  done;
  logic [TW-1:0]         tag_out;
  logic signed [35:0]    acc_lo, acc_hi;
  logic [LW-1:0]         done_lvl;
  logic signed [W_O-1:0] res_lo, res_hi;

  always_comb begin
    sel_any = 1'b0;
    sel     = '0;
    for (int l = 0; l < NLV; l++)
      if (pending[l]) begin
        sel_any = 1'b1;
        sel     = LW'(l);
      end
  end

  assign start = sel_any && can_start;

  always_comb begin
    for (int k = 0; k < 4; k++)
      op_lo[k] = (W_O+1)'(win[sel][k]) + (W_O+1)'(win[sel][8-k]);
    op_lo[4] = (W_O+1)'(win[sel][4]);
    for (int k = 0; k < 3; k++)
      op_hi[k] = (W_O+1)'(win[sel][k]) + (W_O+1)'(win[sel][6-k]);
    op_hi[3] = (W_O+1)'(win[sel][3]);
  end

  assign done_lvl = tag_out[TW-1:1];
  assign res_lo   = round_sat(64'(acc_lo), FRAC);
  assign res_hi   = round_sat(64'(acc_hi), FRAC);

  assign in_ready = !pending[0] || (start && sel == '0);

  always_comb begin
    for (int l = 0; l < NLV; l++) begin
      wr_en[l]    = 1'b0;
      wr_first[l] = 1'b0;
      wr_data[l]  = '0;
    end
    wr_en[0]    = in_valid && in_ready;
    wr_first[0] = in_first;
    wr_data[0]  = in_data;
    for (int l = 1; l < NLV; l++)
      if (done && int'(done_lvl) == l - 1) begin
        wr_en[l]    = 1'b1;
        wr_first[l] = tag_out[0];
        wr_data[l]  = res_lo;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NLV; l++) begin
        odd_next[l] <= 1'b0;
        pending[l]  <= 1'b0;
        head[l]     <= 1'b0;
        for (int k = 0; k < 9; k++) win[l][k] <= '0;
      end
    end else begin
      for (int l = 0; l < NLV; l++) begin
        if (start && int'(sel) == l) pending[l] <= 1'b0;
        if (wr_en[l]) begin
          win[l][0] <= wr_data[l];
          for (int k = 1; k < 9; k++) win[l][k] <= wr_first[l] ? '0 : win[l][k-1];
          if (wr_first[l]) begin
            odd_next[l] <= 1'b1;
            head[l]     <= 1'b1;
          end else begin
            odd_next[l] <= !odd_next[l];
            if (odd_next[l]) pending[l] <= 1'b1;
          end
        end
        // the head flag travels with the first job of the window
        if (start && int'(sel) == l && !(wr_en[l] && wr_first[l])) head[l] <= 1'b0;
      end
    end
  end

  dwt_fold_core #(.DW(W_O + 1), .M(M), .TW(TW)) u_core (
    .clk, .rst_n,
    .start    (start),
    .op_lo    (op_lo),
    .op_hi    (op_hi),
    .tag_in   ({sel, head[sel]}),
    .can_start(can_start),
    .done     (done),
    .acc_lo   (acc_lo),
    .acc_hi   (acc_hi),
    .tag_out  (tag_out)
  );

  assign out_valid = done;
  assign out_level = 8'(int'(done_lvl) + 2);
  assign out_first = tag_out[0];
  assign out_d     = res_hi;
  assign out_a     = res_lo;

  // A coefficient may only be written into a window that is not waiting for
  // the engine (or is being started in this very cycle).
  for (genvar l = 0; l < NLV; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     wr_en[l] |-> (!pending[l] || (start && int'(sel) == l)))
      else $error("dwt_rpa_pe: window %0d overwritten while pending", l);
  end

endmodule
