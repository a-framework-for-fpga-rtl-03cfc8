// arc2d_nonsep: Arc2D-II, the non-separable multi-level 2-D DBWT, with one
// processing unit shared by all decomposition levels.
//
// An N x N image enters two rows at a time: each cycle the pixels of column
// c of an even row and of the following odd row (as if read from two split
// data pipes). The four subbands are computed directly with 2-D kernels
// (outer products of the 9/7 filters), one decimated output row per input
// row pair. The processing unit is the set of nine decimating 1-D filter
// processors P_0..P_4 (vertical low-pass rows) and Q_0..Q_3 (vertical
// high-pass rows) and the row adder; it is fed from the row pipes of the
// level being worked on.
//
// Storage per level j (index 0..J-1, row length NJ = N/2^j), all levels
// packed in memories of 2N words at offset 2N - 2N/2^j:
//   * row-delay circuit: four odd-row and three even-row delay lines holding
//     the seven previous rows of that level;
//   * for j >= 1, a row-pair buffer holding the two newest LL^j rows
//     (even in one row, odd in the other) produced by level j-1.
// The LH, HL and HH rows go out at once; each LL row of level j < J-1 is
// written back into the row-pair buffer of level j+1. When its odd row is
// complete the pair is pending.
//
// Scheduling: the unit works on one row pair (a "job") at a time. Between
// jobs it waits until the previous job's outputs have left the pipeline, then
// takes the pending row pair of the highest level, or else the next input
// row pair. A higher level's row pair is thus processed before the pair that
// would overwrite its buffer. Level 1 only takes input while the unit
// is on a level-1 job; x_ready is low otherwise, so the input stalls while
// higher levels are computed. A frame takes about N^2/2 * (1 + 1/4 + 1/16 + ...)
// ~ 2/3 N^2 cycles, plus a few cycles per job for the pipeline to drain.
// The shared unit, the row pipes per level and the row-pair rule follow the
// design description; the priority order, the drain between jobs and the
// packing of the memories are this implementation's choices.
//
// Interface: x_valid/x_first/x_even/x_odd/x_ready carry the N/2 row pairs
// (x_first on column 0 of rows 0 and 1). For every level j (index j-1)
// det_valid/det_first with lh, hl, hh carry the (N/2^j)^2 detail
// coefficients in row-major order; ll_valid/ll_first/ll carry LL^J. Output
// (m, p) of a level uses rows 2m+1-v and columns 2p+1-u of its input, with
// zeros outside the image, and is rounded once.
module arc2d_nonsep #(
  parameter int N = 256,
  parameter int J = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            x_valid,
  input  logic                            x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] x_even,
  input  logic signed [dbwt_pkg::W_I-1:0] x_odd,
  output logic                            x_ready,
  output logic                            det_valid [J],
  output logic                            det_first [J],
  output logic signed [dbwt_pkg::W_O-1:0] lh [J],
  output logic signed [dbwt_pkg::W_O-1:0] hl [J],
  output logic signed [dbwt_pkg::W_O-1:0] hh [J],
  output logic                            ll_valid,
  output logic                            ll_first,
  output logic signed [dbwt_pkg::W_O-1:0] ll
);
  import dbwt_pkg::*;

  localparam int XW    = $clog2(N);
  localparam int AW    = XW + 1;             // address in the packed memories
  localparam int LW    = (J > 1) ? $clog2(J) : 1;
  localparam int ACC_W = 48;
  localparam int DWP   = W_O + 1;            // width of a pre-added row sum
  localparam int CW2   = 2 * W_C;            // 2-D coefficient width

  function automatic int base_of(int l);
    return 2 * N - ((2 * N) >> l);
  endfunction

  // ------------------------------------------------------- row-pair source
  logic signed [W_O-1:0] pair_even [2*N];    // LL row-pair buffers, levels >= 1
  logic signed [W_O-1:0] pair_odd  [2*N];
  logic                  pfirst [J];         // pending pair is a frame's first
  logic [AW-1:0]         addr;
  logic                  fst;                // this pair is a frame's first
  logic [XW-1:0]         m_eff;
  logic signed [W_O-1:0] cur_even, cur_odd;

  // ------------------------------------------------------------ scheduler
  logic          busy;          // a job is feeding the unit
  logic          flight;        // a job's outputs have not all left yet
  logic [LW-1:0] lv;            // level of the current job
  logic [XW-1:0] col;           // column of the current job
  logic          jfirst;        // current job is the first row pair of a frame
  logic [XW-1:0] prow [J];      // row pair index per level
  logic          pend [J];      // a complete LL row pair waits (levels >= 1)
  logic          take;
  logic          p_ready0;
  logic          last_col;
  int            nj;            // row length of the current job's level

  assign nj       = N >> int'(lv);
  assign last_col = (int'(col) == nj - 1);
  assign take     = busy && p_ready0 && (lv != '0 || x_valid);
  assign x_ready  = busy && lv == '0 && p_ready0;

  assign addr     = AW'(base_of(int'(lv)) + int'(col));
  assign fst      = (col == '0) ? ((lv == '0) ? x_first : pfirst[lv]) : jfirst;
  assign m_eff    = fst ? '0 : prow[lv];
  assign cur_even = (lv == '0) ? W_O'(x_even) : pair_even[addr];
  assign cur_odd  = (lv == '0) ? W_O'(x_odd)  : pair_odd[addr];

  logic          pick_any;
  logic [LW-1:0] pick;

  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int l = 1; l < J; l++)
      if (pend[l]) begin
        pick_any = 1'b1;
        pick     = LW'(l);
      end
  end

  // output side bookkeeping (declared here, used by the scheduler)
  logic last_out;
  logic out_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      flight <= 1'b0;
      lv     <= '0;
      col    <= '0;
      jfirst <= 1'b0;
      for (int l = 0; l < J; l++) prow[l] <= '0;
    end else begin
      if (!flight) begin
        if (pick_any) begin
          busy   <= 1'b1;
          flight <= 1'b1;
          lv     <= pick;
          col    <= '0;
        end else if (x_valid) begin
          busy   <= 1'b1;
          flight <= 1'b1;
          lv     <= '0;
          col    <= '0;
        end
      end
      if (take) begin
        if (col == '0) jfirst <= fst;
        if (last_col) begin
          busy <= 1'b0;
          prow[lv] <= (m_eff + 1'b1);
        end else begin
          col <= col + 1'b1;
        end
      end
      if (last_out) flight <= 1'b0;
    end
  end

  // -------------------------------------------------- row delay circuits
  logic signed [W_O-1:0] odd_pipe  [4][2*N];  // rows 2m-1, 2m-3, 2m-5, 2m-7
  logic signed [W_O-1:0] even_pipe [3][2*N];  // rows 2m-2, 2m-4, 2m-6
  logic signed [W_O-1:0] r_odd  [5];          // r_odd[k]  = row 2m+1-2k
  logic signed [W_O-1:0] r_even [4];          // r_even[k] = row 2m-2k

  always_comb begin
    r_odd[0]  = cur_odd;
    r_even[0] = cur_even;
    for (int k = 1; k < 5; k++)
      r_odd[k] = (int'(m_eff) >= k) ? odd_pipe[k-1][addr] : '0;
    for (int k = 1; k < 4; k++)
      r_even[k] = (int'(m_eff) >= k) ? even_pipe[k-1][addr] : '0;
  end

  always_ff @(posedge clk) begin
    if (take) begin
      for (int k = 3; k > 0; k--) odd_pipe[k][addr] <= odd_pipe[k-1][addr];
      odd_pipe[0][addr] <= cur_odd;
      for (int k = 2; k > 0; k--) even_pipe[k][addr] <= even_pipe[k-1][addr];
      even_pipe[0][addr] <= cur_even;
    end
  end

  // ---------------------------------------- vertical symmetric pre-adds
  logic signed [DWP-1:0] vl [5];
  logic signed [DWP-1:0] vh [4];

  always_comb begin
    vl[0] = DWP'(r_odd[0])  + DWP'(r_odd[4]);    // 2m+1, 2m-7
    vl[1] = DWP'(r_even[0]) + DWP'(r_even[3]);   // 2m,   2m-6
    vl[2] = DWP'(r_odd[1])  + DWP'(r_odd[3]);    // 2m-1, 2m-5
    vl[3] = DWP'(r_even[1]) + DWP'(r_even[2]);   // 2m-2, 2m-4
    vl[4] = DWP'(r_odd[2]);                      // 2m-3
    vh[0] = DWP'(r_odd[0])  + DWP'(r_odd[3]);    // 2m+1, 2m-5
    vh[1] = DWP'(r_even[0]) + DWP'(r_even[2]);   // 2m,   2m-4
    vh[2] = DWP'(r_odd[1])  + DWP'(r_odd[2]);    // 2m-1, 2m-3
    vh[3] = DWP'(r_even[1]);                     // 2m-2
  end

  // ------------------------------------------- 1-D filter processors
  logic                    p_ready [9];
  logic                    p_valid [9];
  logic                    p_first [9];
  logic signed [ACC_W-1:0] p_lo    [9];
  logic signed [ACC_W-1:0] p_hi    [9];

  for (genvar i = 0; i < 9; i++) begin : g_proc
    // vertical coefficient of this processor's row sum
    localparam int CV = (i < 5) ? int'(H_Q[i % 5]) : int'(G_Q[(i + 3) % 4]);
    logic signed [W_O-1:0] unused_lo, unused_hi;
    dwt_pe #(
      .DW(DWP), .CW(CW2), .M(5), .ACC_W(ACC_W), .SHIFT(2 * FRAC),
      .CL('{CV * int'(H_Q[0]), CV * int'(H_Q[1]), CV * int'(H_Q[2]), CV * int'(H_Q[3]), CV * int'(H_Q[4])}),
      .CH('{CV * int'(G_Q[0]), CV * int'(G_Q[1]), CV * int'(G_Q[2]), CV * int'(G_Q[3])})
    ) u_p (
      .clk, .rst_n,
      .in_valid  (take),
      .in_first  (col == '0),
      .in_data   ((i < 5) ? vl[i % 5] : vh[(i + 3) % 4]),   // P_i or Q_(i-5)
      .in_ready  (p_ready[i]),
      .out_valid (p_valid[i]),
      .out_first (p_first[i]),
      .out_lo    (unused_lo),
      .out_hi    (unused_hi),
      .out_acc_lo(p_lo[i]),
      .out_acc_hi(p_hi[i])
    );
  end

  assign p_ready0 = p_ready[0];

  // ------------------------------------------------------- row adder
  logic signed [ACC_W-1:0] s_ll, s_hl, s_lh, s_hh;
  logic signed [W_O-1:0]   o_ll, o_lh, o_hl, o_hh;

  always_comb begin
    s_ll = '0; s_hl = '0; s_lh = '0; s_hh = '0;
    for (int i = 0; i < 5; i++) begin
      s_ll += p_lo[i];
      s_hl += p_hi[i];
    end
    for (int i = 5; i < 9; i++) begin
      s_lh += p_lo[i];
      s_hh += p_hi[i];
    end
  end

  assign o_ll = round_sat(64'(s_ll), 2 * FRAC);
  assign o_hl = round_sat(64'(s_hl), 2 * FRAC);
  assign o_lh = round_sat(64'(s_lh), 2 * FRAC);
  assign o_hh = round_sat(64'(s_hh), 2 * FRAC);

  // ---------------------------------------------- output side
  // Only one job is in flight, so the level and frame flag of the outputs
  // are those of the job that is running or has just finished.
  logic [LW-1:0] olv;
  logic          ofst;
  logic [XW-2:0] ocol, ocol_c;
  logic [XW-2:0] orow [J];
  logic [XW-2:0] orow_c;
  logic [AW-1:0] waddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      olv  <= '0;
      ofst <= 1'b0;
    end else if (take && col == '0) begin
      olv  <= lv;
      ofst <= fst;
    end
  end

  assign out_v    = p_valid[0];
  assign ocol_c   = p_first[0] ? '0 : ocol + 1'b1;
  assign orow_c   = ofst ? '0 : orow[olv];
  assign last_out = out_v && int'(ocol_c) == (N >> int'(olv)) / 2 - 1;
  assign waddr    = AW'(base_of(int'(olv) + 1) + int'(ocol_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ocol <= '0;
      for (int l = 0; l < J; l++) begin
        orow[l]   <= '0;
        pend[l]   <= 1'b0;
        pfirst[l] <= 1'b0;
      end
    end else begin
      if (out_v) ocol <= ocol_c;
      if (last_out) begin
        orow[olv] <= orow_c + 1'b1;
        if (int'(olv) < J - 1 && orow_c[0]) begin
          pend[olv + 1'b1]   <= 1'b1;
          pfirst[olv + 1'b1] <= (orow_c == (XW-1)'(1));
        end
      end
      if (!flight && pick_any) pend[pick] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (out_v && int'(olv) < J - 1) begin
      if (orow_c[0]) pair_odd[waddr]  <= o_ll;
      else           pair_even[waddr] <= o_ll;
    end
  end

  for (genvar j = 0; j < J; j++) begin : g_out
    assign det_valid[j] = out_v && int'(olv) == j;
    assign det_first[j] = out_v && p_first[0] && ofst && int'(olv) == j;
    assign lh[j] = o_lh;
    assign hl[j] = o_hl;
    assign hh[j] = o_hh;
  end

  assign ll_valid = out_v && int'(olv) == J - 1;
  assign ll_first = det_first[J-1];
  assign ll       = o_ll;

  // a pending pair must be consumed before its level produces the next one
  for (genvar i = 1; i < 9; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) p_valid[i] == p_valid[0]);
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   (last_out && int'(olv) < J - 1 && orow_c[0]) |-> !pend[olv + 1'b1])
    else $error("arc2d_nonsep: LL row pair overwritten");

endmodule
