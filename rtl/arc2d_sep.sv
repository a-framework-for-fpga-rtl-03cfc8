// arc2d_sep: Arc2D-I, the separable multi-level 2-D DBWT, with one filter
// bank shared by the rows and columns of all decomposition levels.
//
// The filter bank is a single folded low-pass/high-pass engine
// (dwt_fold_core, 5 multipliers, one output pair every 2 cycles) fed by a
// multiplexer from either the row delay line or the memory unit:
//   * row job (level j, row r): the N_j samples of one row (image pixels for
//     level 1, a stored LL^(j-1) row otherwise) pass through a 9-word delay
//     line; every second sample the engine filters the window. The N_j/2 L
//     and N_j/2 H coefficients are written as one row into register block
//     R_j.
//   * column job (level j, odd row r): for each of the N_j coefficient
//     columns of R_j the nine rows r..r-8 are read in one cycle, i.e. the
//     memory delivers the coefficients in column order without a transpose,
//     and the engine filters them vertically. The L columns give LL and LH,
//     the H columns HL and HH: one decimated output row of every subband.
// Register block R_j keeps the last nine row-filtered rows of level j
// (N_j = N/2^(j-1) words each, rows assigned to banks cyclically). The
// LL row of level j < J goes into a one-row buffer and becomes the input of
// a level j+1 row job. LH rows wait in a half-row buffer until the HL/HH half
// of the column job, so that all four subbands leave together.
//
// Scheduling (row-based recursive pyramid): the bank runs one job at a time.
// Between jobs it waits until the previous job's results have left the
// engine, then takes the pending job of the highest level (a column job
// before a row job of the same level), else a row job on the next input
// row. x_ready is high only while an input row is being read, so the image
// input stalls while the bank works on columns or higher levels. One frame
// takes about 2 N^2 (1 + 1/4 + 1/16 + ...) cycles plus a few per job.
// The shared bank, the memory blocks per level, the multiplexed bank input,
// the one-row LL buffers and row-based scheduling follow the design
// description; the job order, the drain between jobs, the nine-row blocks
// and the LH buffer are this implementation's choices.
//
// Interface: x_valid/x_first/x/x_ready carry the image (x_first on pixel
// (0,0)), row-major. For every level j (index j-1) det_valid/det_first with
// lh, hl, hh carry the (N/2^j)^2 detail coefficients in row-major order;
// ll_valid/ll_first/ll carry the final LL^J subband. Rows and columns are
// filtered with zero history at their start; each pass is rounded to 16 bit.
module arc2d_sep #(
  parameter int N = 256,
  parameter int J = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            x_valid,
  input  logic                            x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] x,
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

  localparam int XW  = $clog2(N);
  localparam int AW  = XW + 1;              // address in the packed memories
  localparam int LW  = $clog2(J + 1);
  localparam int RB  = L_LO;                // rows per register block
  localparam int DWP = W_O + 1;             // width of a pre-added operand

  // level j (index l = j-1) is stored at offset 2N - 2N/2^l
  function automatic int base_of(int l);
    return 2 * N - ((2 * N) >> l);
  endfunction

  typedef enum logic {K_ROW, K_COL} kind_t;

  // --------------------------------------------------------------- storage
  logic signed [W_O-1:0] rmem  [RB][2*N];   // register blocks R_j
  logic signed [W_O-1:0] llrow [2*N];       // one LL row per level
  logic signed [W_O-1:0] lhrow [N/2];       // LH half of a column job

  // ------------------------------------------------------ per-level state
  logic [XW-1:0] rrow   [J];   // index of the next row of the level
  logic [3:0]    rbk    [J];   // bank of that row
  logic          rpend  [J];   // an LL row waits for its row job (j >= 2)
  logic          rfirst [J];   // that row is the first of a frame
  logic          cpend  [J];   // a column job waits
  logic [XW-1:0] crow   [J];   // its (odd) row
  logic [3:0]    cbk    [J];   // bank of that row

  // ------------------------------------------------------------------ job
  logic          busy;         // the job is still taking inputs
  logic          flight;       // the job's results have not all left yet
  kind_t         kind;
  logic [LW-1:0] lv;
  logic [XW-1:0] jr;           // row of a row job, odd row of a column job
  logic [3:0]    jb;           // bank of that row
  logic [XW-1:0] pos;          // input position within the job
  logic [XW-1:0] oc;           // results so far
  int            nj;           // row length of the job's level
  logic          can_start;
  logic          take_row, take_col, fstart;
  logic          last_in, last_out;
  logic          done;

  assign nj       = N >> int'(lv);
  assign take_row = busy && kind == K_ROW && (lv != '0 || x_valid) && (!pos[0] || can_start);
  assign take_col = busy && kind == K_COL && can_start;
  assign x_ready  = busy && kind == K_ROW && lv == '0 && (!pos[0] || can_start);
  assign fstart   = (take_row && pos[0]) || take_col;
  assign last_in  = (take_row || take_col) && int'(pos) == nj - 1;
  assign last_out = done && int'(oc) == ((kind == K_ROW) ? nj / 2 : nj) - 1;

  // scheduler: highest pending level, column job before row job
  logic          pick_any;
  kind_t         pick_kind;
  logic [LW-1:0] pick;

  always_comb begin
    pick_any  = 1'b0;
    pick_kind = K_ROW;
    pick      = '0;
    for (int l = 0; l < J; l++) begin
      if (rpend[l]) begin
        pick_any = 1'b1; pick_kind = K_ROW; pick = LW'(l);
      end
      if (cpend[l]) begin
        pick_any = 1'b1; pick_kind = K_COL; pick = LW'(l);
      end
    end
  end

  // ------------------------------------------------ bank input multiplexer
  logic signed [W_O-1:0] cur;               // sample entering a row job
  logic signed [W_O-1:0] dl [8];            // row delay line
  logic signed [W_O-1:0] v  [9];            // the nine taps x[2m+1-k]
  logic [AW-1:0]         raddr;

  assign raddr = AW'(base_of(int'(lv)) + int'(pos));
  assign cur   = (lv == '0) ? W_O'(x) : llrow[raddr];

  always_comb begin
    if (kind == K_ROW) begin
      v[0] = cur;
      for (int k = 1; k < 9; k++) v[k] = dl[k-1];
    end else begin
      for (int k = 0; k < 9; k++)
        v[k] = (int'(jr) >= k) ? rmem[(int'(jb) + RB - k) % RB][raddr] : '0;
    end
  end

  logic signed [DWP-1:0] op_lo [5];
  logic signed [DWP-1:0] op_hi [4];

  always_comb begin
    for (int k = 0; k < 4; k++) op_lo[k] = DWP'(v[k]) + DWP'(v[8-k]);
    op_lo[4] = DWP'(v[4]);
    for (int k = 0; k < 3; k++) op_hi[k] = DWP'(v[k]) + DWP'(v[6-k]);
    op_hi[3] = DWP'(v[3]);
  end

  // ------------------------------------------------------------ filter bank
  logic signed [35:0]    acc_lo, acc_hi;
  logic signed [W_O-1:0] lo, hi;
  logic [0:0]            unused_tag;

  dwt_fold_core #(.DW(DWP), .M(5)) u_bank (
    .clk, .rst_n,
    .start    (fstart),
    .op_lo, .op_hi,
    .tag_in   (1'b0),
    .can_start,
    .done,
    .acc_lo, .acc_hi,
    .tag_out  (unused_tag)
  );

  assign lo = round_sat(64'(acc_lo), FRAC);
  assign hi = round_sat(64'(acc_hi), FRAC);

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      flight <= 1'b0;
      kind   <= K_ROW;
      lv     <= '0;
      jr     <= '0;
      jb     <= '0;
      pos    <= '0;
      oc     <= '0;
      for (int l = 0; l < J; l++) begin
        rrow[l] <= '0;  rbk[l]    <= '0;
        rpend[l] <= 1'b0; rfirst[l] <= 1'b0;
        cpend[l] <= 1'b0; crow[l]   <= '0; cbk[l] <= '0;
      end
    end else begin
      // start a job
      if (!flight && (pick_any || x_valid)) begin
        busy   <= 1'b1;
        flight <= 1'b1;
        pos    <= '0;
        oc     <= '0;
        if (pick_any) begin
          kind <= pick_kind;
          lv   <= pick;
          if (pick_kind == K_COL) begin
            jr           <= crow[pick];
            jb           <= cbk[pick];
            cpend[pick]  <= 1'b0;
          end else begin
            jr           <= rfirst[pick] ? '0 : rrow[pick];
            jb           <= rfirst[pick] ? '0 : rbk[pick];
            rpend[pick]  <= 1'b0;
          end
        end else begin
          kind <= K_ROW;
          lv   <= '0;
          jr   <= x_first ? '0 : rrow[0];
          jb   <= x_first ? '0 : rbk[0];
        end
      end
      // inputs
      if (take_row || take_col) begin
        pos <= pos + 1'b1;
        if (last_in) busy <= 1'b0;
      end
      // results
      if (done) oc <= oc + 1'b1;
      if (last_out) begin
        flight <= 1'b0;
        if (kind == K_ROW) begin
          rrow[lv] <= jr + 1'b1;
          rbk[lv]  <= (int'(jb) == RB - 1) ? '0 : jb + 1'b1;
          if (jr[0]) begin
            cpend[lv] <= 1'b1;
            crow[lv]  <= jr;
            cbk[lv]   <= jb;
          end
        end else if (int'(lv) < J - 1) begin
          rpend[lv + 1'b1]  <= 1'b1;
          rfirst[lv + 1'b1] <= (jr == XW'(1));
        end
      end
    end
  end

  // row delay line, cleared at the start of every row job
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) dl[k] <= '0;
    end else if (!flight) begin
      for (int k = 0; k < 8; k++) dl[k] <= '0;
    end else if (take_row) begin
      dl[0] <= cur;
      for (int k = 1; k < 8; k++) dl[k] <= dl[k-1];
    end
  end

  // result write-back
  logic          col_half;      // column job: second (HL/HH) half
  int            ohalf;
  logic [AW-1:0] waddr;

  assign ohalf    = nj / 2;
  assign col_half = int'(oc) >= ohalf;
  assign waddr    = AW'(base_of(int'(lv)) + int'(oc));

  always_ff @(posedge clk) begin
    if (done) begin
      if (kind == K_ROW) begin
        rmem[jb][waddr]                 <= lo;    // L half of the row
        rmem[jb][AW'(int'(waddr) + ohalf)] <= hi; // H half of the row
      end else if (!col_half) begin
        llrow[AW'(base_of(int'(lv) + 1) + int'(oc))] <= lo;
        lhrow[oc[XW-2:0]]                             <= hi;
      end
    end
  end

  // ------------------------------------------------------------ outputs
  logic [XW-2:0] op;            // output column of the HL/HH half

  assign op = (XW-1)'(int'(oc) - ohalf);

  for (genvar j = 0; j < J; j++) begin : g_out
    assign det_valid[j] = done && kind == K_COL && int'(lv) == j && col_half;
    assign det_first[j] = det_valid[j] && jr == XW'(1) && int'(oc) == ohalf;
    assign lh[j] = lhrow[op];
    assign hl[j] = lo;
    assign hh[j] = hi;
  end

  assign ll_valid = det_valid[J-1];
  assign ll_first = det_first[J-1];
  assign ll       = llrow[AW'(base_of(J) + int'(op))];

  assert property (@(posedge clk) disable iff (!rst_n) fstart |-> can_start)
    else $error("arc2d_sep: filter bank overrun");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (last_out && kind == K_ROW && jr[0]) |-> !cpend[lv])
    else $error("arc2d_sep: column job overwritten");

endmodule
