// tb_dbwt_top: end-to-end testbench of the DBWT library top, all four
// architectures running at the same time, at reduced sizes (2-D images of
// N = 32, J1 = J2 = 3 levels).
//
// Arc1D-I and Arc1D-II each get FRAMES1 frames of N0 random 9-bit samples,
// offered back to back; Arc2D-I gets N x N images row by row and Arc2D-II the
// same images as row pairs. Every output coefficient of every level is
// compared with the reference model. The testbench also counts the
// mechanisms the architectures rely on and fails if one never happened:
// outputs of every 1-D pipeline stage, input throttling of the hybrid
// architecture, coefficients its PE_2 computed from fed-back a^j (levels
// >= 3), column-job outputs of the separable architecture's shared filter
// bank at every level (read column-wise from its memory blocks), input
// stalls of that architecture while the bank works on columns or higher
// levels, row pairs taken from the LL row-pair buffers of the non-separable
// architecture (levels >= 2), input stalls of that architecture while its
// shared unit works on a higher level, and a frame restart on each
// architecture.
module tb_dbwt_top;
  import dbwt_ref_pkg::*;

  localparam int J1 = 3;
  localparam int N = 32;
  localparam int J2 = 3;
  localparam int N0 = 256;
  localparam int FRAMES1 = 3;
  localparam int FRAMES2 = 2;
  localparam int WATCHDOG = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // DUT signals
  logic p1_x_valid = 0, p1_x_first = 0, p1_x_ready;
  logic signed [8:0] p1_x = 0;
  logic p1_d_valid [J1], p1_d_first [J1];
  logic signed [15:0] p1_d [J1];
  logic p1_a_valid, p1_a_first;
  logic signed [15:0] p1_a;

  logic h1_x_valid = 0, h1_x_first = 0, h1_x_ready;
  logic signed [8:0] h1_x = 0;
  logic h1_d1_valid, h1_d1_first, h1_out_valid, h1_out_first, h1_stall;
  logic signed [15:0] h1_d1, h1_out_d, h1_out_a;
  logic [7:0] h1_out_level;

  logic s2_x_valid = 0, s2_x_first = 0, s2_x_ready;
  logic signed [8:0] s2_x = 0;
  logic s2_det_valid [J2], s2_det_first [J2];
  logic signed [15:0] s2_lh [J2], s2_hl [J2], s2_hh [J2];
  logic s2_ll_valid, s2_ll_first;
  logic signed [15:0] s2_ll;

  logic n2_x_valid = 0, n2_x_first = 0, n2_x_ready;
  logic signed [8:0] n2_x_even = 0, n2_x_odd = 0;
  logic n2_det_valid [J2], n2_det_first [J2];
  logic signed [15:0] n2_lh [J2], n2_hl [J2], n2_hh [J2];
  logic n2_ll_valid, n2_ll_first;
  logic signed [15:0] n2_ll;

  dbwt_top #(.J1(J1), .N(N), .J2(J2)) dut (.*);

  // expected values: one queue per stream, entries packed as {first, values}
  int p1_qd [J1][$];
  int p1_qa [$];
  int h1_qd1 [$];
  int h1_qd [J1+1][$];
  int h1_qa [J1+1][$];
  int s2_q [J2][$];   // lh, hl, hh, first: four entries per position
  int s2_qll [$];
  int n2_q [J2][$];
  int n2_qll [$];

  // mechanism counters
  int ev_stage [J1];
  int ev_throttle = 0, ev_feedback = 0;
  int ev_sep_level [J2], ev_nonsep_pair = 0, ev_n2_stall = 0, ev_s2_stall = 0;
  int ev_first_p1 = 0, ev_first_h1 = 0, ev_first_s2 = 0, ev_first_n2 = 0;

  task automatic expect1(inout int q[$], input int got, input string what);
    checks++;
    if (q.size() == 0) begin
      failures++; $display("%s: unexpected output", what);
    end else begin
      int e;
      e = q.pop_front();
      if (got != e) begin failures++; $display("%s: got %0d exp %0d", what, got, e); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < J1; j++) if (p1_d_valid[j]) begin
      ev_stage[j]++;
      expect1(p1_qd[j], int'(p1_d[j]), $sformatf("Arc1D-I d%0d", j + 1));
    end
    if (p1_a_valid) begin
      if (p1_a_first) ev_first_p1++;
      expect1(p1_qa, int'(p1_a), "Arc1D-I a");
    end
    if (h1_stall) ev_throttle++;
    if (n2_x_valid && !n2_x_ready) ev_n2_stall++;
    if (s2_x_valid && !s2_x_ready) ev_s2_stall++;
    if (h1_d1_valid) expect1(h1_qd1, int'(h1_d1), "Arc1D-II d1");
    if (h1_out_valid) begin
      int l;
      l = int'(h1_out_level);
      if (l >= 3) ev_feedback++;
      if (h1_out_first && l == J1) ev_first_h1++;
      if (l < 2 || l > J1) begin checks++; failures++; $display("Arc1D-II bad level %0d", l); end
      else begin
        expect1(h1_qd[l], int'(h1_out_d), $sformatf("Arc1D-II d%0d", l));
        expect1(h1_qa[l], int'(h1_out_a), $sformatf("Arc1D-II a%0d", l));
      end
    end
    for (int j = 0; j < J2; j++) begin
      if (s2_det_valid[j]) begin
        ev_sep_level[j]++;
        expect1(s2_q[j], int'(s2_lh[j]), "Arc2D-I LH");
        expect1(s2_q[j], int'(s2_hl[j]), "Arc2D-I HL");
        expect1(s2_q[j], int'(s2_hh[j]), "Arc2D-I HH");
        expect1(s2_q[j], int'(s2_det_first[j]), "Arc2D-I first");
      end
      if (n2_det_valid[j]) begin
        if (j > 0) ev_nonsep_pair++;
        expect1(n2_q[j], int'(n2_lh[j]), "Arc2D-II LH");
        expect1(n2_q[j], int'(n2_hl[j]), "Arc2D-II HL");
        expect1(n2_q[j], int'(n2_hh[j]), "Arc2D-II HH");
        expect1(n2_q[j], int'(n2_det_first[j]), "Arc2D-II first");
      end
    end
    if (s2_ll_valid) begin
      if (s2_ll_first) ev_first_s2++;
      expect1(s2_qll, int'(s2_ll), "Arc2D-I LL");
    end
    if (n2_ll_valid) begin
      if (n2_ll_first) ev_first_n2++;
      expect1(n2_qll, int'(n2_ll), "Arc2D-II LL");
    end
  end

  // ------------------------------------------------------------- drivers
  task automatic drive_1d();
    for (int f = 0; f < FRAMES1; f++) begin
      iarr_t src, s, lo, hi;
      src = new[N0];
      foreach (src[i]) src[i] = $signed($urandom_range(0, 511)) - 256;
      s = src;
      for (int j = 0; j < J1; j++) begin
        dwt1d(s, lo, hi);
        foreach (hi[m]) begin
          p1_qd[j].push_back(hi[m]);
          if (j == 0) h1_qd1.push_back(hi[m]);
          else begin h1_qd[j+1].push_back(hi[m]); h1_qa[j+1].push_back(lo[m]); end
        end
        s = lo;
      end
      foreach (s[m]) p1_qa.push_back(s[m]);
      fork
        begin
          for (int i = 0; i < N0; i++) begin
            p1_x_valid = 1; p1_x_first = (i == 0); p1_x = 9'(src[i]);
            #1; while (!p1_x_ready) begin @(negedge clk); #1; end
            @(negedge clk);
          end
          p1_x_valid = 0;
        end
        begin
          for (int i = 0; i < N0; i++) begin
            h1_x_valid = 1; h1_x_first = (i == 0); h1_x = 9'(src[i]);
            #1; while (!h1_x_ready) begin @(negedge clk); #1; end
            @(negedge clk);
          end
          h1_x_valid = 0;
        end
      join
    end
  endtask

  task automatic drive_2d();
    for (int f = 0; f < FRAMES2; f++) begin
      iarr_t img, s, a, b, c, d;
      int n;
      img = new[N*N];
      foreach (img[i]) img[i] = $signed($urandom_range(0, 511)) - 256;
      s = img; n = N;
      for (int j = 0; j < J2; j++) begin
        sep2d(s, n, a, b, c, d);
        foreach (a[i]) begin
          s2_q[j].push_back(b[i]); s2_q[j].push_back(c[i]); s2_q[j].push_back(d[i]);
          s2_q[j].push_back(int'(i == 0));
        end
        s = a; n = n / 2;
      end
      foreach (s[i]) s2_qll.push_back(s[i]);
      s = img; n = N;
      for (int j = 0; j < J2; j++) begin
        nonsep2d(s, n, a, b, c, d);
        foreach (a[i]) begin
          n2_q[j].push_back(b[i]); n2_q[j].push_back(c[i]); n2_q[j].push_back(d[i]);
          n2_q[j].push_back(int'(i == 0));
        end
        s = a; n = n / 2;
      end
      foreach (s[i]) n2_qll.push_back(s[i]);
      fork
        begin
          for (int i = 0; i < N*N; i++) begin
            s2_x_valid = 1; s2_x_first = (i == 0); s2_x = 9'(img[i]);
            #1; while (!s2_x_ready) begin @(negedge clk); #1; end
            @(negedge clk);
          end
          s2_x_valid = 0;
        end
        begin
          for (int m = 0; m < N/2; m++)
            for (int col = 0; col < N; col++) begin
              n2_x_valid = 1; n2_x_first = (m == 0 && col == 0);
              n2_x_even = 9'(img[2*m*N + col]); n2_x_odd = 9'(img[(2*m+1)*N + col]);
              #1; while (!n2_x_ready) begin @(negedge clk); #1; end
              @(negedge clk);
            end
          n2_x_valid = 0;
        end
      join
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, count);
  endtask

  task automatic empty(input int size, input string what);
    checks++;
    if (size != 0) begin failures++; $display("%s: %0d outputs missing", what, size); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      drive_1d();
      drive_2d();
    join
    repeat (5000) @(negedge clk);
    for (int j = 0; j < J1; j++) begin
      empty(p1_qd[j].size(), "Arc1D-I d");
      empty(h1_qd[j+1].size(), "Arc1D-II d");
    end
    empty(p1_qa.size(), "Arc1D-I a");
    empty(h1_qd1.size(), "Arc1D-II d1");
    for (int j = 0; j < J2; j++) begin
      empty(s2_q[j].size(), "Arc2D-I details");
      empty(n2_q[j].size(), "Arc2D-II details");
    end
    empty(s2_qll.size(), "Arc2D-I LL");
    empty(n2_qll.size(), "Arc2D-II LL");
    $display("mechanisms:");
    for (int j = 0; j < J1; j++) need(ev_stage[j], $sformatf("Arc1D-I stage %0d outputs", j + 1));
    need(ev_throttle, "Arc1D-II input throttled (cycles)");
    need(ev_feedback, "Arc1D-II PE_2 results from fed-back a^j");
    need(ev_first_p1 >= FRAMES1 ? ev_first_p1 : 0, "Arc1D-I frame starts");
    need(ev_first_h1 >= FRAMES1 ? ev_first_h1 : 0, "Arc1D-II frame starts");
    for (int j = 0; j < J2; j++) need(ev_sep_level[j], $sformatf("Arc2D-I level %0d column-job outputs of the shared filter bank", j + 1));
    need(ev_s2_stall, "Arc2D-I input stalled while the filter bank runs columns or higher levels (cycles)");
    need(ev_nonsep_pair, "Arc2D-II outputs of levels >= 2 from the LL row-pair buffers");
    need(ev_n2_stall, "Arc2D-II input stalled while the shared unit runs a higher level (cycles)");
    need(ev_first_s2 >= FRAMES2 ? ev_first_s2 : 0, "Arc2D-I frame starts");
    need(ev_first_n2 >= FRAMES2 ? ev_first_n2 : 0, "Arc2D-II frame starts");
    $display("cycles: %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
