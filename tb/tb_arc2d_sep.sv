// tb_arc2d_sep: self-checking testbench of Arc2D-I, the separable multi-level
// 2-D DBWT on one shared filter bank, at N = 32 and J = 3.
//
// Sends three 32 x 32 frames of 9-bit pixels: two random ones (the second
// with random input gaps) and an extreme checkerboard. It checks the LH, HL
// and HH subbands of all three levels and the final LL^3, position by
// position with their frame-start flags, against the reference model
// (rows, then columns, each pass rounded) applied level after level. It also
// checks that a back-to-back frame takes at least N^2 cycles and no more
// than the bank's row and column jobs need (about 2 N^2 (1 + 1/4 + 1/16) plus
// a few cycles per job).
module tb_arc2d_sep;
  import dbwt_ref_pkg::*;

  localparam int N = 32;
  localparam int J = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic x_valid = 0, x_first = 0, x_ready;
  logic signed [8:0] x = 0;
  logic det_valid [J], det_first [J];
  logic signed [15:0] lh [J], hl [J], hh [J];
  logic ll_valid, ll_first;
  logic signed [15:0] ll;

  arc2d_sep #(.N(N), .J(J)) dut (.*);

  int q_lh[J][$], q_hl[J][$], q_hh[J][$], q_f[J][$];
  int q_ll[$], q_llf[$];

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < J; j++) if (det_valid[j]) begin
      checks++;
      if (q_lh[j].size() == 0) begin failures++; $display("extra level %0d", j+1); end
      else begin
        int b, c, d, f;
        b = q_lh[j].pop_front(); c = q_hl[j].pop_front(); d = q_hh[j].pop_front();
        f = q_f[j].pop_front();
        if (int'(lh[j]) != b || int'(hl[j]) != c || int'(hh[j]) != d || int'(det_first[j]) != f) begin
          failures++;
          $display("level %0d got %0d %0d %0d exp %0d %0d %0d", j+1, lh[j], hl[j], hh[j], b, c, d);
        end
      end
    end
    if (ll_valid) begin
      checks++;
      if (q_ll.size() == 0) begin failures++; $display("extra LL"); end
      else begin
        int a, f;
        a = q_ll.pop_front(); f = q_llf.pop_front();
        if (int'(ll) != a || int'(ll_first) != f) begin
          failures++; $display("LL got %0d exp %0d", ll, a);
        end
      end
    end
  end

  // One frame on the shared filter bank: at every level N/2^j rows of
  // N/2^j samples (one per cycle) and N/2^(j+1) column jobs of N/2^j columns
  // (two cycles each), plus at most 8 cycles per job to drain the bank
  // (about 2 N^2 (1 + 1/4 + 1/16) for large N).
  function automatic int frame_bound();
    int t = 0;
    for (int j = 0; j < J; j++)
      t += (N >> j) * ((N >> j) + 8) + (N >> (j + 1)) * (2 * (N >> j) + 8);
    return t;
  endfunction

  task automatic put(input int v, input bit f);
    x_valid = 1; x_first = f; x = 9'(v);
    #1;
    while (!x_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    x_valid = 0; x_first = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      iarr_t img, s, a, b, c, d;
      int t0, n;
      img = new[N*N];
      foreach (img[i]) img[i] = $signed($urandom_range(0, 511)) - 256;
      // the third frame is an extreme checkerboard, the worst case for growth
      if (f == 2) foreach (img[i]) img[i] = (((i / N) + (i % N)) % 2) ? 255 : -256;
      s = img;
      n = N;
      for (int j = 0; j < J; j++) begin
        sep2d(s, n, a, b, c, d);
        foreach (a[i]) begin
          q_lh[j].push_back(b[i]); q_hl[j].push_back(c[i]); q_hh[j].push_back(d[i]);
          q_f[j].push_back(int'(i == 0));
        end
        s = a;
        n = n / 2;
      end
      foreach (s[i]) begin q_ll.push_back(s[i]); q_llf.push_back(int'(i == 0)); end
      t0 = cycle;
      foreach (img[i]) begin
        if (f == 1) while ($urandom_range(0, 3) == 0) @(negedge clk);
        put(img[i], i == 0);
      end
      if (f != 1) begin
        checks++;
        $display("frame %0d took %0d cycles, bound %0d", f, cycle - t0, frame_bound());
        if (cycle - t0 > frame_bound() || cycle - t0 < N*N) failures++;
      end
    end
    repeat (2000) @(negedge clk);
    for (int j = 0; j < J; j++) begin
      checks++;
      if (q_lh[j].size() != 0) begin failures++; $display("level %0d: %0d missing", j+1, q_lh[j].size()); end
    end
    checks++;
    if (q_ll.size() != 0) begin failures++; $display("LL missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
