// tb_arc2d_nonsep: self-checking testbench of Arc2D-II, the non-separable
// multi-level 2-D DBWT on one shared processing unit, at N = 32 and J = 3.
//
// Sends three 32 x 32 frames of 9-bit pixels as row pairs: two random ones
// (the second with random input gaps) and an extreme checkerboard. It checks
// the LH, HL and HH subbands of all three levels and the final LL^3,
// position by position with their frame-start flags, against the direct 2-D
// convolution model applied level after level. This exercises the LL
// row-pair buffers and the interleaving of the levels. It also checks that a
// back-to-back frame takes at least N^2/2 cycles and no more than the shared
// unit's row pairs need (about 2/3 N^2 plus a few cycles per row pair).
module tb_arc2d_nonsep;
  import dbwt_ref_pkg::*;

  localparam int N = 32;
  localparam int J = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic x_valid = 0, x_first = 0, x_ready;
  logic signed [8:0] x_even = 0, x_odd = 0;
  logic det_valid [J], det_first [J];
  logic signed [15:0] lh [J], hl [J], hh [J];
  logic ll_valid, ll_first;
  logic signed [15:0] ll;

  arc2d_nonsep #(.N(N), .J(J)) dut (.*);

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

  // One frame on the shared unit: N/2^(j+1) row pairs of N/2^j columns at
  // every level, plus a gap of at most 8 cycles per row pair for the unit to
  // drain between row pairs (about 2/3 N^2 for large N).
  function automatic int frame_bound();
    int t = 0;
    for (int j = 0; j < J; j++) t += (N >> (j + 1)) * ((N >> j) + 8);
    return t;
  endfunction

  task automatic put(input int e, input int o, input bit f);
    x_valid = 1; x_first = f; x_even = 9'(e); x_odd = 9'(o);
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
        nonsep2d(s, n, a, b, c, d);
        foreach (a[i]) begin
          q_lh[j].push_back(b[i]); q_hl[j].push_back(c[i]); q_hh[j].push_back(d[i]);
          q_f[j].push_back(int'(i == 0));
        end
        s = a;
        n = n / 2;
      end
      foreach (s[i]) begin q_ll.push_back(s[i]); q_llf.push_back(int'(i == 0)); end
      t0 = cycle;
      for (int m = 0; m < N / 2; m++)
        for (int col = 0; col < N; col++) begin
          if (f == 1) while ($urandom_range(0, 3) == 0) @(negedge clk);
          put(img[(2*m)*N + col], img[(2*m+1)*N + col], m == 0 && col == 0);
        end
      if (f != 1) begin
        checks++;
        $display("frame %0d took %0d cycles, bound %0d", f, cycle - t0, frame_bound());
        if (cycle - t0 > frame_bound() || cycle - t0 < N*N/2) failures++;
      end
    end
    repeat (100) @(negedge clk);
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
