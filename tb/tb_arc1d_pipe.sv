// tb_arc1d_pipe: self-checking testbench of Arc1D-I, the balanced pipelined
// 1-D DBWT, at its default J = 3 levels.
//
// Sends frames of N0 = 64 random 9-bit samples, back to back at one sample per
// cycle and then with random gaps, and checks every detail coefficient d^j
// and the final approximation a^J against the reference model, level by
// level, including the first-of-frame flags. It also checks that the input is
// never throttled (the pipeline is balanced) and that a continuous frame of
// N0 samples is taken in N0 cycles.
module tb_arc1d_pipe;
  import dbwt_ref_pkg::*;

  localparam int J = 3;
  localparam int N0 = 64;
  localparam int FRAMES = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic x_valid = 0, x_first = 0, x_ready;
  logic signed [8:0] x = 0;
  logic d_valid [J], d_first [J];
  logic signed [15:0] d [J];
  logic a_valid, a_first;
  logic signed [15:0] a;

  arc1d_pipe #(.J(J)) dut (.*);

  int exp_d [J][$];
  int exp_df[J][$];
  int exp_a[$], exp_af[$];
  int stalls = 0;

  always @(posedge clk) if (rst_n) begin
    if (x_valid && !x_ready) stalls++;
    for (int j = 0; j < J; j++) if (d_valid[j]) begin
      int e, f;
      checks++;
      if (exp_d[j].size() == 0) begin failures++; $display("extra d%0d", j+1); end
      else begin
        e = exp_d[j].pop_front(); f = exp_df[j].pop_front();
        if (int'(d[j]) != e || int'(d_first[j]) != f) begin
          failures++; $display("d%0d got %0d exp %0d", j+1, d[j], e);
        end
      end
    end
    if (a_valid) begin
      int e, f;
      checks++;
      if (exp_a.size() == 0) begin failures++; $display("extra a"); end
      else begin
        e = exp_a.pop_front(); f = exp_af.pop_front();
        if (int'(a) != e || int'(a_first) != f) begin
          failures++; $display("a got %0d exp %0d", a, e);
        end
      end
    end
  end

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
    for (int f = 0; f < FRAMES; f++) begin
      iarr_t s, lo, hi, src;
      int t0;
      src = new[N0];
      foreach (src[i]) src[i] = $signed($urandom_range(0, 511)) - 256;
      if (f == 2) foreach (src[i]) src[i] = (i % 2) ? 255 : -256;   // extreme input
      s = src;
      for (int j = 0; j < J; j++) begin
        dwt1d(s, lo, hi);
        foreach (hi[m]) begin exp_d[j].push_back(hi[m]); exp_df[j].push_back(int'(m == 0)); end
        s = lo;
      end
      foreach (s[m]) begin exp_a.push_back(s[m]); exp_af.push_back(int'(m == 0)); end
      t0 = cycle;
      for (int i = 0; i < N0; i++) begin
        if (f >= 3) while ($urandom_range(0, 3) == 0) @(negedge clk);
        put(src[i], i == 0);
      end
      if (f < 3) begin
        checks++;
        if (cycle - t0 != N0) begin failures++; $display("frame took %0d cycles", cycle - t0); end
      end
    end
    repeat (100) @(negedge clk);
    for (int j = 0; j < J; j++) begin
      checks++;
      if (exp_d[j].size() != 0) begin failures++; $display("missing d%0d", j+1); end
    end
    checks++;
    if (exp_a.size() != 0) begin failures++; $display("missing a"); end
    checks++;
    if (stalls != 0) begin failures++; $display("input throttled %0d times", stalls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
