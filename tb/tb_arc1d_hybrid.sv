// tb_arc1d_hybrid: self-checking testbench of Arc1D-II, the hybrid-pipeline
// 1-D DBWT (PE_1 for level 1, one RPA-scheduled PE_2 for levels 2..J).
//
// Sends frames of N0 = 64 random 9-bit samples as fast as the design takes
// them, and later with random gaps, at J = 3 and J = 4 (two instances fed the
// same samples). Every d^1, and every d^j and a^j of the PE_2 stream, is
// checked against the reference model level by level, with its frame-start
// flag. It also checks that the J = 4 instance throttled its input at some point
// (PE_2 has fewer multipliers than the full rate needs) and that a frame is still taken
// in under 2 N0 cycles.
module tb_arc1d_hybrid;
  import dbwt_ref_pkg::*;

  localparam int N0 = 64;
  localparam int FRAMES = 6;
  localparam int JMAX = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic x_valid = 0, x_first = 0;
  logic signed [8:0] x = 0;
  logic rdy3, rdy4;

  logic d1v[2], d1f[2], ov[2], of[2], st[2];
  logic signed [15:0] d1[2], od[2], oa[2];
  logic [7:0] ol[2];

  arc1d_hybrid #(.J(3)) dut3 (.clk, .rst_n, .x_valid(x_valid && rdy4), .x_first, .x,
    .x_ready(rdy3), .d1_valid(d1v[0]), .d1_first(d1f[0]), .d1(d1[0]), .out_valid(ov[0]),
    .out_level(ol[0]), .out_first(of[0]), .out_d(od[0]), .out_a(oa[0]), .stall(st[0]));
  arc1d_hybrid #(.J(4)) dut4 (.clk, .rst_n, .x_valid(x_valid && rdy3), .x_first, .x,
    .x_ready(rdy4), .d1_valid(d1v[1]), .d1_first(d1f[1]), .d1(d1[1]), .out_valid(ov[1]),
    .out_level(ol[1]), .out_first(of[1]), .out_d(od[1]), .out_a(oa[1]), .stall(st[1]));

  // expected per instance, per level (index 1..JMAX)
  int exp_d [2][JMAX+1][$];
  int exp_a [2][JMAX+1][$];
  int exp_f [2][JMAX+1][$];
  int stalls [2] = '{0, 0};

  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      if (x_valid && !(u == 0 ? rdy3 : rdy4)) stalls[u]++;   // not ready on its own
      if (st[u] && !x_valid) begin failures++; $display("stall flag without input"); end
      if (d1v[u]) begin
        int e, f;
        checks++;
        if (exp_d[u][1].size() == 0) begin failures++; $display("extra d1"); end
        else begin
          e = exp_d[u][1].pop_front(); f = exp_f[u][1].pop_front();
          if (int'(d1[u]) != e || int'(d1f[u]) != f) begin
            failures++; $display("inst %0d d1 got %0d exp %0d", u, d1[u], e);
          end
        end
      end
      if (ov[u]) begin
        int l, ed, ea;
        l = int'(ol[u]);
        checks++;
        if (l < 2 || l > u + 3 || exp_d[u][l].size() == 0) begin
          failures++; $display("inst %0d unexpected level %0d", u, l);
        end else begin
          ed = exp_d[u][l].pop_front(); ea = exp_a[u][l].pop_front();
          if (int'(od[u]) != ed || int'(oa[u]) != ea || int'(of[u]) != exp_f[u][l].pop_front()) begin
            failures++; $display("inst %0d level %0d got %0d/%0d exp %0d/%0d", u, l, od[u], oa[u], ed, ea);
          end
        end
      end
    end
  end

  task automatic put(input int v, input bit f);
    x_valid = 1; x_first = f; x = 9'(v);
    #1;
    while (!(rdy3 && rdy4)) begin @(negedge clk); #1; end
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
      for (int u = 0; u < 2; u++) begin
        s = src;
        for (int j = 1; j <= u + 3; j++) begin
          dwt1d(s, lo, hi);
          foreach (hi[m]) begin
            exp_d[u][j].push_back(hi[m]); exp_a[u][j].push_back(lo[m]);
            exp_f[u][j].push_back(int'(m == 0));
          end
          s = lo;
        end
      end
      t0 = cycle;
      for (int i = 0; i < N0; i++) begin
        if (f >= 3) while ($urandom_range(0, 3) == 0) @(negedge clk);
        put(src[i], i == 0);
      end
      if (f < 3) begin
        checks++;
        if (cycle - t0 >= 2 * N0) begin failures++; $display("frame took %0d cycles", cycle - t0); end
      end
    end
    repeat (200) @(negedge clk);
    for (int u = 0; u < 2; u++) begin
      for (int j = 1; j <= u + 3; j++) begin
        checks++;
        if (exp_d[u][j].size() != 0) begin failures++; $display("inst %0d missing level %0d", u, j); end
      end
    end
    // the J = 4 instance needs more engine time than a 64-sample frame gives
    checks++;
    if (stalls[1] == 0) begin failures++; $display("J=4 instance never throttled"); end
    begin
    end
    $display("throttled cycles: %0d %0d", stalls[0], stalls[1]);
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
