// tb_dwt_pe: self-checking testbench of the 1-D DBWT processing element.
//
// Streams frames of random 9-bit samples, continuously and with random gaps,
// into a PE with the full multiplier count (M = 5) and into one folded down
// to M = 2, and compares every (low, high) pair and its first-of-sequence
// flag with the reference model. It also checks that the M = 5 PE never
// stalls (one sample per cycle) and that its latency from the odd sample to
// the output is ceil(9/M) + 1 = 3 cycles, and that the M = 2 PE does stall.
module tb_dwt_pe;
  import dbwt_ref_pkg::*;

  localparam int N = 32;
  localparam int FRAMES = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // shared stimulus
  logic               v, first;
  logic signed [15:0] d;
  logic               rdy5, rdy2;
  logic               ov5, of5, ov2, of2;
  logic signed [15:0] lo5, hi5, lo2, hi2;
  logic signed [35:0] al5, ah5, al2, ah2;

  dwt_pe #(.M(5)) dut5 (.clk, .rst_n, .in_valid(v && rdy2), .in_first(first), .in_data(d),
                        .in_ready(rdy5), .out_valid(ov5), .out_first(of5), .out_lo(lo5),
                        .out_hi(hi5), .out_acc_lo(al5), .out_acc_hi(ah5));
  dwt_pe #(.M(2)) dut2 (.clk, .rst_n, .in_valid(v && rdy5), .in_first(first), .in_data(d),
                        .in_ready(rdy2), .out_valid(ov2), .out_first(of2), .out_lo(lo2),
                        .out_hi(hi2), .out_acc_lo(al2), .out_acc_hi(ah2));

  int exp_lo[$], exp_hi[$], exp_first[$];
  int exp_lo2[$], exp_hi2[$], exp_first2[$];
  int stalls5 = 0, stalls2 = 0;
  int last_out_cycle;

  always @(posedge clk) if (rst_n) begin
    if (v && !rdy5) stalls5++;
    if (v && !rdy2) stalls2++;
    if (ov5) begin
      checks++;
      last_out_cycle = cycle;
      if (exp_lo.size() == 0) begin failures++; $display("M5: unexpected output"); end
      else begin
        int el, eh, ef;
        el = exp_lo.pop_front(); eh = exp_hi.pop_front(); ef = exp_first.pop_front();
        if (int'(lo5) != el || int'(hi5) != eh || int'(of5) != ef) begin
          failures++;
          $display("M5 mismatch: got %0d %0d %0b exp %0d %0d %0d", lo5, hi5, of5, el, eh, ef);
        end
      end
    end
    if (ov2) begin
      checks++;
      if (exp_lo2.size() == 0) begin failures++; $display("M2: unexpected output"); end
      else begin
        int el, eh, ef;
        el = exp_lo2.pop_front(); eh = exp_hi2.pop_front(); ef = exp_first2.pop_front();
        if (int'(lo2) != el || int'(hi2) != eh || int'(of2) != ef) begin
          failures++;
          $display("M2 mismatch: got %0d %0d exp %0d %0d", lo2, hi2, el, eh);
        end
      end
    end
  end

  // Offer one sample at a falling edge; return at the falling edge after the
  // rising edge that accepted it.
  int t_acc;
  task automatic put(input int x, input bit f);
    v = 1; first = f; d = 16'(x);
    #1;
    while (!(rdy5 && rdy2)) begin @(negedge clk); #1; end
    t_acc = cycle;
    @(negedge clk);
    v = 0; first = 0;
  endtask

  task automatic send_frame(input bit gaps, output int first_cycle, output int done_cycle);
    iarr_t x, lo, hi;
    x = new[N];
    foreach (x[i]) x[i] = $signed($urandom_range(0, 511)) - 256;
    dwt1d(x, lo, hi);
    foreach (lo[m]) begin
      exp_lo.push_back(lo[m]);  exp_hi.push_back(hi[m]);  exp_first.push_back(int'(m == 0));
      exp_lo2.push_back(lo[m]); exp_hi2.push_back(hi[m]); exp_first2.push_back(int'(m == 0));
    end
    first_cycle = cycle;
    for (int i = 0; i < N; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        v = 0; @(negedge clk);
      end
      put(x[i], i == 0);
    end
    v = 0; first = 0;
    done_cycle = cycle;
  endtask

  initial begin
    int c0, c1;
    v = 0; first = 0; d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      send_frame(f % 2 == 1, c0, c1);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (exp_lo.size() != 0 || exp_lo2.size() != 0) begin
      failures++; $display("missing outputs %0d %0d", exp_lo.size(), exp_lo2.size());
    end
    // M = 5 must never stall; M = 2 (5 cycles per pair) must.
    checks++;
    if (stalls5 != 0) begin failures++; $display("M5 stalled %0d times", stalls5); end
    checks++;
    if (stalls2 == 0) begin failures++; $display("M2 never stalled"); end
    // latency of the full-rate PE: measured alone on a continuous frame
    begin
      iarr_t x, lo, hi;
      int t_in;
      x = new[N];
      foreach (x[i]) x[i] = i - 7;
      dwt1d(x, lo, hi);
      foreach (lo[m]) begin
        exp_lo.push_back(lo[m]); exp_hi.push_back(hi[m]); exp_first.push_back(int'(m == 0));
        exp_lo2.push_back(lo[m]); exp_hi2.push_back(hi[m]); exp_first2.push_back(int'(m == 0));
      end
      for (int i = 0; i < N; i++) put(x[i], i == 0);
      t_in = t_acc;
      repeat (60) @(posedge clk);
      checks++;
      // the last sample is taken at edge t_in; out_valid is seen C + 1 = 3
      // edges later
      if (last_out_cycle - t_in != 3) begin
        failures++; $display("latency: last in %0d, last out %0d", t_in, last_out_cycle);
      end
    end
    checks++;
    if (exp_lo.size() != 0 || exp_lo2.size() != 0) begin
      failures++; $display("missing outputs at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
