// arc1d_hybrid: Arc1D-II, the hybrid-pipeline 1-D DBWT.
//
// A fully pipelined 1-D DBWT wastes its higher stages, which run at 1/2^(j-1)
// of the input rate. This architecture has only two processing elements:
// PE_1 (dwt_pe, ceil(L/2) = 5 multipliers) computes level 1 at the full
// input rate, and PE_2 (dwt_rpa_pe, ceil(L/4) = 3 multipliers) computes all
// levels 2..J by recursive pyramid scheduling, its own a^j results being fed
// back through its input multiplexer.
//
// Between PE_1's a^1 output, which has no back-pressure, and PE_2 sits a
// small FIFO (FIFO_DEPTH entries); the input is throttled (x_ready low) when
// the FIFO might not have room for the results PE_1 still has in flight.
// The FIFO and the throttling are this implementation's choices: with three
// multipliers PE_2 needs about 3 cycles per coefficient pair and cannot keep
// up with a continuous input stream, so frames take about 1.5 N0 cycles.
//
// Interface: x_valid/x_first/x/x_ready as in arc1d_pipe. d1_valid/d1 carry
// d^1; the PE_2 stream carries d^j and a^j with their level (2..J) on
// out_level; out_first marks the first pair of a frame on either stream.
module arc1d_hybrid #(
  parameter int J          = 3,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            x_valid,
  input  logic                            x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] x,
  output logic                            x_ready,
  output logic                            d1_valid,
  output logic                            d1_first,
  output logic signed [dbwt_pkg::W_O-1:0] d1,
  output logic                            out_valid,
  output logic [7:0]                      out_level,
  output logic                            out_first,
  output logic signed [dbwt_pkg::W_O-1:0] out_d,
  output logic signed [dbwt_pkg::W_O-1:0] out_a,
  output logic                            stall     // input throttled this cycle
);
  import dbwt_pkg::*;

  localparam int CW_ = $clog2(FIFO_DEPTH + 1);

  logic                  pe1_ready, pe1_valid, pe1_first;
  logic signed [W_O-1:0] pe1_lo;
  logic signed [35:0]    pe1_acc_lo, pe1_acc_hi;

  // FIFO between PE_1 and PE_2
  logic signed [W_O-1:0] fifo_data  [FIFO_DEPTH];
  logic                  fifo_first [FIFO_DEPTH];
  logic [CW_-1:0]        count;
  logic [$clog2(FIFO_DEPTH)-1:0] rd_ptr, wr_ptr;
  logic                  pop, push, pe2_ready;

  assign x_ready = pe1_ready && (int'(count) <= FIFO_DEPTH - 3);
  assign stall   = x_valid && !x_ready;

  dwt_pe #(.DW(W_O), .M(mults_of_level(L_LO, 1))) u_pe1 (
    .clk, .rst_n,
    .in_valid  (x_valid && x_ready),
    .in_first  (x_first),
    .in_data   (W_O'(x)),
    .in_ready  (pe1_ready),
    .out_valid (pe1_valid),
    .out_first (pe1_first),
    .out_lo    (pe1_lo),
    .out_hi    (d1),
    .out_acc_lo(pe1_acc_lo),
    .out_acc_hi(pe1_acc_hi)
  );
  assign d1_valid = pe1_valid;
  assign d1_first = pe1_first;

  assign push = pe1_valid;
  assign pop  = (count != '0) && pe2_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      rd_ptr <= '0;
      wr_ptr <= '0;
      for (int i = 0; i < FIFO_DEPTH; i++) begin
        fifo_data[i]  <= '0;
        fifo_first[i] <= 1'b0;
      end
    end else begin
      if (push) begin
        fifo_data[wr_ptr]  <= pe1_lo;
        fifo_first[wr_ptr] <= pe1_first;
        wr_ptr <= (int'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (int'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CW_'(push) - CW_'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (int'(count) < FIFO_DEPTH || pop))
    else $error("arc1d_hybrid: FIFO overflow");

  dwt_rpa_pe #(.J(J), .M(mults_of_level(L_LO, 2))) u_pe2 (
    .clk, .rst_n,
    .in_valid (count != '0),
    .in_first (fifo_first[rd_ptr]),
    .in_data  (fifo_data[rd_ptr]),
    .in_ready (pe2_ready),
    .out_valid,
    .out_level,
    .out_first,
    .out_d,
    .out_a
  );

endmodule
