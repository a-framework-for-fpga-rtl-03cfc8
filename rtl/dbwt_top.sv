// dbwt_top: the DBWT architecture library, all four architectures side by
// side, each with its own ports.
//
//   Arc1D-I  (arc1d_pipe)   balanced pipelined 1-D DBWT, one PE per level
//                           with ceil(L/2^j) multipliers          (ports p1_*)
//   Arc1D-II (arc1d_hybrid) hybrid 1-D DBWT, PE_1 for level 1 and one
//                           RPA-scheduled PE_2 for levels 2..J    (ports h1_*)
//   Arc2D-I  (arc2d_sep)    separable 2-D DBWT, one filter bank shared
//                           by rows, columns and levels, register
//                           blocks read column-wise               (ports s2_*)
//   Arc2D-II (arc2d_nonsep) non-separable 2-D DBWT with row-delay circuits,
//                           1-D filter processors and row adder,
//                           one unit shared by all levels         (ports n2_*)
//
// All use the CDF 9/7 filter pair, 9-bit input and 16-bit coefficients.
// The architectures are independent; a system would normally instantiate the
// one it needs. J1 is the number of 1-D levels, N the 2-D image size and J2
// the number of 2-D levels. Streams use valid (and, at the inputs, ready)
// with a first flag marking the start of a frame; see each block for its
// timing.
module dbwt_top #(
  parameter int J1 = 3,
  parameter int N  = 256,
  parameter int J2 = 3
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // Arc1D-I
  input  logic                            p1_x_valid,
  input  logic                            p1_x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] p1_x,
  output logic                            p1_x_ready,
  output logic                            p1_d_valid [J1],
  output logic                            p1_d_first [J1],
  output logic signed [dbwt_pkg::W_O-1:0] p1_d       [J1],
  output logic                            p1_a_valid,
  output logic                            p1_a_first,
  output logic signed [dbwt_pkg::W_O-1:0] p1_a,
  // Arc1D-II
  input  logic                            h1_x_valid,
  input  logic                            h1_x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] h1_x,
  output logic                            h1_x_ready,
  output logic                            h1_d1_valid,
  output logic                            h1_d1_first,
  output logic signed [dbwt_pkg::W_O-1:0] h1_d1,
  output logic                            h1_out_valid,
  output logic [7:0]                      h1_out_level,
  output logic                            h1_out_first,
  output logic signed [dbwt_pkg::W_O-1:0] h1_out_d,
  output logic signed [dbwt_pkg::W_O-1:0] h1_out_a,
  output logic                            h1_stall,
  // Arc2D-I
  input  logic                            s2_x_valid,
  input  logic                            s2_x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] s2_x,
  output logic                            s2_x_ready,
  output logic                            s2_det_valid [J2],
  output logic                            s2_det_first [J2],
  output logic signed [dbwt_pkg::W_O-1:0] s2_lh [J2],
  output logic signed [dbwt_pkg::W_O-1:0] s2_hl [J2],
  output logic signed [dbwt_pkg::W_O-1:0] s2_hh [J2],
  output logic                            s2_ll_valid,
  output logic                            s2_ll_first,
  output logic signed [dbwt_pkg::W_O-1:0] s2_ll,
  // Arc2D-II
  input  logic                            n2_x_valid,
  input  logic                            n2_x_first,
  input  logic signed [dbwt_pkg::W_I-1:0] n2_x_even,
  input  logic signed [dbwt_pkg::W_I-1:0] n2_x_odd,
  output logic                            n2_x_ready,
  output logic                            n2_det_valid [J2],
  output logic                            n2_det_first [J2],
  output logic signed [dbwt_pkg::W_O-1:0] n2_lh [J2],
  output logic signed [dbwt_pkg::W_O-1:0] n2_hl [J2],
  output logic signed [dbwt_pkg::W_O-1:0] n2_hh [J2],
  output logic                            n2_ll_valid,
  output logic                            n2_ll_first,
  output logic signed [dbwt_pkg::W_O-1:0] n2_ll
);

  arc1d_pipe #(.J(J1)) u_arc1d_i (
    .clk, .rst_n,
    .x_valid(p1_x_valid), .x_first(p1_x_first), .x(p1_x), .x_ready(p1_x_ready),
    .d_valid(p1_d_valid), .d_first(p1_d_first), .d(p1_d),
    .a_valid(p1_a_valid), .a_first(p1_a_first), .a(p1_a)
  );

  arc1d_hybrid #(.J(J1)) u_arc1d_ii (
    .clk, .rst_n,
    .x_valid(h1_x_valid), .x_first(h1_x_first), .x(h1_x), .x_ready(h1_x_ready),
    .d1_valid(h1_d1_valid), .d1_first(h1_d1_first), .d1(h1_d1),
    .out_valid(h1_out_valid), .out_level(h1_out_level), .out_first(h1_out_first),
    .out_d(h1_out_d), .out_a(h1_out_a), .stall(h1_stall)
  );

  arc2d_sep #(.N(N), .J(J2)) u_arc2d_i (
    .clk, .rst_n,
    .x_valid(s2_x_valid), .x_first(s2_x_first), .x(s2_x), .x_ready(s2_x_ready),
    .det_valid(s2_det_valid), .det_first(s2_det_first),
    .lh(s2_lh), .hl(s2_hl), .hh(s2_hh),
    .ll_valid(s2_ll_valid), .ll_first(s2_ll_first), .ll(s2_ll)
  );

  arc2d_nonsep #(.N(N), .J(J2)) u_arc2d_ii (
    .clk, .rst_n,
    .x_valid(n2_x_valid), .x_first(n2_x_first), .x_even(n2_x_even), .x_odd(n2_x_odd),
    .x_ready(n2_x_ready),
    .det_valid(n2_det_valid), .det_first(n2_det_first),
    .lh(n2_lh), .hl(n2_hl), .hh(n2_hh),
    .ll_valid(n2_ll_valid), .ll_first(n2_ll_first), .ll(n2_ll)
  );

endmodule
