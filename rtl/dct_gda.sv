// dct_gda -- N-point 1-D DCT built on group distributed arithmetic.
//
//   Y(k) = sum_{n=0..N-1} y(n) cos(pi (2n+1) k / 2N),  k = 0..N-1,
//   N prime (default 7).
//
// Pipeline of four stages:
//   dct_preproc   takes y(0..N-1) (N cycles) and forms x(n) (N cycles)
//   gdau          forms T(1..N-1) in 2L = 32 cycles (two L-bit DA halves)
//   dct_postproc  Y(k) = (2T(k) + x(0)) cos(pi k/2N), N-1 cycles
//   dct_outbuf    presents Y(0..N-1) in order, one per cycle
// For N <= 16 the GDAU is the slowest stage, so with a steady input the
// design takes one block of N samples every 32 cycles (7/32 samples per
// clock for N = 7). x(0) and Y(0) travel through the GDAU with their block
// as a side word.
//
// Interface: samples y(n) enter on in_valid && in_ready, N per block, y(0)
// first. Outputs leave on N consecutive cycles with out_valid,
// k = out_index, no back-pressure. For N = 7, Y(0) is on the output 48
// clock edges after the edge that takes y(6), when the GDAU is free
// (7 + 1 + 32 + 7 + 1). Samples are IW-bit two's complement integers
// (12 bits for N = 7, chosen so that every pair sum fits the 16-bit DA
// word); outputs are OW-bit integers, rounded.
// The stage structure is the published one; handshakes, widths and
// rounding are this design's choice.
module dct_gda
  import gda_pkg::*;
#(
  parameter  int N  = 7,
  localparam int IW = sample_width(N, L),
  localparam int XW = x_width(N, IW),
  localparam int OW = out_width(N, IW),
  localparam int AW = L + CW,
  localparam int KI = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic [KI-1:0]        out_index,
  output logic signed [OW-1:0] out_data
);

  logic signed [XW-1:0] x [0:N-1];
  logic signed [XW-1:0] y0;
  logic                 x_valid, g_ready, g_done, p_done, p_busy;
  logic signed [AW-1:0] t [1:N-1];
  logic [2*XW-1:0]      side_out;
  logic signed [OW-1:0] yk [0:N-1];

  dct_preproc #(.N(N), .IW(IW), .XW(XW)) u_pre (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .x_valid(x_valid), .x_ready(g_ready), .x(x), .y0(y0));

  gdau #(.N(N), .LP(L), .XW(XW), .SW(2 * XW)) u_gdau (
    .clk(clk), .rst_n(rst_n),
    .start(x_valid), .ready(g_ready), .x(x[1:N-1]), .side_in({x[0], y0}),
    .done(g_done), .t(t), .side_out(side_out));

  dct_postproc #(.N(N), .XW(XW), .AW(AW), .OW(OW)) u_post (
    .clk(clk), .rst_n(rst_n),
    .start(g_done), .t(t),
    .x0(side_out[2*XW-1:XW]), .y0(side_out[XW-1:0]),
    .busy(p_busy), .done(p_done), .y(yk));

  dct_outbuf #(.N(N), .OW(OW)) u_out (
    .clk(clk), .rst_n(rst_n), .load(p_done), .y(yk),
    .out_valid(out_valid), .out_index(out_index), .out_data(out_data));

  // blocks reach the post-processing stage at least 2L cycles apart, so it
  // is always free when the GDAU finishes
  assert property (@(posedge clk) disable iff (!rst_n) g_done |-> !p_busy)
    else $error("dct_gda: post-processing still busy when a block arrives");

  initial assert (prim_root(N) != 0 && N >= 3)
    else $error("dct_gda: N must be an odd prime");

endmodule
