// dct_postproc -- post-processing stage of the N-point DCT.
//
// Forms the outputs from the GDAU results:
//   Y(k) = (2 T(k) + x(0)) * cos(pi k / 2N),  k = 1..N-1
//   Y(0) passes through.
// The factor 2 is a wired shift; x(0) is aligned to T's CF fraction bits
// and added; one multiplier is shared by the N-1 outputs, one per cycle
// (k = 1..N-1 in the N-1 cycles after 'start'). The constants
// cos(pi k / 2N) have KF = 15 fraction bits and are computed at
// elaboration. Products are rounded to the nearest integer (ties upward).
// 'done' pulses in the cycle after the last product, with y[0..N-1] valid
// from then until the next block.
// The three operations are the published ones; the single time-shared
// multiplier, the constant format and the rounding are this design's
// choice.
module dct_postproc
  import gda_pkg::*;
#(
  parameter int N  = 7,
  parameter int XW = x_width(N, sample_width(N, L)),
  parameter int AW = L + CW,
  parameter int CF = rom_frac(N, CW),
  parameter int OW = out_width(N, sample_width(N, L))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [AW-1:0] t [1:N-1],
  input  logic signed [XW-1:0] x0,
  input  logic signed [XW-1:0] y0,
  output logic                 busy,
  output logic                 done,
  output logic signed [OW-1:0] y [0:N-1]
);

  localparam int SW   = AW + 2;     // 2T + x(0)
  localparam int PW   = SW + KW;    // product
  localparam int SH   = CF + KF;    // fraction bits of the product
  localparam int KCW  = $clog2(N);

  typedef logic signed [KW-1:0] ktab_t [N];
  function automatic ktab_t build_ktab();
    ktab_t kt;
    kt[0] = '0;
    for (int k = 1; k < N; k++) kt[k] = KW'(post_cos(N, k));
    return kt;
  endfunction
  localparam ktab_t KTAB = build_ktab();   // N = 7: 31946 29523 25619 20431 14218 7292

  logic signed [AW-1:0] t_q [1:N-1];
  logic signed [XW-1:0] x0_q;
  logic [KCW-1:0]       k;
  logic signed [SW-1:0] s;
  logic signed [KW-1:0] c;
  logic signed [PW-1:0] p, p_rnd;

  always_comb begin
    s     = (SW'(t_q[(k == '0) ? KCW'(1) : k]) <<< 1) + (SW'(x0_q) <<< CF);
    c     = KTAB[k];
    p     = PW'(s) * PW'(c);
    p_rnd = (p + (PW'(1) <<< (SH - 1))) >>> SH;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      x0_q <= '0;
      for (int i = 1; i < N; i++) t_q[i] <= '0;
      for (int i = 0; i < N; i++) y[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        k    <= KCW'(1);
        t_q  <= t;
        x0_q <= x0;
        y[0] <= OW'(y0);
      end else if (busy) begin
        y[k] <= OW'(p_rnd);
        if (k == KCW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          k    <= '0;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
