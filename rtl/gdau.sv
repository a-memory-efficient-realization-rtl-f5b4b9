// gdau -- group distributed arithmetic unit of the N-point DCT.
//
// Computes the kernel values T(1)..T(N-1) of one block from x(1)..x(N-1) in
// 2 x L cycles with one group ROM, one barrel shifter and M = (N-1)/2
// accumulators:
//   cycles 0..L-1    even half: the M pair sums (for N = 7: x6+x1, x4+x3,
//                    x2+x5) are shifted out MSB first; the even-indexed
//                    T(k) (T(2), T(6), T(4)) accumulate
//   cycles L..2L-1   odd half: the pair differences; the odd-indexed T(k)
//                    (T(5), T(1), T(3)) accumulate in the same accumulators
// Each cycle the M bits leaving the shift registers address the group
// decoder; the group ROM row it selects is rotated by the rotating factor
// and added into the accumulators (the sign-bit cycle subtracts).
//
// Interface: 'start' is taken when 'ready' is high, with x(1..N-1) and an
// opaque side word (the DCT passes x(0) and Y(0)) that travels with the
// block. 'ready' is also high in the last cycle of a block, so blocks can
// follow each other every 2L = 32 cycles. 'done' pulses one cycle after the
// last cycle; t and side_out then hold the block's results until the next
// done. T(k) carries CF fraction bits:
//   T(k) = 2^CF * sum x(n) cos(pi n k / N)   up to coefficient rounding.
// The datapath is the published one; the MSB-first order, the even-then-odd
// schedule and the handshake are this design's choice.
module gdau
  import gda_pkg::*;
#(
  parameter  int N    = 7,                                // transform length
  parameter  int LP   = L,                                // DA word length
  parameter  int XW   = x_width(N, sample_width(N, LP)),  // width of x(n)
  parameter  int SW   = 1,                                // side word width
  localparam int M    = (N - 1) / 2,
  localparam int CF   = rom_frac(N, CW),
  localparam int AW   = LP + CW,
  localparam int GN   = num_groups(M),
  localparam int GW   = (GN > 1) ? $clog2(GN) : 1,
  localparam int RW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 ready,
  input  logic signed [XW-1:0] x [1:N-1],
  input  logic        [SW-1:0] side_in,
  output logic                 done,
  output logic signed [AW-1:0] t [1:N-1],
  output logic        [SW-1:0] side_out
);

  localparam int CNTW = $clog2(2 * LP);

  typedef int kmap_t [M];
  function automatic kmap_t build_kmap(input bit odd);
    kmap_t k;
    for (int l = 0; l < M; l++) k[l] = out_k(N, l, odd);
    return k;
  endfunction
  localparam kmap_t K_EVEN = build_kmap(1'b0);  // N = 7: 2, 6, 4
  localparam kmap_t K_ODD  = build_kmap(1'b1);  // N = 7: 5, 1, 3

  logic                 busy;
  logic [CNTW-1:0]      cnt;
  logic                 last_even, last_odd;
  logic signed [XW-1:0] x_q [1:N-1];
  logic [SW-1:0]        side_q;
  logic signed [LP-1:0] sr [M];

  // one set of M adder/subtractors: input x and sums when a block starts,
  // held x and differences when the odd half starts
  logic signed [XW-1:0] as_x [1:N-1];
  logic                 as_sub;
  logic signed [LP-1:0] as_w [M];

  assign last_even = busy && (cnt == CNTW'(LP - 1));
  assign last_odd  = busy && (cnt == CNTW'(2 * LP - 1));
  assign ready     = !busy || last_odd;
  assign as_sub    = last_even;
  assign as_x      = last_even ? x_q : x;

  gdau_addsub #(.N(N), .XW(XW), .LP(LP)) u_addsub (.x(as_x), .sub(as_sub), .w(as_w));

  // decoder, group ROM, barrel shifter
  logic [M-1:0]         xj, seed;
  logic [GW-1:0]        grp;
  logic [RW-1:0]        rot;
  logic signed [CW-1:0] row [M];
  logic [CW-1:0]        row_u [M], pp_u [M];

  always_comb for (int i = 0; i < M; i++) xj[M-1-i] = sr[i][LP-1];

  gdau_addr_decoder #(.N(N)) u_dec (.xj(xj), .seed(seed), .grp(grp), .rot(rot));
  gdau_group_rom    #(.N(N), .CWP(CW), .CF(CF)) u_rom (.grp(grp), .word(row));

  always_comb for (int l = 0; l < M; l++) row_u[l] = row[l];

  gda_barrel_shifter #(.NW(M), .W(CW)) u_bsh (.din(row_u), .rot(rot), .dout(pp_u));

  // M accumulators
  logic                 first;
  logic signed [AW-1:0] acc [M], acc_next [M];
  assign first = (cnt == '0) || (cnt == CNTW'(LP));

  for (genvar l = 0; l < M; l++) begin : g_acc
    da_accumulator #(.PW(CW), .AW(AW)) u_acc (
      .clk(clk), .rst_n(rst_n), .en(busy), .first(first),
      .pp(signed'(pp_u[l])), .acc(acc[l]), .acc_next(acc_next[l]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
      side_q   <= '0;
      side_out <= '0;
      for (int k = 1; k < N; k++) begin
        x_q[k] <= '0;
        t[k]   <= '0;
      end
      for (int i = 0; i < M; i++) sr[i] <= '0;
    end else begin
      done <= last_odd;
      if (last_even) for (int l = 0; l < M; l++) t[K_EVEN[l]] <= acc_next[l];
      if (last_odd) begin
        for (int l = 0; l < M; l++) t[K_ODD[l]] <= acc_next[l];
        side_out <= side_q;
      end
      if (start && ready) begin
        busy   <= 1'b1;
        cnt    <= '0;
        x_q    <= x;
        side_q <= side_in;
        sr     <= as_w;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (last_odd) busy <= 1'b0;
        if (last_even) sr <= as_w;
        else for (int i = 0; i < M; i++) sr[i] <= sr[i] <<< 1;
      end
    end
  end

endmodule
