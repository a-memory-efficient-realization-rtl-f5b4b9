// cconv_gda -- P-point cyclic convolution by group distributed arithmetic
// (P = 4 by default).
//
//   u_i = sum_m v_{(i+m) mod P} coef_m,   i = 0..P-1
//
// For P = 4 with coef = (a, b, c, d):
//   u1 = a v1 + b v2 + c v3 + d v4        u3 = c v1 + d v2 + a v3 + b v4
//   u2 = d v1 + a v2 + b v3 + c v4        u4 = b v1 + c v2 + d v3 + a v4
//
// Every output uses the same coefficients with the inputs in rotated order.
// The P bits {v_P(j), ..., v_1(j)} of one DA cycle form a vector X, and the
// partial products of a rotated X are the rotated partial products of X.
// So the 2^P vectors fall into rotation groups (six for P = 4, with seeds
// 0000, 0001, 0011, 0101, 0111, 1111). A group ROM of G rows x P words then
// holds every partial product: 24 words at P = 4, where P plain DA tables
// need 16 x 4 = 64. Each cycle a decoder maps X to (group, rotation). The
// row is read, rotated by a barrel shifter and added into P
// shift-accumulators.
//
// Tables, all computed from P and COEF at elaboration:
//   - seed(X) is the smallest value among the rotations of X;
//   - groups are numbered by increasing seed;
//   - rot(X) is the smallest r with X = seed rotated left by r;
//   - row g, word i holds sum_m seed_g[m] coef_{(m-i) mod P}.
// X then selects row g rotated by r, and u_i takes word (i - r) mod P.
//
// Interface: in_valid with v[0..P-1] = v1..vP starts a computation when
// in_ready is high. W cycles later out_valid pulses, and u[0..P-1] hold the
// exact results until the next one. Inputs are MSB-first two's complement.
// The grouping and the datapath follow the published scheme. The
// coefficient values, widths, numbering and handshake are this design's
// choice.
module cconv_gda #(
  parameter  int P  = 4,           // convolution length
  parameter  int W  = 16,          // data word length
  parameter  int CW = 16,          // coefficient width
  // coef_0..coef_{P-1}; the default is for P = 4 and must be replaced for
  // other lengths
  parameter  int signed COEF [P] = '{11585, -6270, 15137, 3196},
  localparam int RW = CW + $clog2(P),  // ROM word: sum of up to P coefficients
  localparam int UW = W + RW           // result width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  v [P],
  output logic                 out_valid,
  output logic signed [UW-1:0] u [P]
);

  function automatic int count_groups();
    int n = 0;
    for (int x = 0; x < 2**P; x++)
      if (gda_pkg::seed_of(x, P) == x) n++;
    return n;
  endfunction

  localparam int G    = count_groups();
  localparam int GW   = (G > 1) ? $clog2(G) : 1;
  localparam int RTW  = $clog2(P);
  localparam int CNTW = $clog2(W);

  // decoder table: {group, rotation} for every vector X
  typedef logic [GW+RTW-1:0] dec_t [2**P];
  // group ROM: row g, word i at index g*P + i
  typedef logic signed [RW-1:0] rom_t [G*P];

  function automatic dec_t build_dec();
    dec_t tab;
    int   idx [2**P];
    int   n = 0;
    for (int x = 0; x < 2**P; x++)
      if (gda_pkg::seed_of(x, P) == x) begin
        idx[x] = n;
        n++;
      end
    for (int x = 0; x < 2**P; x++)
      tab[x] = {GW'(idx[gda_pkg::seed_of(x, P)]), RTW'(gda_pkg::rot_of(x, P))};
    return tab;
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    int   n = 0;
    for (int s = 0; s < 2**P; s++)
      if (gda_pkg::seed_of(s, P) == s) begin
        for (int i = 0; i < P; i++) begin
          r[n*P + i] = '0;
          for (int m = 0; m < P; m++)
            if (s[m]) r[n*P + i] = r[n*P + i] + RW'(COEF[(m - i + P) % P]);
        end
        n++;
      end
    return r;
  endfunction

  localparam dec_t DEC = build_dec();
  localparam rom_t ROM = build_rom();

  logic                 busy;
  logic [CNTW-1:0]      cnt;
  logic signed [W-1:0]  sr [P];
  logic [P-1:0]         xj;
  logic [GW-1:0]        grp;
  logic [RTW-1:0]       rot;
  logic [RW-1:0]        row [P], pp [P];
  logic signed [UW-1:0] acc [P], acc_next [P];
  logic                 first, last;

  assign in_ready = !busy;
  assign first    = (cnt == '0);
  assign last     = busy && (cnt == CNTW'(W - 1));
  always_comb for (int m = 0; m < P; m++) xj[m] = sr[m][W-1];

  // address decoder and group ROM
  assign {grp, rot} = DEC[xj];
  always_comb
    for (int i = 0; i < P; i++)
      row[i] = (int'(grp) < G) ? ROM[int'(grp) * P + i] : '0;

  gda_barrel_shifter #(.NW(P), .W(RW)) u_bsh (.din(row), .rot(rot), .dout(pp));

  for (genvar i = 0; i < P; i++) begin : g_acc
    da_accumulator #(.PW(RW), .AW(UW)) u_acc (
      .clk(clk), .rst_n(rst_n), .en(busy), .first(first),
      .pp(signed'(pp[i])), .acc(acc[i]), .acc_next(acc_next[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < P; i++) begin
        sr[i] <= '0;
        u[i]  <= '0;
      end
    end else begin
      out_valid <= last;
      if (last) begin
        u    <= acc_next;
        busy <= 1'b0;
      end
      if (in_valid && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        sr   <= v;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        for (int i = 0; i < P; i++) sr[i] <= sr[i] <<< 1;
      end
    end
  end

endmodule
