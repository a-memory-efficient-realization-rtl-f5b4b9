// gdau_group_rom -- the group ROM of the GDAU.
//
// One row per rotation group, M = (N-1)/2 words per row. Row g holds the
// partial products of group g's seed for the M outputs of a cyclic half:
//   word l = sum_{i: seed bit M-1-i set} c_{(i+l) mod M},  c_j = cos(2 pi g^j / N)
// For N = 7 (a = pi/7) this is the published arrangement, in the output
// order T(2)/T(5), T(6)/T(1), T(4)/T(3):
//   group 0 (seed 001): cos4a            cos2a            cos6a
//   group 1 (seed 011): cos6a+cos4a      cos2a+cos4a      cos2a+cos6a
//   group 2 (seed 000): 0                0                0
//   group 3 (seed 111): c2+c4+c6         c2+c4+c6         c2+c4+c6
// i.e. 12 words where a plain DA table needs 8 x 3. Both cyclic halves
// read the same rows. Words are CW-bit two's complement with CF fraction
// bits (14 for N = 7); each sum is formed from the rounded single
// coefficients, so every word is exact in that format. The table is
// computed at elaboration. Asynchronous read; an address beyond the last
// group reads zeros.
module gdau_group_rom
  import gda_pkg::*;
#(
  parameter  int N   = 7,
  parameter  int CWP = CW,
  parameter  int CF  = rom_frac(N, CWP),
  localparam int M   = (N - 1) / 2,
  localparam int GN  = num_groups(M),
  localparam int GW  = (GN > 1) ? $clog2(GN) : 1
) (
  input  logic [GW-1:0]         grp,
  output logic signed [CWP-1:0] word [M]
);

  // row g, word l at index g*M + l
  typedef logic signed [CWP-1:0] rom_t [GN*M];

  function automatic rom_t build_rom();
    rom_t r;
    for (int g = 0; g < GN; g++)
      for (int l = 0; l < M; l++)
        r[g*M + l] = CWP'(rom_word(N, g, l, CF));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb begin
    for (int l = 0; l < M; l++)
      word[l] = (int'(grp) < GN) ? ROM[int'(grp) * M + l] : '0;
  end

endmodule
