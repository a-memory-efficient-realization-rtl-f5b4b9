// gdau_addsub -- the (N-1)/2 adder/subtractors in front of the GDAU.
//
// They merge the preprocessed samples x(1)..x(N-1) pairwise, using the
// symmetry cos(pi (N-r)/N) = -cos(pi r/N) of the kernel:
//   w[i] = x(a_i) + x(b_i)   (sub = 0, even half)
//   w[i] = x(a_i) - x(b_i)   (sub = 1, odd half)
// with {a_i, b_i} = {g^i mod N, N - g^i mod N} and a_i the even one
// (see gda_pkg). For N = 7: w = {x6+-x1, x4+-x3, x2+-x5}. w[i] supplies bit
// M-1-i of the decoder's vector. Each result is sign-extended to the L-bit
// DA word. The pairing is the published one; word-parallel adders feeding a
// shift register are this design's choice. Combinational.
module gdau_addsub
  import gda_pkg::*;
#(
  parameter  int N  = 7,
  parameter  int XW = 15,
  parameter  int LP = L,
  localparam int M  = (N - 1) / 2
) (
  input  logic signed [XW-1:0] x [1:N-1],
  input  logic                 sub,
  output logic signed [LP-1:0] w [M]
);

  for (genvar i = 0; i < M; i++) begin : g_pair
    localparam int A = pair_a(N, i);
    localparam int B = pair_b(N, i);
    logic signed [LP-1:0] pa, pb;
    assign pa   = LP'(x[A]);
    assign pb   = LP'(x[B]);
    assign w[i] = sub ? pa - pb : pa + pb;
  end

endmodule
