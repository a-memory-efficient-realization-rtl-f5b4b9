// da_accumulator -- shift-accumulator of bit-serial distributed arithmetic.
//
// The DA input words are presented most significant bit first. In the
// sign-bit cycle ('first') the register restarts with -pp, because the sign
// bit of a two's complement word weighs -2^(L-1); in every later cycle it
// becomes 2*acc + pp. After L enabled cycles it holds sum_j pp_j * w_j with
// the two's complement bit weights w_j, i.e. the inner product the partial
// products stand for. acc_next is the value the register takes at the next
// edge, so a caller can capture a finished sum without waiting a cycle.
// The published design names the accumulators; MSB-first order and the
// sign handling are this design's choice.
module da_accumulator #(
  parameter int PW = 16,  // partial product width
  parameter int AW = 32   // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic signed [PW-1:0] pp,
  output logic signed [AW-1:0] acc,
  output logic signed [AW-1:0] acc_next
);

  logic signed [AW-1:0] pp_ext;
  assign pp_ext = AW'(pp);

  always_comb begin
    if (first) acc_next = -pp_ext;
    else       acc_next = (acc <<< 1) + pp_ext;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
