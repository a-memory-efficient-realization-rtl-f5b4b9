// gda_barrel_shifter -- rotates the words of one group ROM row.
//
// All members of a group are rotations of the group's seed vector, and so
// are their partial products: the row stored for the seed serves every
// member once it is rotated by the member's rotating factor. Output word k
// takes input word (k - rot) mod NW. Built as a log2(NW)-stage rotator, one
// stage per bit of rot; rot must be below NW. Combinational.
// The rotation direction is fixed by the decoder table it works with.
module gda_barrel_shifter #(
  parameter int NW = 3,   // words per row
  parameter int W  = 16,  // word width
  localparam int RW = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic [W-1:0]  din  [NW],
  input  logic [RW-1:0] rot,
  output logic [W-1:0]  dout [NW]
);

  logic [W-1:0] stage [RW+1][NW];

  always_comb begin
    stage[0] = din;
    for (int s = 0; s < RW; s++) begin
      for (int k = 0; k < NW; k++) begin
        // rotate by 2^s when bit s of rot is set
        if (rot[s]) stage[s+1][k] = stage[s][(k + NW - ((1 << s) % NW)) % NW];
        else        stage[s+1][k] = stage[s][k];
      end
    end
    dout = stage[RW];
  end

endmodule
