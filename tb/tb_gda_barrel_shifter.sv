// tb_gda_barrel_shifter -- checks the word rotator for three words (the
// DCT's GDAU) and four words (the cyclic convolution unit): for every
// rotation and random words, dout[k] must equal din[(k - rot) mod NW].
module tb_gda_barrel_shifter;
  localparam int W = 16;
  logic [W-1:0] din3 [3], dout3 [3];
  logic [W-1:0] din4 [4], dout4 [4];
  logic [1:0]   rot3, rot4;
  int checks = 0, failures = 0;

  gda_barrel_shifter #(.NW(3), .W(W)) dut3 (.din(din3), .rot(rot3), .dout(dout3));
  gda_barrel_shifter #(.NW(4), .W(W)) dut4 (.din(din4), .rot(rot4), .dout(dout4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      for (int r = 0; r < 4; r++) begin
        for (int k = 0; k < 3; k++) din3[k] = W'($urandom);
        for (int k = 0; k < 4; k++) din4[k] = W'($urandom);
        rot3 = 2'(r % 3);
        rot4 = 2'(r);
        #1;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (dout3[k] !== din3[(k - (r % 3) + 3) % 3]) begin
            failures++;
            $display("NW=3 rot=%0d k=%0d got %h", r % 3, k, dout3[k]);
          end
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (dout4[k] !== din4[(k - r + 4) % 4]) begin
            failures++;
            $display("NW=4 rot=%0d k=%0d got %h", r, k, dout4[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
