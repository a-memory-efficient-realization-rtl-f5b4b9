// tb_gdau_group_rom -- checks every group ROM row against the partial
// products of its seed, computed here from real cosines:
//   seed bits {A1, A2, A3}, c1 = cos(2a), c2 = cos(6a), c3 = cos(4a)
//   T(2) word = A1 c1 + A2 c2 + A3 c3
//   T(6) word = A3 c1 + A1 c2 + A2 c3
//   T(4) word = A2 c1 + A3 c2 + A1 c3
// with each cosine rounded to 14 fraction bits.
module tb_gdau_group_rom;

  logic [1:0] grp;
  logic signed [15:0] word [3];
  int checks = 0, failures = 0;
  localparam logic [2:0] SEED [4] = '{3'b001, 3'b011, 3'b000, 3'b111};

  gdau_group_rom dut (.*);

  function automatic int q14(input real x);
    return $rtoi(x * 16384.0 + (x >= 0.0 ? 0.5 : -0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a;
    int c [3];
    int a1, a2, a3;
    int expect_w [3];
    a = 3.14159265358979 / 7.0;
    c[0] = q14($cos(2.0 * a));
    c[1] = q14($cos(6.0 * a));
    c[2] = q14($cos(4.0 * a));
    for (int g = 0; g < 4; g++) begin
      grp = 2'(g);
      {a1, a2, a3} = {32'(SEED[g][2]), 32'(SEED[g][1]), 32'(SEED[g][0])};
      expect_w[0] = a1 * c[0] + a2 * c[1] + a3 * c[2];
      expect_w[1] = a3 * c[0] + a1 * c[1] + a2 * c[2];
      expect_w[2] = a2 * c[0] + a3 * c[1] + a1 * c[2];
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(word[k]) != expect_w[k]) begin
          failures++;
          $display("group %0d word %0d: got %0d want %0d", g, k, word[k], expect_w[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
