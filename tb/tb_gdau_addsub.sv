// tb_gdau_addsub -- checks the three adder/subtractors with random samples
// over the full 15-bit range, in both modes.
module tb_gdau_addsub;
  localparam int XW = 15, L = 16;
  logic signed [XW-1:0] x [1:6];
  logic                 sub;
  logic signed [L-1:0]  w [3];
  int checks = 0, failures = 0;

  gdau_addsub #(.XW(XW), .LP(L)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [3];
    for (int trial = 0; trial < 400; trial++) begin
      for (int n = 1; n <= 6; n++) x[n] = XW'($urandom);
      if (trial == 0) for (int n = 1; n <= 6; n++) x[n] = (n % 2) ? 15'sh4000 : 15'sh3fff;
      sub = trial[0];
      #1;
      e[0] = sub ? int'(x[6]) - int'(x[1]) : int'(x[6]) + int'(x[1]);
      e[1] = sub ? int'(x[4]) - int'(x[3]) : int'(x[4]) + int'(x[3]);
      e[2] = sub ? int'(x[2]) - int'(x[5]) : int'(x[2]) + int'(x[5]);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(w[k]) != e[k]) begin
          failures++;
          $display("sub=%0d word %0d: got %0d want %0d", sub, k, w[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
