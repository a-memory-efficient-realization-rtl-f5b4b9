// tb_dct_preproc -- feeds blocks of seven random samples, with random
// gaps in in_valid and random delays of x_ready, and checks
//   x(6) = y(6), x(n) = y(n) - x(n+1), Y(0) = sum y(n)
// and that x_valid rises 14 clock edges after the first sample of a block
// when the samples arrive back to back.
module tb_dct_preproc;
  localparam int IW = 12, XW = 15;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, x_valid, x_ready = 0;
  logic signed [IW-1:0] in_data = '0;
  logic signed [XW-1:0] x [0:6];
  logic signed [XW-1:0] y0;
  int checks = 0, failures = 0;
  int cyc = 0;

  dct_preproc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y [7];
    int xe [7];
    int s, c0, gaps;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 100; b++) begin
      gaps = 0;
      for (int n = 0; n < 7; n++) begin
        y[n] = $signed(IW'($urandom));
        if (b == 0) y[n] = (n % 2) ? -2048 : 2047;
      end
      xe[6] = y[6];
      for (int n = 5; n >= 0; n--) xe[n] = y[n] - xe[n+1];
      s = 0;
      for (int n = 0; n < 7; n++) s += y[n];
      for (int n = 0; n < 7; n++) begin
        if (b % 2 == 1) while ($urandom_range(0, 2) == 0) begin
          in_valid = 0; gaps++; @(negedge clk);
        end
        in_valid = 1;
        in_data = IW'(y[n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (n == 0) c0 = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      while (!x_valid) @(negedge clk);
      if (gaps == 0) begin
        checks++;
        if (cyc - c0 != 14) begin
          failures++;
          $display("block %0d: x ready %0d edges after first sample", b, cyc - c0);
        end
      end
      for (int n = 0; n < 7; n++) begin
        checks++;
        if (int'(x[n]) != xe[n]) begin
          failures++;
          $display("block %0d x(%0d): got %0d want %0d", b, n, x[n], xe[n]);
        end
      end
      checks++;
      if (int'(y0) != s) begin
        failures++;
        $display("block %0d Y(0): got %0d want %0d", b, y0, s);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++;
      if (!x_valid || in_ready) begin
        failures++;
        $display("block %0d: result not held", b);
      end
      x_ready = 1;
      @(negedge clk);
      x_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
