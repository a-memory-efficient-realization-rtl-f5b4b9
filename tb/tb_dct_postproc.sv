// tb_dct_postproc -- gives random T(1..6), x(0) and Y(0) and checks
//   Y(k) = round((2 T(k) + 2^14 x(0)) * K(k) / 2^29),
//   K(k) = round(2^15 cos(pi k/14)) computed here from real cosines,
// Y(0) passed through, and 'done' seven edges after 'start'.
module tb_dct_postproc;
  localparam int XW = 15, AW = 32, OW = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [AW-1:0] t [1:6];
  logic signed [XW-1:0] x0, y0;
  logic signed [OW-1:0] y [0:6];
  int checks = 0, failures = 0;
  int cyc = 0;

  dct_postproc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint kq(input int k);
    real v;
    v = $cos(3.14159265358979 * real'(k) / 14.0) * 32768.0;
    return longint'($rtoi(v + 0.5));
  endfunction

  initial begin
    longint s, p, e;
    int c0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      // T within the range a real block produces (|T| < 2^14 * 2^16)
      for (int k = 1; k <= 6; k++) t[k] = AW'($signed(30'($urandom)));
      x0 = XW'($urandom);
      y0 = XW'($urandom);
      start = 1;
      @(posedge clk);
      c0 = cyc;
      @(negedge clk);
      start = 0;
      for (int k = 1; k <= 6; k++) t[k] = '0;  // inputs need not be held
      while (!done) @(negedge clk);
      checks++;
      if (cyc - c0 != 7) begin
        failures++;
        $display("done %0d edges after start", cyc - c0);
      end
      checks++;
      if (y[0] != OW'(y0)) begin
        failures++;
        $display("Y(0): got %0d want %0d", y[0], y0);
      end
    end
    // a directed pass with known T values, checked against the formula
    for (int b = 0; b < 100; b++) begin
      longint tv [1:6];
      for (int k = 1; k <= 6; k++) begin
        tv[k] = longint'($signed(28'($urandom)));
        t[k] = AW'(tv[k]);
      end
      x0 = XW'($urandom_range(0, 4095));
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      for (int k = 1; k <= 6; k++) begin
        s = 2 * tv[k] + longint'(x0) * 16384;
        p = s * kq(k);
        e = (p + (longint'(1) <<< 28)) >>> 29;
        checks++;
        if (longint'(y[k]) != longint'($signed(OW'(e)))) begin
          failures++;
          $display("Y(%0d): got %0d want %0d", k, y[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
