// tb_gdau -- runs blocks of random x(1)..x(6) through the GDAU back to back
// and compares T(1)..T(6) with the direct sum
//   T(k) = sum_{n=1..6} x(n) * q(n k mod 14),  q(m) = round(2^14 cos(pi m/7)),
// which the unit must reproduce bit for bit. Also checks the rate: with
// 'start' held high the unit must take a new block every 32 cycles and
// report each one 32 cycles after it started.
module tb_gdau;
  localparam int XW = 15, L = 16, AW = 32;
  logic   clk = 0, rst_n = 0, start = 0, ready, done;
  logic signed [XW-1:0] x [1:6];
  logic [7:0] side_in = '0, side_out;
  logic signed [AW-1:0] t [1:6];
  int checks = 0, failures = 0;
  int cyc = 0;

  gdau #(.SW(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q14(input int m);
    real v;
    v = $cos(3.14159265358979 * real'(m) / 7.0) * 16384.0;
    return $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
  endfunction

  localparam int NBLK = 60;
  logic signed [XW-1:0] blk_x [NBLK][1:6];
  int     start_cyc [NBLK];
  int     nstart = 0, ndone = 0;

  // record every accepted block
  always @(posedge clk) if (rst_n && start && ready) begin
    start_cyc[nstart] <= cyc;
    nstart <= nstart + 1;
  end

  // check every finished block
  always @(posedge clk) if (rst_n && done) begin
    longint e;
    for (int k = 1; k <= 6; k++) begin
      e = 0;
      for (int n = 1; n <= 6; n++) e += longint'(blk_x[ndone][n]) * longint'(q14((n * k) % 14));
      checks++;
      if (longint'(t[k]) != e) begin
        failures++;
        $display("block %0d T(%0d): got %0d want %0d", ndone, k, t[k], e);
      end
    end
    checks++;
    if (side_out != 8'(ndone)) begin
      failures++;
      $display("block %0d: side word %0d", ndone, side_out);
    end
    checks++;
    if (cyc - start_cyc[ndone] != 2 * L + 1) begin
      failures++;
      $display("block %0d: done %0d cycles after start", ndone, cyc - start_cyc[ndone]);
    end
    if (ndone > 0 && ndone < NBLK / 2) begin
      checks++;
      if (start_cyc[ndone] - start_cyc[ndone-1] != 2 * L) begin
        failures++;
        $display("block %0d: started %0d cycles after previous", ndone, start_cyc[ndone] - start_cyc[ndone-1]);
      end
    end
    ndone <= ndone + 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 1; n <= 6; n++) blk_x[b][n] = XW'($urandom);
      if (b == 0) for (int n = 1; n <= 6; n++) blk_x[b][n] = (n % 2) ? 15'sh3fff : 15'sh4000;
      if (b == 1) for (int n = 1; n <= 6; n++) blk_x[b][n] = 15'sh4000;
      x = blk_x[b];
      side_in = 8'(b);
      start = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      @(negedge clk);
      start = 0;
      // second half of the run: gaps between blocks
      if (b >= NBLK / 2) repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    while (ndone < NBLK) @(posedge clk);
    @(negedge clk);
    checks++;
    if (ndone != NBLK) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
