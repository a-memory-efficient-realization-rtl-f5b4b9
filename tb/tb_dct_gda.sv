// tb_dct_gda -- end-to-end test of the seven-point DCT pipeline. Random blocks
// of 12-bit samples go in, first as an unbroken stream, then with random
// gaps; every output block is compared with
//   Y(k) = sum_n y(n) cos(pi (2n+1) k / 14)
// computed here in floating point, allowing TOL for the fixed-point
// coefficients and rounding. With the unbroken stream, output blocks must
// follow each other every 32 cycles, and Y(0) of the first block must
// appear LAT edges after y(6) is taken.
module tb_dct_gda;
  localparam int IW = 12, OW = 16;
  localparam int NBLK = 80;
  localparam int TOL  = 4;
  localparam int LAT  = 49;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [IW-1:0] in_data = '0;
  logic [2:0] out_index;
  logic signed [OW-1:0] out_data;
  int checks = 0, failures = 0;
  int cyc = 0;
  real ref_y [NBLK][7];
  int  last_in_cyc [NBLK];
  int  nin = 0, nout = 0, prev_start = 0, maxerr = 0;

  dct_gda dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count accepted samples; remember when each block's y(6) went in
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (nin % 7 == 6) last_in_cyc[nin / 7] <= cyc;
    nin <= nin + 1;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, k, err;
    b = nout / 7;
    k = nout % 7;
    checks++;
    if (int'(out_index) != k) begin
      failures++;
      $display("block %0d: index %0d, expected %0d", b, out_index, k);
    end
    err = int'(out_data) - $rtoi(ref_y[b][k] + (ref_y[b][k] >= 0.0 ? 0.5 : -0.5));
    if (err < 0) err = -err;
    if (err > maxerr) maxerr = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("block %0d Y(%0d): got %0d want %f", b, k, out_data, ref_y[b][k]);
    end
    if (k == 0) begin
      if (b == 0) begin
        checks++;
        if (cyc - last_in_cyc[0] != LAT) begin
          failures++;
          $display("first block latency %0d", cyc - last_in_cyc[0]);
        end
      end else if (b < NBLK / 2) begin
        checks++;
        if (cyc - prev_start != 32) begin
          failures++;
          $display("block %0d follows after %0d cycles", b, cyc - prev_start);
        end
      end
      prev_start = cyc;
    end
    nout <= nout + 1;
  end

  initial begin
    int y [7];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 7; n++) y[n] = $signed(IW'($urandom));
      if (b == 1) for (int n = 0; n < 7; n++) y[n] = (n % 2) ? -2048 : 2047;
      if (b == 2) for (int n = 0; n < 7; n++) y[n] = 2047;
      if (b == 3) for (int n = 0; n < 7; n++) y[n] = -2048;
      for (int k = 0; k < 7; k++) begin
        ref_y[b][k] = 0.0;
        for (int n = 0; n < 7; n++)
          ref_y[b][k] += real'(y[n]) * $cos(3.14159265358979 * real'((2 * n + 1) * k) / 14.0);
      end
      for (int n = 0; n < 7; n++) begin
        if (b >= NBLK / 2) while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_data = IW'(y[n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
    end
    while (nout < 7 * NBLK) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (nout != 7 * NBLK) failures++;
    $display("largest error against the real-valued DCT: %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
