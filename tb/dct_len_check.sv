// dct_len_check -- drives one dct_gda of length N with random blocks and
// checks every output against the floating-point DCT
//   Y(k) = sum_n y(n) cos(pi (2n+1) k / 2N)
// within a tolerance that grows with N (coefficient rounding). With an
// unbroken input stream, output blocks must follow each other every
// max(32, 2N+1) cycles: the GDAU's two 16-cycle halves, or the
// preprocessing stage's 2N cycles plus one for the hand-over.
// Used by tb_dct_lengths; reports its counts on its ports when finished.
module dct_len_check #(
  parameter int N    = 7,
  parameter int NBLK = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   maxerr
);
  localparam int IW  = 16 - 1 - $clog2(N);
  localparam int OW  = IW + $clog2(N) + 1;
  localparam int KI  = $clog2(N + 1);
  localparam int TOL = 2 + N / 4;
  localparam int PER = (2 * N + 1 > 32) ? 2 * N + 1 : 32;

  logic in_valid = 0, in_ready, out_valid;
  logic signed [IW-1:0] in_data = '0;
  logic [KI-1:0] out_index;
  logic signed [OW-1:0] out_data;
  real ref_y [NBLK][N];
  int  nout = 0, prev_start = 0, cyc = 0;

  dct_gda #(.N(N)) dut (.*);

  initial begin
    finished = 0;
    checks   = 0;
    failures = 0;
    maxerr   = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int b, k, err;
    b = nout / N;
    k = nout % N;
    checks++;
    if (int'(out_index) != k) begin
      failures++;
      $display("N=%0d block %0d: index %0d, expected %0d", N, b, out_index, k);
    end
    err = int'(out_data) - $rtoi(ref_y[b][k] + (ref_y[b][k] >= 0.0 ? 0.5 : -0.5));
    if (err < 0) err = -err;
    if (err > maxerr) maxerr = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("N=%0d block %0d Y(%0d): got %0d want %f", N, b, k, out_data, ref_y[b][k]);
    end
    if (k == 0) begin
      if (b > 0) begin
        checks++;
        if (cyc - prev_start != PER) begin
          failures++;
          $display("N=%0d block %0d follows after %0d cycles, expected %0d", N, b, cyc - prev_start, PER);
        end
      end
      prev_start = cyc;
    end
    nout <= nout + 1;
  end

  initial begin
    int y [N];
    @(posedge rst_n);
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < N; n++) y[n] = $signed(IW'($urandom));
      if (b == 1) for (int n = 0; n < N; n++) y[n] = (n % 2) ? -(1 << (IW - 1)) : (1 << (IW - 1)) - 1;
      if (b == 2) for (int n = 0; n < N; n++) y[n] = -(1 << (IW - 1));
      for (int k = 0; k < N; k++) begin
        ref_y[b][k] = 0.0;
        for (int n = 0; n < N; n++)
          ref_y[b][k] += real'(y[n]) * $cos(3.14159265358979 * real'((2 * n + 1) * k) / real'(2 * N));
      end
      for (int n = 0; n < N; n++) begin
        in_valid = 1;
        in_data = IW'(y[n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
    end
    while (nout < N * NBLK) @(negedge clk);
    checks++;
    if (nout != N * NBLK) failures++;
    finished = 1;
  end
endmodule
