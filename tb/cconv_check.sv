// cconv_check -- drives one cconv_gda of length P with random and extreme
// input vectors and compares every result exactly with
//   u_i = sum_m v_{(i+m) mod P} coef_m.
// It also checks that each result appears W+1 clock edges after its vector
// is taken, and that every rotation group and every rotating factor is
// used at least once. With USE_DEFAULT set, the instance keeps its default
// coefficients (which CSET must then hold). Used by tb_cconv_gda; reports
// its counts on its ports when finished.
module cconv_check #(
  parameter int P           = 4,
  parameter int W           = 16,
  parameter int CW          = 16,
  parameter bit USE_DEFAULT = 1'b0,
  // coefficients coef_0..coef_{P-1}; entries from P on are ignored
  parameter int signed CSET [8] = '{11585, -6270, 15137, 3196, 0, 0, 0, 0},
  parameter int NVEC        = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int UW = W + CW + $clog2(P);

  typedef int signed coef_t [P];
  function automatic coef_t first_p();
    coef_t c;
    for (int m = 0; m < P; m++) c[m] = CSET[m];
    return c;
  endfunction
  localparam coef_t CREF = first_p();

  logic in_valid = 0, in_ready, out_valid;
  logic signed [W-1:0]  v [P];
  logic signed [UW-1:0] u [P];
  int cyc = 0;
  int n_grp [2**P], n_rot [P];

  // usage of groups and rotating factors, seen through the decoder outputs
  if (USE_DEFAULT) begin : g_def
    cconv_gda #(.P(P), .W(W), .CW(CW)) dut (.*);
    always @(posedge clk) if (!in_ready) begin
      n_grp[dut.grp]++;
      n_rot[dut.rot]++;
    end
  end else begin : g_set
    cconv_gda #(.P(P), .W(W), .CW(CW), .COEF(CREF)) dut (.*);
    always @(posedge clk) if (!in_ready) begin
      n_grp[dut.grp]++;
      n_rot[dut.rot]++;
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  // rotate a P-bit vector left by r
  function automatic int rotl(input int x, input int r);
    for (int i = 0; i < r; i++) x = ((x << 1) | (x >> (P - 1))) & ((1 << P) - 1);
    return x;
  endfunction

  initial begin
    longint e;
    int t0, ng, seen;
    bit is_seed;
    finished = 0;
    checks   = 0;
    failures = 0;
    for (int i = 0; i < 2**P; i++) n_grp[i] = 0;
    for (int i = 0; i < P; i++) n_rot[i] = 0;
    for (int i = 0; i < P; i++) v[i] = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int b = 0; b < NVEC; b++) begin
      for (int m = 0; m < P; m++) v[m] = W'($urandom);
      if (b == 0) for (int m = 0; m < P; m++) v[m] = {1'b1, {(W-1){1'b0}}};
      if (b == 1) for (int m = 0; m < P; m++) v[m] = (m % 2) ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
      if (b == 2) for (int m = 0; m < P; m++) v[m] = '1;
      in_valid = 1;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      checks++;
      if (cyc - t0 != W + 1) begin
        failures++;
        $display("P=%0d vector %0d: result after %0d edges", P, b, cyc - t0);
      end
      for (int i = 0; i < P; i++) begin
        e = 0;
        for (int m = 0; m < P; m++) e += longint'(v[(i + m) % P]) * CREF[m];
        checks++;
        if (longint'(u[i]) != e) begin
          failures++;
          $display("P=%0d vector %0d u%0d: got %0d want %0d", P, b, i + 1, u[i], e);
        end
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    // every group must have been read; every rotating factor occurs (the
    // one-hot vector with bit r set is the seed 0..01 rotated by r)
    ng = 0;
    for (int x = 0; x < 2**P; x++) begin
      is_seed = 1;
      for (int r = 1; r < P; r++) if (rotl(x, r) < x) is_seed = 0;
      if (is_seed) ng++;
    end
    seen = 0;
    for (int g = 0; g < ng; g++) if (n_grp[g] > 0) seen++;
    checks++;
    if (seen != ng) begin
      failures++;
      $display("P=%0d: %0d of %0d groups used", P, seen, ng);
    end
    for (int g = ng; g < 2**P; g++) begin
      checks++;
      if (n_grp[g] != 0) begin
        failures++;
        $display("P=%0d: group address %0d out of range used", P, g);
      end
    end
    for (int r = 0; r < P; r++) begin
      checks++;
      if (n_rot[r] == 0) begin
        failures++;
        $display("P=%0d: rotating factor %0d never used", P, r);
      end
    end
    $display("P=%0d: %0d groups, checks %0d failures %0d", P, ng, checks, failures);
    finished = 1;
  end
endmodule
