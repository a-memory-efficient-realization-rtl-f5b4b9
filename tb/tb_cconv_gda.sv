// tb_cconv_gda -- group DA cyclic convolution, compared exactly with
//   u_i = sum_m v_{(i+m) mod P} coef_m.
// Runs the default four-point instance (coef = a, b, c, d = 11585, -6270,
// 15137, 3196), a four-point instance with extreme coefficients, and the
// lengths 2, 3, 5, 6 and 8 with pseudo-random coefficients
// coef_m = ((m+1) * 7919 * P) mod 65536 - 32768. Each instance also checks
// the W+1-edge latency and that all rotation groups and rotating factors
// are used (see cconv_check).
module tb_cconv_gda;
  localparam int NI = 7;
  localparam int LENS [NI] = '{4, 4, 2, 3, 5, 6, 8};
  logic clk = 0, rst_n = 0;
  logic finished [NI];
  int   c [NI], f [NI];
  int   checks = 0, failures = 0;

  typedef int signed cset_t [8];
  function automatic cset_t pseudo_coef(input int p);
    cset_t s;
    for (int m = 0; m < 8; m++) s[m] = ((m + 1) * 7919 * p) % 65536 - 32768;
    return s;
  endfunction

  cconv_check #(.P(4), .USE_DEFAULT(1'b1)) u_def (
    .clk, .rst_n, .finished(finished[0]), .checks(c[0]), .failures(f[0]));
  cconv_check #(.P(4), .CSET('{-32768, 32767, -1, 20000, 0, 0, 0, 0})) u_ext (
    .clk, .rst_n, .finished(finished[1]), .checks(c[1]), .failures(f[1]));

  for (genvar i = 2; i < NI; i++) begin : g_len
    localparam int PL = LENS[i];
    cconv_check #(.P(PL), .CSET(pseudo_coef(PL))) u_chk (
      .clk, .rst_n, .finished(finished[i]), .checks(c[i]), .failures(f[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (2) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NI; i++) all &= finished[i];
    end while (!all);
    for (int i = 0; i < NI; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
