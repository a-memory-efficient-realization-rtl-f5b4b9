// tb_dct_lengths -- runs the group-DA DCT at the prime lengths 3, 5, 7, 11,
// 13 and 17 side by side. For each length the tables (rotation groups,
// group ROM, pairing, output order, post-multiplication constants) are
// derived at elaboration; each instance is checked against the
// floating-point DCT and for its block rate (see dct_len_check).
module tb_dct_lengths;
  localparam int NL = 6;
  localparam int LENS [NL] = '{3, 5, 7, 11, 13, 17};
  logic clk = 0, rst_n = 0;
  logic finished [NL];
  int   c [NL], f [NL], e [NL];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < NL; i++) begin : g_len
    dct_len_check #(.N(LENS[i]), .NBLK(20)) u_chk (
      .clk(clk), .rst_n(rst_n), .finished(finished[i]),
      .checks(c[i]), .failures(f[i]), .maxerr(e[i]));
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
      for (int i = 0; i < NL; i++) all &= finished[i];
    end while (!all);
    for (int i = 0; i < NL; i++) begin
      $display("N=%0d: checks %0d failures %0d largest error %0d", LENS[i], c[i], f[i], e[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
