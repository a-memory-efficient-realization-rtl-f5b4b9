// tb_da_accumulator -- checks the MSB-first shift-accumulator: a random
// 16-bit word w is fed bit by bit as partial products pp_j = w[j] ? c : 0,
// and after 16 cycles the register must equal w * c exactly.
module tb_da_accumulator;
  localparam int PW = 16, AW = 32, L = 16;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [PW-1:0] pp = '0;
  logic signed [AW-1:0] acc, acc_next;
  int checks = 0, failures = 0;

  da_accumulator #(.PW(PW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [L-1:0]  w;
    logic signed [PW-1:0] c;
    longint expect_v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      w = L'($urandom);
      c = PW'($urandom);
      if (trial == 0) begin w = 16'sh8000; c = 16'sh8000; end
      if (trial == 1) begin w = 16'sh7fff; c = 16'sh7fff; end
      for (int j = L - 1; j >= 0; j--) begin
        @(negedge clk);
        en = 1;
        first = (j == L - 1);
        pp = w[j] ? c : '0;
        #1;
        if (j == 0) begin
          expect_v = longint'(w) * longint'(c);
          checks++;
          if (acc_next !== AW'(expect_v)) begin
            failures++;
            $display("acc_next mismatch: w=%0d c=%0d got %0d want %0d", w, c, acc_next, expect_v);
          end
        end
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (acc !== AW'(expect_v)) begin
        failures++;
        $display("acc mismatch: w=%0d c=%0d got %0d want %0d", w, c, acc, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
