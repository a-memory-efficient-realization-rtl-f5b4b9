// tb_dct_outbuf -- preloads random blocks of seven words and checks that
// they leave in order Y(0)..Y(6) on seven consecutive cycles with the right
// index, and that out_valid is low otherwise.
module tb_dct_outbuf;
  localparam int OW = 16;
  logic clk = 0, rst_n = 0, load = 0, out_valid;
  logic [2:0] out_index;
  logic signed [OW-1:0] y [0:6], out_data;
  int checks = 0, failures = 0;

  dct_outbuf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [OW-1:0] ref_y [0:6];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 100; b++) begin
      for (int k = 0; k < 7; k++) ref_y[k] = OW'($urandom);
      y = ref_y;
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 7; k++) y[k] = '0;
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (!out_valid || out_index != 3'(k) || out_data != ref_y[k]) begin
          failures++;
          $display("block %0d word %0d: valid=%0d index=%0d data=%0d want %0d",
                   b, k, out_valid, out_index, out_data, ref_y[k]);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) begin
        failures++;
        $display("block %0d: out_valid after seven words", b);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
