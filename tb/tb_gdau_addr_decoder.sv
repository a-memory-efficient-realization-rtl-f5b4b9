// tb_gdau_addr_decoder -- checks the group decoder against the published
// table of seeds, group addresses and rotating factors, and checks that the
// seed rotated by the factor (one position towards the more significant
// end per step) gives back the input vector.
module tb_gdau_addr_decoder;
  logic [2:0] xj, seed;
  logic [1:0] grp, rot;
  int checks = 0, failures = 0;

  // expected {seed, grp, rot} per input vector
  localparam logic [6:0] TABLE [8] = '{
    {3'b000, 2'd2, 2'd0},   // 000
    {3'b001, 2'd0, 2'd0},   // 001
    {3'b001, 2'd0, 2'd1},   // 010
    {3'b011, 2'd1, 2'd0},   // 011
    {3'b001, 2'd0, 2'd2},   // 100
    {3'b011, 2'd1, 2'd2},   // 101
    {3'b011, 2'd1, 2'd1},   // 110
    {3'b111, 2'd3, 2'd0}};  // 111

  gdau_addr_decoder dut (.*);

  function automatic logic [2:0] rotl3(input logic [2:0] s, input int r);
    logic [2:0] v;
    v = s;
    for (int i = 0; i < r; i++) v = {v[1:0], v[2]};
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      xj = 3'(v);
      #1;
      checks++;
      if ({seed, grp, rot} !== TABLE[v]) begin
        failures++;
        $display("xj=%b: got seed=%b grp=%0d rot=%0d", xj, seed, grp, rot);
      end
      checks++;
      if (rotl3(seed, int'(rot)) !== xj) begin
        failures++;
        $display("xj=%b: seed %b rotated by %0d does not give xj", xj, seed, rot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
