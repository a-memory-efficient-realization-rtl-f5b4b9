// dct_outbuf -- output buffer of the N-point DCT.
//
// A preloadable shift register: 'load' copies Y(0..N-1) into N stages in
// one cycle; from the next cycle on the buffer presents Y(0), Y(1), ...,
// Y(N-1) on out_data, one per cycle with out_valid high and the index k on
// out_index. There is no back-pressure. A load while words are still
// leaving restarts the sequence with the new block.
// Preload-and-shift is the published scheme; the index output is this
// design's addition for the consumer's convenience.
module dct_outbuf #(
  parameter  int N  = 7,
  parameter  int OW = 16,
  localparam int KW = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic signed [OW-1:0] y [0:N-1],
  output logic                 out_valid,
  output logic [KW-1:0]        out_index,
  output logic signed [OW-1:0] out_data
);

  logic signed [OW-1:0] sr [0:N-1];
  logic [KW-1:0]        left;   // words still to present

  assign out_valid = (left != '0);
  assign out_data  = sr[0];
  assign out_index = KW'(N) - left;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else if (load) begin
      sr   <= y;
      left <= KW'(N);
    end else if (left != '0) begin
      for (int i = 0; i < N - 1; i++) sr[i] <= sr[i+1];
      sr[N-1] <= '0;
      left    <= left - 1'b1;
    end
  end

endmodule
