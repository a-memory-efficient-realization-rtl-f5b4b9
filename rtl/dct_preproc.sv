// dct_preproc -- input buffer and preprocessing of the N-point DCT.
//
// An N-stage bidirectional shift register r[0..N-1] and one subtracting
// accumulator turn the samples y(0)..y(N-1) into
//   x(N-1) = y(N-1),  x(n) = y(n) - x(n+1)
// in 2N cycles (14 for N = 7):
//   cycles 1..N     shift forward: y(n) enters r[0]; after the last sample
//                   r[0] = y(N-1) ... r[N-1] = y(0)
//   cycles N+1..2N  shift backward: r[i] takes r[i+1] while r[N-1] takes
//                   r[0] - r[N-1] (r[N-1] counted as 0 in the first of
//                   these cycles), so x(N-1), ..., x(0) enter at the far
//                   end; afterwards r[0] = x(N-1) ... r[N-1] = x(0).
// A second accumulator sums the samples into Y(0) while they arrive.
// The result is then held with x_valid high until x_ready; no sample is
// taken in the meantime. The schedule and register arrangement follow the
// published timing table; the hold rule and the Y(0) accumulator are this
// design's choice. Samples are accepted on in_valid && in_ready.
module dct_preproc
  import gda_pkg::*;
#(
  parameter int N  = 7,
  parameter int IW = sample_width(N, L),
  parameter int XW = x_width(N, IW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [IW-1:0] in_data,
  output logic                 x_valid,
  input  logic                 x_ready,
  output logic signed [XW-1:0] x [0:N-1],
  output logic signed [XW-1:0] y0
);

  localparam int CNTW = $clog2(N);

  typedef enum logic [1:0] {S_IN, S_BACK, S_HOLD} state_t;

  state_t               state;
  logic [CNTW-1:0]      cnt;
  logic                 cnt_last;
  logic signed [XW-1:0] r [0:N-1];
  logic signed [XW-1:0] y_ext, acc_in;

  assign in_ready = (state == S_IN);
  assign x_valid  = (state == S_HOLD);
  assign y_ext    = XW'(in_data);
  assign acc_in   = (cnt == '0) ? '0 : r[N-1];
  assign cnt_last = (cnt == CNTW'(N - 1));

  always_comb for (int n = 0; n < N; n++) x[n] = r[N-1-n];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IN;
      cnt   <= '0;
      y0    <= '0;
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_valid) begin
          r[0] <= y_ext;
          for (int i = 1; i < N; i++) r[i] <= r[i-1];
          y0  <= (cnt == '0) ? y_ext : y0 + y_ext;
          cnt <= cnt_last ? '0 : cnt + 1'b1;
          if (cnt_last) state <= S_BACK;
        end
        S_BACK: begin
          for (int i = 0; i < N - 1; i++) r[i] <= r[i+1];
          r[N-1] <= r[0] - acc_in;
          cnt    <= cnt_last ? '0 : cnt + 1'b1;
          if (cnt_last) state <= S_HOLD;
        end
        S_HOLD: if (x_ready) state <= S_IN;
        default: state <= S_IN;
      endcase
    end
  end

endmodule
