// gda_top -- the two group distributed arithmetic designs side by side.
//
//   dct_gda     N-point 1-D DCT (N = 7 by default): 12-bit samples in, one
//               block of seven every 32 cycles; Y(0..6) out in order
//               (see dct_gda.sv)
//   cconv_gda   four-point cyclic convolution with a 24-word group ROM,
//               16-bit inputs, 16 cycles per vector (see cconv_gda.sv)
// They share clock and reset and nothing else. All ports are plain signals
// or arrays.
module gda_top
  import gda_pkg::*;
#(
  parameter  int DCT_N = 7,
  localparam int IW    = sample_width(DCT_N, L),
  localparam int OW    = out_width(DCT_N, IW),
  localparam int KI    = $clog2(DCT_N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // N-point DCT
  input  logic                 dct_in_valid,
  output logic                 dct_in_ready,
  input  logic signed [IW-1:0] dct_in_data,
  output logic                 dct_out_valid,
  output logic [KI-1:0]        dct_out_index,
  output logic signed [OW-1:0] dct_out_data,
  // four-point cyclic convolution
  input  logic                 cc_in_valid,
  output logic                 cc_in_ready,
  input  logic signed [15:0]   cc_in_v [4],
  output logic                 cc_out_valid,
  output logic signed [33:0]   cc_out_u [4]
);

  dct_gda #(.N(DCT_N)) u_dct (
    .clk(clk), .rst_n(rst_n),
    .in_valid(dct_in_valid), .in_ready(dct_in_ready), .in_data(dct_in_data),
    .out_valid(dct_out_valid), .out_index(dct_out_index), .out_data(dct_out_data));

  cconv_gda u_cconv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cc_in_valid), .in_ready(cc_in_ready), .v(cc_in_v),
    .out_valid(cc_out_valid), .u(cc_out_u));

endmodule
