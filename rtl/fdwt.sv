// fdwt: forward discrete wavelet transform, one level, two bands.
//
// Two decimators share the input stream: one with the low-pass analysis
// filter H0 produces L, one with the high-pass filter H1 produces H. Each
// holds its sub-band word for two input samples. stb pulses once per input
// sample, two cycles after x_stb, with L and H already updated; it paces the
// inverse transform. The L/H word width follows the document (12 bits); the
// pacing pulse is this design's addition.
module fdwt
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET  = DAUB4,
  parameter int       SAMPLE_W = dwt_pkg::DEF_SAMPLE_W,
  parameter int       SUB_W    = dwt_pkg::DEF_SUB_W,
  parameter int       SUB_FRAC = dwt_pkg::DEF_SUB_FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    x_stb,
  input  logic [SAMPLE_W-1:0]     x_in,
  output logic signed [SUB_W-1:0] l_out,
  output logic signed [SUB_W-1:0] h_out,
  output logic                    stb
);

  logic stb_h;

  decimator #(.WAVELET(WAVELET), .FILTER(H0), .SAMPLE_W(SAMPLE_W),
              .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_low (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in),
    .y_out (l_out), .y_stb (stb)
  );

  decimator #(.WAVELET(WAVELET), .FILTER(H1), .SAMPLE_W(SAMPLE_W),
              .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_high (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in),
    .y_out (h_out), .y_stb (stb_h)
  );

  // Both bands see the same strobes, so they run in lock step.
  assert property (@(posedge clk) disable iff (rst) stb == stb_h);

endmodule
