// interpolator: up-sampling by 2 followed by a synthesis FIR filter.
//
// The up-sampler turns the sub-band stream into a full-rate stream with a
// zero between samples; the FIR (G0 or G1) filters it. The result is kept at
// full precision (SUB_FRAC + COEF_FRAC fraction bits, no rounding) so that
// the two bands can be added exactly before the final rounding.
//
// Timing: load at cycle t -> up-sampler output at t+1 -> x_out and the FIR's
// x_load pulse at t+2. One load pulse is expected per full-rate sample.
// Structure as in the document; widths and full-precision output are this
// design's choice.
module interpolator
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET = DAUB4,
  parameter filter_e  FILTER  = G0,
  parameter int       SUB_W   = dwt_pkg::DEF_SUB_W,
  parameter int       ACC_W   = SUB_W + COEF_W + $clog2(MAX_TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic signed [SUB_W-1:0] y_in,
  output logic signed [ACC_W-1:0] x_out,
  output logic                    x_load
);

  logic signed [SUB_W-1:0] up;
  logic                    up_stb;

  upsampler #(.W(SUB_W)) u_up (
    .clk   (clk),
    .rst   (rst),
    .load  (load),
    .y_in  (y_in),
    .u_out (up),
    .u_stb (up_stb)
  );

  fir_filter #(
    .WAVELET (WAVELET),
    .FILTER  (FILTER),
    .IN_W    (SUB_W),
    .SHIFT   (0),
    .ACC_W   (ACC_W),
    .OUT_W   (ACC_W)
  ) u_fir (
    .clk    (clk),
    .rst    (rst),
    .in_stb (up_stb),
    .x_in   (up),
    .y_out  (x_out),
    .load   (x_load)
  );

endmodule
