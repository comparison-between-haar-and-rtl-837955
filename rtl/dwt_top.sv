// dwt_top: the Haar and the Daubechies-4 wavelet systems side by side.
//
// Each system takes its own serial sample stream (SAMPLE_W-bit unsigned
// samples, one bit per clock, MSB first, framed from reset), splits it into
// a low and a high band with its forward transform, rebuilds it with its
// inverse transform and sends the reconstruction out serially. The two share
// only clock and reset. Latency from input bit to the same output bit:
//   Haar: SAMPLE_W * 1 + 13 cycles,  Daubechies-4: SAMPLE_W * 3 + 13 cycles.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int SAMPLE_W = dwt_pkg::DEF_SAMPLE_W,
  parameter int SUB_W    = dwt_pkg::DEF_SUB_W,
  parameter int SUB_FRAC = dwt_pkg::DEF_SUB_FRAC
) (
  input  logic clk_in,
  input  logic reset,
  input  logic haar_xin,
  output logic haar_x_out,
  input  logic daub_xin,
  output logic daub_x_out
);

  dwt_system #(.WAVELET(HAAR), .SAMPLE_W(SAMPLE_W), .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_haar (
    .clk_in (clk_in), .reset (reset), .xin (haar_xin), .x_out (haar_x_out)
  );

  dwt_system #(.WAVELET(DAUB4), .SAMPLE_W(SAMPLE_W), .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_daub (
    .clk_in (clk_in), .reset (reset), .xin (daub_xin), .x_out (daub_x_out)
  );

endmodule
