// dwt_system: one complete wavelet system, serial in, serial out.
//
// The input samples (unsigned, SAMPLE_W bits) arrive on the 1-bit xin, one
// bit per clock, MSB first, framed from reset. serial_in assembles them; the
// forward transform (fdwt) splits each into the low band L and high band H,
// down-sampled by 2; the inverse transform (idwt) rebuilds the samples, and
// serial_out sends them out on x_out, again one bit per clock, MSB first.
// Because the filter bank reconstructs perfectly, x_out repeats xin exactly,
// delayed by LATENCY clock cycles:
//   LATENCY = SAMPLE_W * bank_delay(WAVELET) + 13
// (bank delay 1 sample for Haar, 3 for Daubechies-4; 13 cycles of pipeline:
// 7 more bits to collect a sample, 6 register stages). Throughput is one
// sample every SAMPLE_W clocks.
//
// The ports and the FDWT/IDWT split with 12-bit L and H follow the document;
// the serial framing, bit order and the synchronous active-high reset are
// this design's choice.
module dwt_system
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET  = DAUB4,
  parameter int       SAMPLE_W = dwt_pkg::DEF_SAMPLE_W,
  parameter int       SUB_W    = dwt_pkg::DEF_SUB_W,
  parameter int       SUB_FRAC = dwt_pkg::DEF_SUB_FRAC
) (
  input  logic clk_in,
  input  logic reset,
  input  logic xin,
  output logic x_out
);

  logic [SAMPLE_W-1:0]     x_par, y_par;
  logic                    x_stb, y_stb, sb_stb;
  logic signed [SUB_W-1:0] l, h;

  serial_in #(.SAMPLE_W(SAMPLE_W)) u_sin (
    .clk (clk_in), .rst (reset), .xin (xin), .x_par (x_par), .x_stb (x_stb)
  );

  fdwt #(.WAVELET(WAVELET), .SAMPLE_W(SAMPLE_W), .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_fdwt (
    .clk (clk_in), .rst (reset), .x_stb (x_stb), .x_in (x_par),
    .l_out (l), .h_out (h), .stb (sb_stb)
  );

  idwt #(.WAVELET(WAVELET), .SAMPLE_W(SAMPLE_W), .SUB_W(SUB_W), .SUB_FRAC(SUB_FRAC)) u_idwt (
    .clk (clk_in), .rst (reset), .stb (sb_stb), .l_in (l), .h_in (h),
    .x_out (y_par), .x_stb (y_stb)
  );

  serial_out #(.SAMPLE_W(SAMPLE_W)) u_sout (
    .clk (clk_in), .rst (reset), .x_stb (y_stb), .x_par (y_par), .x_out (x_out)
  );

endmodule
