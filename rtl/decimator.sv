// decimator: FIR filter followed by down-sampling by 2.
//
// Structure as in the document: the FIR's load pulse advances a 1-bit
// counter, and the counter lets a parallel-load register store the FIR output
// only when its new state is 1, so every second filter output is kept:
//   y_out = Y[m] = (h * x)[2m]   (counted from the first sample after reset).
// The unsigned SAMPLE_W-bit input is extended to a signed word before the
// filter; the sub-band word y_out has SUB_W bits, SUB_FRAC of them fraction.
//
// Timing: x_stb at cycle t -> FIR output and load pulse at t+1 -> register
// loads at the edge ending cycle t+1 -> y_stb pulses at t+2 for every input
// sample (kept or not). y_stb is this design's addition: it paces the
// up-sampler of the inverse transform and sees the register already loaded.
module decimator
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET  = DAUB4,
  parameter filter_e  FILTER   = H0,
  parameter int       SAMPLE_W = dwt_pkg::DEF_SAMPLE_W,
  parameter int       SUB_W    = dwt_pkg::DEF_SUB_W,
  parameter int       SUB_FRAC = dwt_pkg::DEF_SUB_FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    x_stb,
  input  logic [SAMPLE_W-1:0]     x_in,
  output logic signed [SUB_W-1:0] y_out,
  output logic                    y_stb
);

  logic signed [SUB_W-1:0] fir_y;
  logic                    fir_load;
  logic                    keep;

  fir_filter #(
    .WAVELET (WAVELET),
    .FILTER  (FILTER),
    .IN_W    (SAMPLE_W + 1),
    .SHIFT   (COEF_FRAC - SUB_FRAC),
    .OUT_W   (SUB_W)
  ) u_fir (
    .clk    (clk),
    .rst    (rst),
    .in_stb (x_stb),
    .x_in   ($signed({1'b0, x_in})),
    .y_out  (fir_y),
    .load   (fir_load)
  );

  toggle_counter u_cnt (
    .clk  (clk),
    .rst  (rst),
    .adv  (fir_load),
    .q    (),
    .keep (keep)
  );

  load_register #(.W(SUB_W)) u_reg (
    .clk  (clk),
    .rst  (rst),
    .load (keep),
    .d    (fir_y),
    .q    (y_out)
  );

  always_ff @(posedge clk) begin
    if (rst) y_stb <= 1'b0;
    else     y_stb <= fir_load;
  end

endmodule
