// idwt: inverse discrete wavelet transform, one level, two bands.
//
// L goes through an interpolator with the synthesis filter G0, H through one
// with G1; the adder sums the two full-precision outputs, and the sum is
// rounded half up to an integer and clamped to the unsigned SAMPLE_W-bit
// range. With the filter banks of dwt_pkg the result equals the input of the
// forward transform, delayed (perfect reconstruction).
//
// Timing: stb at cycle t (one per full-rate sample) -> interpolator outputs
// at t+2 -> x_out and the one-cycle x_stb at t+3. The rounding and clamping
// are this design's choice.
module idwt
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET  = DAUB4,
  parameter int       SAMPLE_W = dwt_pkg::DEF_SAMPLE_W,
  parameter int       SUB_W    = dwt_pkg::DEF_SUB_W,
  parameter int       SUB_FRAC = dwt_pkg::DEF_SUB_FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    stb,
  input  logic signed [SUB_W-1:0] l_in,
  input  logic signed [SUB_W-1:0] h_in,
  output logic [SAMPLE_W-1:0]     x_out,
  output logic                    x_stb
);

  localparam int ACC_W = SUB_W + COEF_W + $clog2(MAX_TAPS);
  localparam int SUM_W = ACC_W + 1;
  localparam int FRAC  = SUB_FRAC + COEF_FRAC;

  logic signed [ACC_W-1:0] xl, xh;
  logic                    load_l, load_h;
  logic signed [SUM_W-1:0] sum, rnd;
  logic [SAMPLE_W-1:0]     clamped;

  interpolator #(.WAVELET(WAVELET), .FILTER(G0), .SUB_W(SUB_W), .ACC_W(ACC_W)) u_low (
    .clk (clk), .rst (rst), .load (stb), .y_in (l_in), .x_out (xl), .x_load (load_l)
  );

  interpolator #(.WAVELET(WAVELET), .FILTER(G1), .SUB_W(SUB_W), .ACC_W(ACC_W)) u_high (
    .clk (clk), .rst (rst), .load (stb), .y_in (h_in), .x_out (xh), .x_load (load_h)
  );

  localparam logic signed [SUM_W-1:0] MAXV = SUM_W'((1 << SAMPLE_W) - 1);

  always_comb begin
    sum = SUM_W'(xl) + SUM_W'(xh);
    rnd = (sum + (SUM_W'(1) <<< (FRAC - 1))) >>> FRAC;
    if (rnd < 0)         clamped = '0;
    else if (rnd > MAXV) clamped = '1;
    else                 clamped = rnd[SAMPLE_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out <= '0;
      x_stb <= 1'b0;
    end else begin
      x_stb <= load_l;
      if (load_l) x_out <= clamped;
    end
  end

  assert property (@(posedge clk) disable iff (rst) load_l == load_h);

endmodule
