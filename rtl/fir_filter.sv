// fir_filter: direct-form FIR filter of one wavelet filter, with a load pulse.
//
// On every cycle with in_stb high the filter takes x_in, forms
//   acc = sum_k c[k] * x[n-k]      (c from dwt_pkg::coef, k = 0..TAPS-1)
// and registers the result, rounded half up by SHIFT bits and saturated to
// OUT_W bits, in y_out. In the following cycle the active-high 'load' output
// is high for one cycle to signal that a filter operation has completed;
// y_out then holds until the next operation. The TAPS-1 older samples sit in
// a delay line that advances only on in_stb, so the filter runs at the sample
// rate set by the strobe, not at the clock rate.
//
// The FIR block and its load output follow the document; the direct form with
// one multiplier per tap, the rounding and the saturation are this design's
// choices. Reset (synchronous, active high) clears the delay line and output.
module fir_filter
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET = DAUB4,
  parameter filter_e  FILTER  = H0,
  parameter int       IN_W    = DEF_SAMPLE_W + 1,
  parameter int       SHIFT   = COEF_FRAC - DEF_SUB_FRAC,
  parameter int       TAPS    = taps(WAVELET),
  parameter int       ACC_W   = IN_W + COEF_W + $clog2(TAPS),
  parameter int       OUT_W   = DEF_SUB_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_stb,
  input  logic signed [IN_W-1:0]  x_in,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    load
);

  logic signed [IN_W-1:0]  dly [TAPS-1];   // dly[j] = x[n-1-j]
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] rnd;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    acc = ACC_W'(coef(WAVELET, FILTER, 0)) * ACC_W'(x_in);
    for (int k = 1; k < TAPS; k++)
      acc += ACC_W'(coef(WAVELET, FILTER, k)) * ACC_W'(dly[k-1]);
  end

  // Round half up, then saturate to the output width.
  generate
    if (SHIFT > 0) begin : g_round
      assign rnd = (acc + (ACC_W'(1) <<< (SHIFT - 1))) >>> SHIFT;
    end else begin : g_noround
      assign rnd = acc;
    end
  endgenerate

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  always_comb begin
    if (rnd > OUT_MAX)      sat = OUT_MAX[OUT_W-1:0];
    else if (rnd < OUT_MIN) sat = OUT_MIN[OUT_W-1:0];
    else                    sat = rnd[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < TAPS - 1; j++) dly[j] <= '0;
      y_out <= '0;
      load  <= 1'b0;
    end else begin
      load <= in_stb;
      if (in_stb) begin
        dly[0] <= x_in;
        for (int j = 1; j < TAPS - 1; j++) dly[j] <= dly[j-1];
        y_out <= sat;
      end
    end
  end

endmodule
