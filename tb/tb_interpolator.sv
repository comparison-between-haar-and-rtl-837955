// tb_interpolator: up-sampling by 2 plus synthesis FIR, against a reference.
//
// A Daubechies-4 G0 and a Haar G1 interpolator receive a load pulse every
// 2 to 5 cycles; y_in changes to a new random 12-bit value on every second
// pulse, as a decimator's output does. The reference builds the up-sampled
// stream (the current y_in on pulses 0, 2, 4, ..., zero on the others),
// convolves it with the filter at full precision, and expects the result on
// x_out with x_load exactly two cycles after each load pulse.
module tb_interpolator;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int ACC_W = DEF_SUB_W + COEF_W + $clog2(MAX_TAPS);

  logic clk = 1'b0, rst, load;
  logic signed [11:0] y_in;
  logic signed [ACC_W-1:0] xd, xh;
  logic ld, lh;

  interpolator #(.WAVELET(DAUB4), .FILTER(G0)) dut_d (
    .clk (clk), .rst (rst), .load (load), .y_in (y_in), .x_out (xd), .x_load (ld));
  interpolator #(.WAVELET(HAAR), .FILTER(G1)) dut_h (
    .clk (clk), .rst (rst), .load (load), .y_in (y_in), .x_out (xh), .x_load (lh));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [4];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; y_in = '0;
    hist = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      automatic longint ad = 0, ah = 0, u;
      if (n % 2 == 0) y_in = 12'($urandom);
      u = (n % 2 == 0) ? longint'(y_in) : 0;
      for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = u;
      for (int k = 0; k < 4; k++) ad += qcoef(1, 2, k) * hist[k];
      for (int k = 0; k < 2; k++) ah += qcoef(0, 3, k) * hist[k];
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      check("load early", longint'({63'd0, ld | lh}), 0);
      @(posedge clk); #1;
      check("load", longint'({63'd0, ld & lh}), 1);
      check("xd", longint'(xd), ad);
      check("xh", longint'(xh), ah);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
