// tb_decimator: FIR plus down-sampling by 2, against a reference.
//
// Daubechies-4 low-pass and Haar high-pass decimators share a stream of
// random 8-bit samples arriving every 3 to 6 cycles. The reference filters
// every sample (rounded to 12 bits, 2 fraction bits) and keeps the outputs of
// samples 0, 2, 4, ... after reset. After each sample the strobe y_stb must
// pulse exactly two cycles after x_stb, and y_out must hold the kept output
// of the newest even-numbered sample.
module tb_decimator;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst, x_stb;
  logic [7:0] x_in;
  logic signed [11:0] yd, yh;
  logic sd, sh;

  decimator #(.WAVELET(DAUB4), .FILTER(H0)) dut_d (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in), .y_out (yd), .y_stb (sd));
  decimator #(.WAVELET(HAAR), .FILTER(H1)) dut_h (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in), .y_out (yh), .y_stb (sh));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [4];
  longint kept_d, kept_h;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; x_stb = 1'b0; x_in = '0;
    hist = '{0, 0, 0, 0}; kept_d = 0; kept_h = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      automatic longint ad = 0, ah = 0;
      x_stb = 1'b1; x_in = 8'($urandom);
      for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = longint'(x_in);
      for (int k = 0; k < 4; k++) ad += qcoef(1, 0, k) * hist[k];
      for (int k = 0; k < 2; k++) ah += qcoef(0, 1, k) * hist[k];
      if (n % 2 == 0) begin
        kept_d = round_sat(ad, 12, 12);
        kept_h = round_sat(ah, 12, 12);
      end
      @(posedge clk); #1;
      x_stb = 1'b0;
      check("stb early", longint'({63'd0, sd | sh}), 0);
      @(posedge clk); #1;
      check("stb", longint'({63'd0, sd & sh}), 1);
      check("yd", longint'(yd), kept_d);
      check("yh", longint'(yh), kept_h);
      repeat ($urandom_range(1, 4)) begin
        @(posedge clk); #1;
        check("stb idle", longint'({63'd0, sd | sh}), 0);
        check("yd hold", longint'(yd), kept_d);
      end
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
