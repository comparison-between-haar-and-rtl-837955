// tb_fir_filter: checks the FIR filter against a reference convolution.
//
// Two instances: a Daubechies-4 high-pass analysis filter with the default
// rounding to 12 bits, and a Haar low-pass filter with a narrow 8-bit output
// so that saturation occurs. Random signed samples arrive on random strobes.
// After each strobe the load output must pulse exactly one cycle later and
// y_out must equal the rounded, saturated sum c[k]*x[n-k] of the reference.
module tb_fir_filter;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic in_stb;
  logic signed [8:0]  x_in;
  logic signed [11:0] y_d;
  logic signed [7:0]  y_h;
  logic load_d, load_h;

  fir_filter #(.WAVELET(DAUB4), .FILTER(H1)) dut_d (
    .clk (clk), .rst (rst), .in_stb (in_stb), .x_in (x_in), .y_out (y_d), .load (load_d));
  fir_filter #(.WAVELET(HAAR), .FILTER(H0), .OUT_W(8)) dut_h (
    .clk (clk), .rst (rst), .in_stb (in_stb), .x_in (x_in), .y_out (y_h), .load (load_h));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sat_seen = 0;
  longint hist [4];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; in_stb = 1'b0; x_in = '0;
    hist = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      automatic logic go = ($urandom_range(0, 2) != 0);
      in_stb = go;
      x_in   = (i % 50 < 5) ? 9'sd255 : 9'(signed'($urandom_range(0, 511)) - 256);
      @(posedge clk); #1;
      in_stb = 1'b0;
      check("load_d", longint'(load_d), longint'(go));
      check("load_h", longint'(load_h), longint'(go));
      if (go) begin
        automatic longint ad = 0, ah = 0, eh;
        for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'(x_in);
        for (int k = 0; k < 4; k++) ad += qcoef(1, 1, k) * hist[k];
        for (int k = 0; k < 2; k++) ah += qcoef(0, 0, k) * hist[k];
        check("y_d", longint'(y_d), round_sat(ad, 12, 12));
        eh = round_sat(ah, 12, 8);
        if (eh == 127) sat_seen++;
        check("y_h", longint'(y_h), eh);
      end
      // Idle cycle: load must drop again.
      if ($urandom_range(0, 1) == 1) begin
        @(posedge clk); #1;
        check("load idle", longint'({63'd0, load_d | load_h}), 0);
      end
    end
    checks++; if (sat_seen == 0) failures++;
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
