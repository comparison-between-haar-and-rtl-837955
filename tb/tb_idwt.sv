// tb_idwt: inverse transform fed by a reference forward transform.
//
// The testbench computes L and H of a random 8-bit sample stream itself
// (H0/H1 filtering, rounding to 12 bits with 2 fraction bits, keeping samples
// 0, 2, 4, ...) and presents them the way a decimator holds them, with one
// stb pulse per sample every 2 to 8 cycles. Perfect reconstruction requires
// the output after sample n to equal input sample n - D (D = 3 for
// Daubechies-4, 1 for Haar; zero before the stream starts), with x_stb
// exactly three cycles after stb.
module tb_idwt;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 1500;

  logic clk = 1'b0, rst, stb;
  logic signed [11:0] l_d, h_d, l_h, h_h;
  logic [7:0] xd, xh;
  logic sd, sh;

  idwt #(.WAVELET(DAUB4)) dut_d (
    .clk (clk), .rst (rst), .stb (stb), .l_in (l_d), .h_in (h_d), .x_out (xd), .x_stb (sd));
  idwt #(.WAVELET(HAAR)) dut_h (
    .clk (clk), .rst (rst), .stb (stb), .l_in (l_h), .h_in (h_h), .x_out (xh), .x_stb (sh));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint x [N];
  longint hist [4];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint band(int w, int f);
    longint a = 0;
    for (int k = 0; k < ntaps(w); k++) a += qcoef(w, f, k) * hist[k];
    return round_sat(a, 12, 12);
  endfunction

  initial begin
    rst = 1'b1; stb = 1'b0;
    l_d = '0; h_d = '0; l_h = '0; h_h = '0;
    for (int j = 0; j < 4; j++) hist[j] = 0;
    for (int n = 0; n < N; n++) x[n] = (n % 40 < 6) ? ((n % 2 == 1) ? 255 : 0) : longint'($urandom_range(0, 255));
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = x[n];
      if (n % 2 == 0) begin
        l_d = 12'(band(1, 0)); h_d = 12'(band(1, 1));
        l_h = 12'(band(0, 0)); h_h = 12'(band(0, 1));
      end
      stb = 1'b1;
      @(posedge clk); #1;
      stb = 1'b0;
      @(posedge clk); #1;
      check("x_stb early", longint'({63'd0, sd | sh}), 0);
      @(posedge clk); #1;
      check("x_stb", longint'({63'd0, sd & sh}), 1);
      check("daub", longint'(xd), (n >= 3) ? x[n-3] : 0);
      check("haar", longint'(xh), (n >= 1) ? x[n-1] : 0);
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
