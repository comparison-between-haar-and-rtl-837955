// tb_fdwt: forward transform, both bands, against a reference.
//
// A Daubechies-4 and a Haar forward transform take the same random samples,
// one every 3 to 8 cycles. For every sample the reference filters it with H0
// and H1 (rounded to 12 bits with 2 fraction bits) and keeps the outputs of
// samples 0, 2, 4, ...; stb must pulse two cycles after x_stb, with l_out and
// h_out equal to the kept values.
module tb_fdwt;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst, x_stb;
  logic [7:0] x_in;
  logic signed [11:0] ld, hd, lh, hh;
  logic sd, sh;

  fdwt #(.WAVELET(DAUB4)) dut_d (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in), .l_out (ld), .h_out (hd), .stb (sd));
  fdwt #(.WAVELET(HAAR)) dut_h (
    .clk (clk), .rst (rst), .x_stb (x_stb), .x_in (x_in), .l_out (lh), .h_out (hh), .stb (sh));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint hist [4];
  longint e [2][2];   // [wavelet][band]

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; x_stb = 1'b0; x_in = '0;
    for (int j = 0; j < 4; j++) hist[j] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      x_stb = 1'b1; x_in = (n % 20 < 4) ? 8'hff : 8'($urandom);
      for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = longint'(x_in);
      if (n % 2 == 0) begin
        for (int w = 0; w < 2; w++) begin
          for (int f = 0; f < 2; f++) begin
            automatic longint a = 0;
            for (int k = 0; k < ntaps(w); k++) a += qcoef(w, f, k) * hist[k];
            e[w][f] = round_sat(a, 12, 12);
          end
        end
      end
      @(posedge clk); #1;
      x_stb = 1'b0;
      check("stb early", longint'({63'd0, sd | sh}), 0);
      @(posedge clk); #1;
      check("stb", longint'({63'd0, sd & sh}), 1);
      check("L daub", longint'(ld), e[1][0]);
      check("H daub", longint'(hd), e[1][1]);
      check("L haar", longint'(lh), e[0][0]);
      check("H haar", longint'(hh), e[0][1]);
      repeat ($urandom_range(1, 6)) @(posedge clk);
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
