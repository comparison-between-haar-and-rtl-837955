// tb_dwt_system: serial-in, serial-out reconstruction of one wavelet system.
//
// A default (Daubechies-4) and a Haar system receive random 8-bit samples,
// MSB first, one bit per clock, starting right after reset. Every output bit
// must equal the input bit LATENCY cycles earlier, LATENCY = 8 * D + 13 with
// D = 3 (Daubechies-4) or 1 (Haar). The 12-bit L and H buses between the
// forward and inverse transforms are also checked against L and H computed
// here from the samples (H0/H1 filtering, rounding to 2 fraction bits,
// keeping samples 0, 2, 4, ...).
module tb_dwt_system;
  import dwt_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS = 600;
  localparam int NB = NS * 8;
  localparam int LAT_D = 8 * 3 + 13;
  localparam int LAT_H = 8 * 1 + 13;

  logic clk = 1'b0, reset, xd, xh, od, oh;

  dwt_system dut_d (.clk_in (clk), .reset (reset), .xin (xd), .x_out (od));
  dwt_system #(.WAVELET(HAAR)) dut_h (.clk_in (clk), .reset (reset), .xin (xh), .x_out (oh));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint sd [NS];
  longint sh [NS];
  logic bd [NB];
  logic bh [NB];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Sub-band reference for sample n of stream s (wavelet w, band f).
  function automatic longint band(int w, int f, int n);
    longint a = 0;
    for (int k = 0; k < ntaps(w); k++)
      if (n - k >= 0) a += qcoef(w, f, k) * ((w == 1) ? sd[n-k] : sh[n-k]);
    return round_sat(a, 12, 12);
  endfunction

  // Each pacing pulse of the forward transform (one per input sample n)
  // must find L and H holding the bands of the newest even-numbered sample.
  int nd = 0;
  always @(negedge clk) begin
    if (!reset && dut_d.sb_stb) begin
      automatic int m = nd - (nd % 2);
      check("L daub", longint'(dut_d.l), band(1, 0, m));
      check("H daub", longint'(dut_d.h), band(1, 1, m));
      check("L haar", longint'(dut_h.l), band(0, 0, m));
      check("H haar", longint'(dut_h.h), band(0, 1, m));
      nd++;
    end
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      sd[n] = longint'($urandom_range(0, 255));
      sh[n] = (n % 30 < 4) ? 255 : longint'($urandom_range(0, 255));
      for (int b = 0; b < 8; b++) begin
        bd[n*8 + b] = sd[n][7-b];
        bh[n*8 + b] = sh[n][7-b];
      end
    end
    reset = 1'b1; xd = 1'b0; xh = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int t = 0; t < NB + LAT_D; t++) begin
      xd = (t < NB) ? bd[t] : 1'b0;
      xh = (t < NB) ? bh[t] : 1'b0;
      @(posedge clk); #1;
      if (t >= LAT_D && t - LAT_D < NB) check("daub bit", longint'(od), longint'(bd[t - LAT_D]));
      if (t >= LAT_H && t - LAT_H < NB) check("haar bit", longint'(oh), longint'(bh[t - LAT_H]));
    end
    check("sub-band samples seen", longint'(nd >= NS), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NB + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
