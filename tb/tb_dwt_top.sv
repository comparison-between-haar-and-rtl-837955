// tb_dwt_top: end-to-end test of the Haar and Daubechies-4 systems.
//
// Both systems run at their default sizes. Each gets its own stream of
// 8-bit samples sent serially, MSB first: an audio-like tone burst with a
// rising and decaying envelope, then uniformly random samples, then full-
// scale square waves (0/255) that drive the filter bank to its extremes.
// Every output bit is compared with the input bit sent LATENCY cycles
// earlier (perfect reconstruction, expected bit error rate zero), with
//   LATENCY = 8 * bank_delay + 13   (Haar 21, Daubechies-4 37 cycles).
// It also checks that each inverse transform produces one sample every 8
// cycles, and counts how often each mechanism of the filter bank happened:
// decimator keeps and discards, up-sampler passes and zero insertions.
module tb_dwt_top;
  import dwt_pkg::*;

  localparam int SW       = DEF_SAMPLE_W;
  localparam int N_TONE   = 1200;
  localparam int N_RAND   = 1200;
  localparam int N_SQ     = 400;
  localparam int NSAMP    = N_TONE + N_RAND + N_SQ;
  localparam int NBITS    = NSAMP * SW;
  localparam int LAT_HAAR = SW * bank_delay(HAAR) + 13;
  localparam int LAT_DAUB = SW * bank_delay(DAUB4) + 13;

  logic clk = 1'b0;
  logic reset;
  logic haar_xin, daub_xin, haar_x_out, daub_x_out;

  dwt_top dut (
    .clk_in (clk), .reset (reset),
    .haar_xin (haar_xin), .haar_x_out (haar_x_out),
    .daub_xin (daub_xin), .daub_x_out (daub_x_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int haar_err = 0, daub_err = 0, haar_bits = 0, daub_bits = 0;
  logic [SW-1:0] hs [NSAMP];
  logic [SW-1:0] ds [NSAMP];
  logic          hb [NBITS];
  logic          db [NBITS];

  // Mechanism counters.
  int keep_cnt = 0, discard_cnt = 0, pass_cnt = 0, zero_cnt = 0;
  int clamp_lo_cnt = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_haar.u_fdwt.u_low.fir_load) begin
      if (dut.u_haar.u_fdwt.u_low.keep) keep_cnt++; else discard_cnt++;
    end
    if (dut.u_daub.u_fdwt.u_low.fir_load) begin
      if (dut.u_daub.u_fdwt.u_low.keep) keep_cnt++; else discard_cnt++;
    end
    if (dut.u_daub.u_idwt.u_high.load) begin
      if (dut.u_daub.u_idwt.u_high.u_up.state == 1'b0) pass_cnt++;
      else zero_cnt++;
    end
  end

  // Output sample rate: one reconstructed sample every SW cycles.
  int last_h = -1, last_d = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!reset && dut.u_haar.y_stb) begin
      if (last_h >= 0) begin checks++; if (cyc - last_h != SW) failures++; end
      last_h = cyc;
    end
    if (!reset && dut.u_daub.y_stb) begin
      if (last_d >= 0) begin checks++; if (cyc - last_d != SW) failures++; end
      last_d = cyc;
    end
  end

  function automatic logic [SW-1:0] tone(int n);
    real env, v;
    env = (n < 100) ? n / 100.0 : $exp(-(n - 100) / 500.0);
    v   = 127.5 + 127.0 * env * $sin(2.0 * 3.14159265 * n / 7.3);
    return SW'($rtoi(v));
  endfunction

  initial begin
    for (int n = 0; n < NSAMP; n++) begin
      if (n < N_TONE) begin
        hs[n] = tone(n);
        ds[n] = tone(n + 37);
      end else if (n < N_TONE + N_RAND) begin
        hs[n] = SW'($urandom);
        ds[n] = SW'($urandom);
      end else begin
        hs[n] = ((n / 3) % 2 == 1) ? '1 : '0;
        ds[n] = ((n / 2) % 2 == 1) ? '1 : '0;
      end
      for (int b = 0; b < SW; b++) begin
        hb[n*SW + b] = hs[n][SW-1-b];
        db[n*SW + b] = ds[n][SW-1-b];
      end
    end
  end

  initial begin
    reset = 1'b1; haar_xin = 1'b0; daub_xin = 1'b0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    // Bit t is sampled at the t-th rising edge after reset is released;
    // after that edge, output bit t - LATENCY is on x_out.
    for (int t = 0; t < NBITS + LAT_DAUB + 2; t++) begin
      haar_xin = (t < NBITS) ? hb[t] : 1'b0;
      daub_xin = (t < NBITS) ? db[t] : 1'b0;
      @(posedge clk); #1;
      if (t - LAT_HAAR >= 0 && t - LAT_HAAR < NBITS) begin
        checks++; haar_bits++;
        if (haar_x_out !== hb[t - LAT_HAAR]) begin
          haar_err++; failures++;
          if (haar_err < 5) $display("haar mismatch at bit %0d", t - LAT_HAAR);
        end
      end
      if (t - LAT_DAUB >= 0 && t - LAT_DAUB < NBITS) begin
        checks++; daub_bits++;
        if (daub_x_out !== db[t - LAT_DAUB]) begin
          daub_err++; failures++;
          if (daub_err < 5) $display("daub mismatch at bit %0d", t - LAT_DAUB);
        end
      end
    end
    $display("Haar: %0d bits, %0d errors, BER %f", haar_bits, haar_err, real'(haar_err) / haar_bits);
    $display("Daubechies-4: %0d bits, %0d errors, BER %f", daub_bits, daub_err, real'(daub_err) / daub_bits);
    $display("keeps %0d discards %0d passes %0d zero-inserts %0d", keep_cnt, discard_cnt, pass_cnt, zero_cnt);
    checks++; if (keep_cnt == 0)    begin failures++; $display("no decimator keep seen"); end
    checks++; if (discard_cnt == 0) begin failures++; $display("no decimator discard seen"); end
    checks++; if (pass_cnt == 0)    begin failures++; $display("no up-sampler pass seen"); end
    checks++; if (zero_cnt == 0)    begin failures++; $display("no zero insertion seen"); end
    checks++; if (haar_bits != NBITS || daub_bits != NBITS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBITS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
