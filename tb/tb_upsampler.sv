// tb_upsampler: load pulses with random gaps and a new random input for every
// pulse. After the k-th pulse (k = 0, 1, ...) the output must be the input of
// that pulse for even k and zero for odd k, with u_stb one cycle after load.
module tb_upsampler;
  logic clk = 1'b0, rst, load, u_stb;
  logic signed [11:0] y_in, u_out, hold;
  upsampler #(.W(12)) dut (.clk (clk), .rst (rst), .load (load), .y_in (y_in), .u_out (u_out), .u_stb (u_stb));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, k = 0;
  initial begin
    rst = 1'b1; load = 1'b0; y_in = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      load = 1'b1; y_in = 12'($urandom); hold = y_in;
      @(posedge clk); #1;
      load = 1'b0; y_in = 12'($urandom);
      checks++; if (u_stb !== 1'b1) failures++;
      checks++; if (u_out !== ((k % 2 == 0) ? hold : 12'sd0)) failures++;
      k++;
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        checks++; if (u_stb !== 1'b0) failures++;
        checks++; if (u_out !== ((k % 2 == 1) ? hold : 12'sd0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
