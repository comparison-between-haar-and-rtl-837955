// tb_serial_out: a random sample is loaded every 8 cycles; the following 8
// cycles must show its bits on x_out, MSB first.
module tb_serial_out;
  logic clk = 1'b0, rst, x_stb, x_out;
  logic [7:0] x_par, s;
  serial_out #(.SAMPLE_W(8)) dut (.clk (clk), .rst (rst), .x_stb (x_stb), .x_par (x_par), .x_out (x_out));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    rst = 1'b1; x_stb = 1'b0; x_par = '0;
    @(posedge clk); #1 rst = 1'b0;
    checks++; if (x_out !== 1'b0) failures++;
    for (int n = 0; n < 300; n++) begin
      s = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        x_stb = (b == 0);
        x_par = (b == 0) ? s : 8'($urandom);
        @(posedge clk); #1;
        checks++; if (x_out !== s[7-b]) failures++;
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
