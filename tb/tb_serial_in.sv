// tb_serial_in: random bits, one per clock; after every 8th bit x_stb must
// pulse for one cycle with the last 8 bits, MSB first, on x_par.
module tb_serial_in;
  logic clk = 1'b0, rst, xin, x_stb;
  logic [7:0] x_par, exp_s;
  serial_in #(.SAMPLE_W(8)) dut (.clk (clk), .rst (rst), .xin (xin), .x_par (x_par), .x_stb (x_stb));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    rst = 1'b1; xin = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      exp_s = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        xin = exp_s[7-b];
        @(posedge clk); #1;
        checks++;
        if (x_stb !== (b == 7)) failures++;
      end
      checks++; if (x_par !== exp_s) failures++;
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
