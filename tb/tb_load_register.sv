// tb_load_register: random data and load enables; q must follow d only on
// cycles with load high, and hold otherwise.
module tb_load_register;
  logic clk = 1'b0, rst, load;
  logic [11:0] d, q, model;
  load_register #(.W(12)) dut (.clk (clk), .rst (rst), .load (load), .d (d), .q (q));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    rst = 1'b1; load = 1'b0; d = '0;
    @(posedge clk); #1 rst = 1'b0;
    model = '0;
    checks++; if (q !== 12'd0) failures++;
    for (int i = 0; i < 500; i++) begin
      load = $urandom_range(0, 1) == 1;
      d    = 12'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++; if (q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
