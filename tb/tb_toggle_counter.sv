// tb_toggle_counter: random advance pulses against a 1-bit reference count.
// keep must be high exactly on the advances whose new state is 1.
module tb_toggle_counter;
  logic clk = 1'b0, rst, adv, q, keep;
  toggle_counter dut (.clk (clk), .rst (rst), .adv (adv), .q (q), .keep (keep));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_adv = 0;
  initial begin
    rst = 1'b1; adv = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      adv = $urandom_range(0, 1) == 1;
      #1;
      checks++; if (keep !== (adv && (n_adv % 2 == 0))) failures++;
      @(posedge clk); #1;
      if (adv) n_adv++;
      checks++; if (q !== (n_adv % 2 == 1)) failures++;
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
