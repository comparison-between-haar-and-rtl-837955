// toggle_counter: the 1-bit counter of the decimator.
//
// Each cycle with adv high (the FIR's load pulse) the counter advances to its
// other state. 'keep' is high in exactly those advancing cycles whose new
// state is 1; it is the parallel-load register's load enable, so the first,
// third, fifth, ... filter outputs after reset are stored and the others are
// discarded. q is the registered state. Reset (synchronous, active high) sets
// the state to 0. In the document the load pin clocks the counter; here the
// whole design shares one clock and adv is an enable.
module toggle_counter (
  input  logic clk,
  input  logic rst,
  input  logic adv,
  output logic q,
  output logic keep
);

  assign keep = adv & ~q;

  always_ff @(posedge clk) begin
    if (rst)      q <= 1'b0;
    else if (adv) q <= ~q;
  end

endmodule
