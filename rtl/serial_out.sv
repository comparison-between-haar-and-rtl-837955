// serial_out: parallel-to-serial converter for the 1-bit sample output.
//
// x_stb loads x_par into a shift register whose most significant bit drives
// x_out from the next cycle on; every other cycle the register shifts left by
// one bit, filling with zeros. With one x_stb every SAMPLE_W cycles the
// output is a continuous MSB-first bit stream. x_out is 0 after reset until
// the first sample is loaded. The 1-bit port follows the document; bit order
// is this design's choice.
module serial_out #(
  parameter int SAMPLE_W = dwt_pkg::DEF_SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                x_stb,
  input  logic [SAMPLE_W-1:0] x_par,
  output logic                x_out
);

  logic [SAMPLE_W-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)        sr <= '0;
    else if (x_stb) sr <= x_par;
    else            sr <= {sr[SAMPLE_W-2:0], 1'b0};
  end

  assign x_out = sr[SAMPLE_W-1];

endmodule
