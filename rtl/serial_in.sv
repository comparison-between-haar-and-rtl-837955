// serial_in: serial-to-parallel converter for the 1-bit sample input.
//
// One bit of xin is sampled per clock, most significant bit first. A bit
// counter, cleared by reset, frames the stream: after every SAMPLE_W bits the
// assembled sample appears on x_par with a one-cycle x_stb, in the cycle
// after its last bit was sampled. The 1-bit port follows the document; bit
// order and framing from reset are this design's choice.
module serial_in #(
  parameter int SAMPLE_W = dwt_pkg::DEF_SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                xin,
  output logic [SAMPLE_W-1:0] x_par,
  output logic                x_stb
);

  logic [SAMPLE_W-2:0]         sr;
  logic [$clog2(SAMPLE_W)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr    <= '0;
      cnt   <= '0;
      x_par <= '0;
      x_stb <= 1'b0;
    end else begin
      sr    <= {sr[SAMPLE_W-3:0], xin};
      x_stb <= 1'b0;
      if (cnt == $clog2(SAMPLE_W)'(SAMPLE_W - 1)) begin
        cnt   <= '0;
        x_par <= {sr, xin};
        x_stb <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
