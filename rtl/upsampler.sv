// upsampler: two-state machine that inserts a zero between sub-band samples.
//
// Each load pulse advances the state. When the new state is 1 the current
// input sample is registered onto u_out; when it is 0 a zero is registered
// instead. u_stb pulses in the cycle after each load pulse, when u_out is new.
// With one load pulse per full-rate sample period the output is
//   u[n] = y[n/2] for even n, 0 for odd n.
// The state machine and its load input follow the document; passing on the
// new state 1 (so that it runs in phase with the decimator's counter, which
// also keeps on the new state 1) is this design's choice. Synchronous,
// active-high reset to state 0 with a zero output.
module upsampler #(
  parameter int W = dwt_pkg::DEF_SUB_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] u_out,
  output logic                u_stb
);

  typedef enum logic {ZERO = 1'b0, PASS = 1'b1} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ZERO;
      u_out <= '0;
      u_stb <= 1'b0;
    end else begin
      u_stb <= load;
      if (load) begin
        state <= (state == ZERO) ? PASS : ZERO;
        u_out <= (state == ZERO) ? y_in : '0;
      end
    end
  end

endmodule
