// load_register: n-bit parallel-load register.
//
// Stores d on the clock edge when load is high and holds q otherwise, so the
// filter outputs that arrive while load is low are discarded. Synchronous,
// active-high reset to zero (a choice of this design).
module load_register #(
  parameter int W = dwt_pkg::DEF_SUB_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
