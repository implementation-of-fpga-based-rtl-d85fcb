// ddr2_iddr: double-data-rate input register.
//
// Captures the wire `d` at both edges of `clk`: the value at the rising edge
// goes to `q_rise`, the value at the falling edge to `q_fall`. In the read
// path the capture clock is the 90-degree-shifted controller clock, so each
// sample is taken in the middle of a data beat that the memory launches at a
// clock edge (a choice of this design; the document does not describe the
// read capture). On an FPGA this module maps onto the DDR input flip-flop.
module ddr2_iddr #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_rise,
  output logic [W-1:0] q_fall
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_rise <= '0;
    else        q_rise <= d;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_fall <= '0;
    else        q_fall <= d;
  end

endmodule
