// ddr2_oddr: double-data-rate output register.
//
// Sends two values per clock period on one set of wires: `d_rise` is shown
// from a rising edge to the next falling edge and `d_fall` from that falling
// edge to the next rising edge. Both are sampled at the rising edge; `d_fall`
// is held in a rising-edge register until the falling edge. The output is the
// XOR of one rising-edge and one falling-edge register, each edge storing
// the wanted value XOR the other register: the output changes only at clock
// edges, never passes the clock itself to the data, and needs no vendor DDR
// primitive (an FPGA's DDR output flip-flop may replace this module).
// The DDR output technique is this design's choice; the document only asks
// for a double-data-rate bus.
// Latency: values presented before rising edge n appear from edge n to n+1.
module ddr2_oddr #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_rise,
  input  logic [W-1:0] d_fall,
  output logic [W-1:0] q
);

  logic [W-1:0] q_pos, q_neg, fall_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_pos     <= '0;
      fall_hold <= '0;
    end else begin
      q_pos     <= d_rise ^ q_neg;
      fall_hold <= d_fall;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_neg <= '0;
    else        q_neg <= fall_hold ^ q_pos;
  end

  assign q = q_pos ^ q_neg;

endmodule
