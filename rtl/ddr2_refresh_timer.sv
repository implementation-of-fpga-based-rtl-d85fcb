// ddr2_refresh_timer: periodic auto-refresh request.
//
// Every row of a DDR2 device must be refreshed within 64 ms. The device
// refreshes 8192 rows per 64 ms window, one batch per REFRESH command, so the
// controller has to issue one REFRESH on average every 64 ms / 8192 = 7.8 us
// (tREFI). This timer counts T_REFI clock cycles while enabled and then raises
// `req`. The request stays high until the controller pulses `ack` (in the
// cycle it issues the REFRESH); up to MAX_PEND intervals may elapse before the
// request is served, the count of owed refreshes is kept in `pending`, and
// `req` stays up until all are paid back. The 64 ms retention time is the
// document's; the 8192-command split, the 125 MHz clock that makes
// T_REFI = 975 cycles, and the postponement counter are this design's choices.
module ddr2_refresh_timer #(
  parameter int unsigned T_REFI   = 975,  // clock cycles between refreshes
  parameter int unsigned MAX_PEND = 8     // refreshes that may be owed
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,       // count only once the device is initialised
  input  logic ack,      // a REFRESH was issued this cycle
  output logic req,      // at least one refresh is owed
  output logic overflow, // sticky: more than MAX_PEND refreshes were owed
  output logic [$clog2(MAX_PEND+1)-1:0] pending
);

  localparam int unsigned CW = $clog2(T_REFI);
  localparam int unsigned PW = $clog2(MAX_PEND + 1);

  logic [CW-1:0] cnt;
  logic          tick;

  assign tick = en && (cnt == CW'(T_REFI - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (!en || tick) begin
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= '0;
      overflow <= 1'b0;
    end else begin
      unique case ({tick, ack && (pending != '0)})
        2'b10: begin
          if (pending == PW'(MAX_PEND)) overflow <= 1'b1;
          else                          pending  <= pending + 1'b1;
        end
        2'b01:   pending <= pending - 1'b1;
        default: ;  // tick and ack together, or neither: no change
      endcase
    end
  end

  assign req = (pending != '0);

endmodule
