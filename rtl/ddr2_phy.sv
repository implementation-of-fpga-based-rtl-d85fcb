// ddr2_phy: DDR2 data path and pin timing.
//
// Write side. When the sequencer issues a WRITE it raises `wr_issue` for the
// cycle in which the command is on the pins, together with the whole burst
// (`wr_data`, BL beats of DQ_W bits) and its byte masks. The burst enters a
// shift register WL+1 stages deep, so that the first data beat leaves on the
// rising clock edge that is WL cycles after the memory samples the command
// (write latency WL = CL - 1). DQ and DM are driven through DDR output
// registers on `clk`: two beats per clock period. DQS is driven through a DDR
// output register on `clk90`, so each DQS edge falls in the middle of its
// data beat, as the memory's write capture needs. DQS is driven low for one
// cycle before the first beat (preamble) and for half a cycle after the last
// (postamble). ODT is raised from the write command until the burst has left.
//
// Read side. On `rd_issue` a token enters a CL+2 deep shift register. The
// memory returns beat 0 on the rising edge CL cycles after it samples the
// READ; each beat is captured in its middle by DDR input registers on `clk90`,
// moved to `clk` one cycle later, and after the last pair `rd_valid` pulses
// for one cycle with the whole burst on `rd_data`: CL+2 rising edges after
// the edge that sampled `rd_issue` (the edge at which the device takes the
// READ).
//
// CK/CK# are forwarded through DDR output registers (1/0 and 0/1) so they
// have the same output delay as the data. The command and address pins
// (CKE, CS#, RAS#, CAS#, WE#, BA, A) are re-registered on the falling edge of
// `clk`, half a period after the sequencer sets them, so they are centred on
// the rising CK edge at which the device samples them. Pads are outside: every bidirectional
// pin appears as an output value, an output enable and an input value.
// The document names DQ, DQS, DM, ODT and CK/CK#; the write/read latencies,
// the 90-degree capture clock and the DQS/ODT windows are this design's
// choices following the DDR2 standard. A high DM bit masks its byte (the
// standard's polarity).
module ddr2_phy
  import ddr2_pkg::*;
#(
  parameter int unsigned CL = 3  // CAS latency; write latency is CL-1
) (
  input  logic                 clk,
  input  logic                 clk90,    // clk delayed by a quarter period
  input  logic                 rst_n,
  // from the sequencer
  input  logic                 wr_issue,
  input  burst_t               wr_data,
  input  burst_mask_t          wr_mask,  // 1 = do not write this byte
  input  logic                 rd_issue,
  output burst_t               rd_data,
  output logic                 rd_valid,
  output logic                 wr_busy,  // a write burst is still in flight
  // command slot from the encoder (changes after the rising edge)
  input  logic                 cke_d,
  input  logic                 cs_n_d,
  input  logic                 ras_n_d,
  input  logic                 cas_n_d,
  input  logic                 we_n_d,
  input  logic [BA_W-1:0]      ba_d,
  input  logic [ADDR_W-1:0]    a_d,
  // memory pins
  output logic                 cke,
  output logic                 cs_n,
  output logic                 ras_n,
  output logic                 cas_n,
  output logic                 we_n,
  output logic [BA_W-1:0]      ba,
  output logic [ADDR_W-1:0]    a,
  output logic                 ck,
  output logic                 ck_n,
  output logic [DQ_W-1:0]      dq_o,
  output logic                 dq_oe,
  input  logic [DQ_W-1:0]      dq_i,
  output logic                 dqs_o,
  output logic                 dqs_oe,
  output logic [DM_W-1:0]      dm,
  output logic                 odt
);

  localparam int unsigned WL = CL - 1;

  typedef struct packed {
    logic        valid;
    burst_t      data;
    burst_mask_t mask;
  } wstage_t;

  // ---------------- write path ----------------
  wstage_t       wpipe [WL+1];
  logic [DQ_W-1:0] dq_rise, dq_fall;
  logic [DM_W-1:0] dm_rise, dm_fall;
  logic            wr_beats01, wr_beats23;
  logic            dq_drive, dqs_active, dqs_win, dqs_oe_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= WL; i++) wpipe[i] <= '0;
    end else begin
      wpipe[0] <= '{valid: wr_issue, data: wr_data, mask: wr_mask};
      for (int i = 1; i <= WL; i++) wpipe[i] <= wpipe[i-1];
    end
  end

  assign wr_beats01 = wpipe[WL-1].valid;
  assign wr_beats23 = wpipe[WL].valid;

  always_comb begin
    dq_rise = '0;
    dq_fall = '0;
    dm_rise = '0;
    dm_fall = '0;
    if (wr_beats01) begin
      dq_rise = wpipe[WL-1].data[0];
      dq_fall = wpipe[WL-1].data[1];
      dm_rise = wpipe[WL-1].mask[0];
      dm_fall = wpipe[WL-1].mask[1];
    end else if (wr_beats23) begin
      dq_rise = wpipe[WL].data[2];
      dq_fall = wpipe[WL].data[3];
      dm_rise = wpipe[WL].mask[2];
      dm_fall = wpipe[WL].mask[3];
    end
  end

  ddr2_oddr #(.W(DQ_W)) u_dq_oddr (.clk(clk), .rst_n(rst_n), .d_rise(dq_rise), .d_fall(dq_fall), .q(dq_o));
  ddr2_oddr #(.W(DM_W)) u_dm_oddr (.clk(clk), .rst_n(rst_n), .d_rise(dm_rise), .d_fall(dm_fall), .q(dm));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_drive   <= 1'b0;
      dqs_active <= 1'b0;
      dqs_win    <= 1'b0;
      odt        <= 1'b0;
    end else begin
      dq_drive   <= wr_beats01 | wr_beats23;
      dqs_active <= wr_beats01 | wr_beats23;
      dqs_win    <= wpipe[WL-2].valid | wr_beats01 | wr_beats23;
      odt        <= wr_issue | wr_busy;
    end
  end

  assign dq_oe = dq_drive;

  // DQS toggles 1/0 within each clk90 period while a burst is on DQ.
  ddr2_oddr #(.W(1)) u_dqs_oddr (.clk(clk90), .rst_n(rst_n), .d_rise(dqs_active), .d_fall(1'b0), .q(dqs_o));

  always_ff @(posedge clk90 or negedge rst_n) begin
    if (!rst_n) dqs_oe_q <= 1'b0;
    else        dqs_oe_q <= dqs_win;
  end
  assign dqs_oe = dqs_oe_q;

  always_comb begin
    wr_busy = 1'b0;
    for (int i = 0; i <= WL; i++) wr_busy |= wpipe[i].valid;
  end

  // ---------------- command / address ----------------
  // Launched on the falling edge: stable half a period before and after the
  // rising CK edge at which the device samples them.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {cke, cs_n, ras_n, cas_n, we_n} <= 5'b01111;
      ba <= '0;
      a  <= '0;
    end else begin
      {cke, cs_n, ras_n, cas_n, we_n} <= {cke_d, cs_n_d, ras_n_d, cas_n_d, we_n_d};
      ba <= ba_d;
      a  <= a_d;
    end
  end

  // ---------------- clock forwarding ----------------
  ddr2_oddr #(.W(1)) u_ck_oddr  (.clk(clk), .rst_n(rst_n), .d_rise(1'b1), .d_fall(1'b0), .q(ck));
  ddr2_oddr #(.W(1)) u_ckn_oddr (.clk(clk), .rst_n(rst_n), .d_rise(1'b0), .d_fall(1'b1), .q(ck_n));

  // ---------------- read path ----------------
  logic [CL+1:0]   rpipe;
  logic [DQ_W-1:0] cap_rise, cap_fall;
  logic [1:0][DQ_W-1:0] rbuf;   // beats 0 and 1 of the burst in flight

  ddr2_iddr #(.W(DQ_W)) u_dq_iddr (.clk(clk90), .rst_n(rst_n), .d(dq_i), .q_rise(cap_rise), .q_fall(cap_fall));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rpipe    <= '0;
      rbuf     <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rpipe    <= {rpipe[CL:0], rd_issue};
      rd_valid <= 1'b0;
      if (rpipe[CL]) begin
        rbuf[0] <= cap_rise;
        rbuf[1] <= cap_fall;
      end
      if (rpipe[CL+1]) begin
        rd_data  <= '{cap_fall, cap_rise, rbuf[1], rbuf[0]};
        rd_valid <= 1'b1;
      end
    end
  end

  initial begin
    assert (CL >= 3) else $error("ddr2_phy: CL must be at least 3 (WL >= 2)");
  end

endmodule
