// ddr2_controller: DDR2 SDRAM memory controller (top level).
//
// Lets a host store and fetch bursts of data in one DDR2 SDRAM device
// (x16 data bus, 8 banks, 14 row address bits, 10 column bits, burst of 4)
// without knowing the device's command protocol. Blocks:
//   ddr2_init          power-up sequence and mode register programming
//   ddr2_ctrl_fsm      the command state machine (activate, write, read,
//                      precharge, refresh, power-down, self refresh,
//                      mode register set)
//   ddr2_refresh_timer asks for one REFRESH every T_REFI cycles
//   ddr2_cmd_enc       command -> CKE, CS#, RAS#, CAS#, WE# (truth table)
//   ddr2_phy           DQ/DQS/DM/ODT double-data-rate timing, read capture,
//                      CK/CK# forwarding
// Until initialisation is done the command slot comes from ddr2_init, then
// from the state machine. The slot is set at a rising edge of `clk`, encoded,
// and put on the pins at the following falling edge; the device samples it
// at the next rising edge.
//
// Clocks: `clk` runs the controller and the memory clock (CK = clk); `clk90`
// is the same clock delayed by a quarter period, used for DQS and for read
// capture. Both come from a clock manager outside this module.
// Host timing: see ddr2_ctrl_fsm (request taken when `busy` is low).
// A read's burst appears on `data_out` with a one-cycle `data_valid` pulse,
// CL+3 rising edges after the edge at which the state machine issues the
// READ (one cycle until the device samples it, CL cycles of device latency,
// two cycles of capture and re-timing).
// Bidirectional pins are split into output, output enable and input; the
// I/O buffers belong outside. Default timing is DDR2 at 125 MHz (8 ns):
// these values, like the handshake, are choices of this design, not the
// document's.
module ddr2_controller
  import ddr2_pkg::*;
#(
  parameter int unsigned CL        = 3,
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RAS     = 5,
  parameter int unsigned T_RFC     = 14,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_WTR     = 2,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned T_CKE     = 3,
  parameter int unsigned T_XP      = 2,
  parameter int unsigned T_XSRD    = 200,
  parameter int unsigned T_REFI    = 975,
  parameter int unsigned T_POWERUP = 25000,
  parameter int unsigned T_NOP400  = 50,
  parameter int unsigned T_DLL     = 200
) (
  input  logic              clk,
  input  logic              clk90,
  input  logic              rst_n,
  // host
  input  logic              wr,
  input  logic              rd,
  input  logic              mrs,
  input  logic              ap,
  input  logic [BA_W-1:0]   ba,
  input  logic [ADDR_W-1:0] row_addr,
  input  logic [COL_W-1:0]  column_addr,
  input  burst_t            data_in,
  input  burst_mask_t       mask_in,
  output logic              busy,
  output burst_t            data_out,
  output logic              data_valid,
  input  logic              pd_req,
  input  logic              sr_req,
  output logic              init_done,
  output logic              refresh_overflow,
  output ddr2_state_e       state,
  // DDR2 device pins
  output logic              ck,
  output logic              ck_n,
  output logic              cke,
  output logic              cs_n,
  output logic              ras_n,
  output logic              cas_n,
  output logic              we_n,
  output logic [BA_W-1:0]   mem_ba,
  output logic [ADDR_W-1:0] mem_a,
  output logic [DQ_W-1:0]   dq_o,
  output logic              dq_oe,
  input  logic [DQ_W-1:0]   dq_i,
  output logic              dqs_o,
  output logic              dqs_oe,
  output logic [DM_W-1:0]   dm,
  output logic              odt
);

  ddr2_cmd_e         init_cmd, fsm_cmd, slot_cmd;
  logic              cke_d, cs_n_d, ras_n_d, cas_n_d, we_n_d;
  logic [BA_W-1:0]   ba_d;
  logic [ADDR_W-1:0] a_d;
  logic              init_hold, fsm_hold, slot_hold;
  logic [BA_W-1:0]   init_ba, fsm_ba;
  logic [ADDR_W-1:0] init_addr, fsm_addr;
  logic              ref_req, ref_ack;
  logic              wr_issue, rd_issue;
  burst_t            wr_data, rd_data;
  burst_mask_t       wr_mask;

  ddr2_init #(
    .T_POWERUP(T_POWERUP), .T_NOP400(T_NOP400), .T_RP(T_RP), .T_MRD(T_MRD),
    .T_RFC(T_RFC), .T_DLL(T_DLL), .CL(CL), .WR(T_WR)
  ) u_init (
    .clk, .rst_n, .cmd(init_cmd), .cke_hold_low(init_hold), .ba(init_ba),
    .addr(init_addr), .done(init_done)
  );

  ddr2_refresh_timer #(.T_REFI(T_REFI), .MAX_PEND(8)) u_refresh (
    .clk, .rst_n, .en(init_done), .ack(ref_ack), .req(ref_req),
    .overflow(refresh_overflow), .pending()
  );

  ddr2_ctrl_fsm #(
    .CL(CL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_RFC(T_RFC),
    .T_WR(T_WR), .T_WTR(T_WTR), .T_MRD(T_MRD), .T_CKE(T_CKE), .T_XP(T_XP), .T_XSRD(T_XSRD)
  ) u_fsm (
    .clk, .rst_n, .init_done,
    .wr, .rd, .mrs, .ap, .ba, .row_addr, .column_addr, .data_in, .mask_in, .busy,
    .pd_req, .sr_req, .ref_req, .ref_ack,
    .cmd(fsm_cmd), .cke_hold_low(fsm_hold), .ba_o(fsm_ba), .addr_o(fsm_addr),
    .wr_issue, .wr_data, .wr_mask, .rd_issue, .state
  );

  always_comb begin
    if (init_done) begin
      slot_cmd  = fsm_cmd;
      slot_hold = fsm_hold;
      ba_d      = fsm_ba;
      a_d       = fsm_addr;
    end else begin
      slot_cmd  = init_cmd;
      slot_hold = init_hold;
      ba_d      = init_ba;
      a_d       = init_addr;
    end
  end

  ddr2_cmd_enc u_enc (
    .cmd(slot_cmd), .cke_hold_low(slot_hold),
    .cke(cke_d), .cs_n(cs_n_d), .ras_n(ras_n_d), .cas_n(cas_n_d), .we_n(we_n_d)
  );

  ddr2_phy #(.CL(CL)) u_phy (
    .clk, .clk90, .rst_n,
    .wr_issue, .wr_data, .wr_mask, .rd_issue, .rd_data, .rd_valid(data_valid),
    .wr_busy(),
    .cke_d, .cs_n_d, .ras_n_d, .cas_n_d, .we_n_d, .ba_d, .a_d,
    .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba(mem_ba), .a(mem_a),
    .ck, .ck_n, .dq_o, .dq_oe, .dq_i, .dqs_o, .dqs_oe, .dm, .odt
  );

  assign data_out = rd_data;

endmodule
