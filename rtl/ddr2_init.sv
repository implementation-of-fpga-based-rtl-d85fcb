// ddr2_init: DDR2 power-up initialisation sequencer.
//
// After reset it plays a fixed list of commands, each followed by a wait of a
// given number of clock cycles, and then raises `done` for good. The list is
// the standard DDR2 power-up sequence:
//    0  CKE low, deselect           wait T_POWERUP (200 us)
//    1  CKE high, NOP               wait T_NOP400  (400 ns)
//    2  PRECHARGE ALL (A10 = 1)     wait T_RP
//    3  EMRS(2) = 0                 wait T_MRD
//    4  EMRS(3) = 0                 wait T_MRD
//    5  EMRS(1): DLL on, OCD exit   wait T_MRD
//    6  MRS with DLL reset          wait T_MRD
//    7  PRECHARGE ALL               wait T_RP
//    8  REFRESH                     wait T_RFC
//    9  REFRESH                     wait T_RFC
//   10  MRS without DLL reset       wait T_DLL (200 cycles of DLL lock)
//   11  EMRS(1): OCD default        wait T_MRD
//   12  EMRS(1): OCD exit           wait T_MRD
// The state diagram this controller follows names only the "initialization
// sequence", "setting MRS/EMRS" and "OCD default" steps; the command list,
// the mode register bit fields and the waits are the DDR2 standard's, chosen
// here. The mode register sets burst length BL (4), sequential bursts, CAS
// latency CL and write recovery WR for auto precharge; EMRS(1) enables the
// DLL, full drive strength, 75 ohm on-die termination, additive latency 0 and
// disables DQS# (the device uses a single-ended DQS).
// Outputs are registered: a command appears on `cmd` for one cycle after the
// rising edge at which it is issued. `cke_hold_low` is high from reset until
// step 1, keeping CKE low during the power-up wait. BA2 and A11-A13 stay
// low throughout: no mode register value used here sets them.
module ddr2_init
  import ddr2_pkg::*;
#(
  parameter int unsigned T_POWERUP = 25000,  // 200 us at 125 MHz
  parameter int unsigned T_NOP400  = 50,     // 400 ns at 125 MHz
  parameter int unsigned T_RP      = 3,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned T_RFC     = 16,
  parameter int unsigned T_DLL     = 200,
  parameter int unsigned CL        = 3,      // CAS latency
  parameter int unsigned WR        = 2       // write recovery, cycles (15 ns)
) (
  input  logic              clk,
  input  logic              rst_n,
  output ddr2_cmd_e         cmd,
  output logic              cke_hold_low,
  output logic [BA_W-1:0]   ba,
  output logic [ADDR_W-1:0] addr,
  output logic              done
);

  localparam int unsigned NSTEP = 13;
  localparam int unsigned WMAX  =
      (T_POWERUP > T_DLL ? T_POWERUP : T_DLL) + T_NOP400 + T_RFC + T_RP + T_MRD;
  localparam int unsigned WW    = $clog2(WMAX + 1);

  // Mode register: A12 PD=0, A11:A9 WR-1, A8 DLL reset, A7 TM=0,
  // A6:A4 CL, A3 sequential, A2:A0 burst length (010 = 4).
  localparam logic [ADDR_W-1:0] MR_BASE =
      ADDR_W'((((WR - 1) & 7) << 9) | ((CL & 7) << 4) | 2);
  localparam logic [ADDR_W-1:0] MR_DLL_RST = MR_BASE | ADDR_W'(1 << 8);
  // EMR(1): A10 DQS# disable, A9:A7 OCD, A6/A2 Rtt = 01 (75 ohm), A0 DLL on.
  localparam logic [ADDR_W-1:0] EMR1_BASE    = ADDR_W'((1 << 10) | (1 << 2));
  localparam logic [ADDR_W-1:0] EMR1_OCD_DEF = EMR1_BASE | ADDR_W'(7 << 7);

  typedef struct packed {
    ddr2_cmd_e         cmd;
    logic [BA_W-1:0]   ba;
    logic [ADDR_W-1:0] addr;
    logic [WW-1:0]     wait_cyc;
  } step_t;

  function automatic step_t step_of(int unsigned s);
    step_t t;
    t = '{cmd: CMD_NOP, ba: '0, addr: '0, wait_cyc: WW'(T_MRD)};
    unique case (s)
      0:  begin t.cmd = CMD_PDN_EN;   t.wait_cyc = WW'(T_POWERUP); end
      1:  begin t.cmd = CMD_CKE_EXIT; t.wait_cyc = WW'(T_NOP400);  end
      2:  begin t.cmd = CMD_PRE; t.addr[10] = 1'b1; t.wait_cyc = WW'(T_RP); end
      3:  begin t.cmd = CMD_LMR; t.ba = BA_W'(2); end
      4:  begin t.cmd = CMD_LMR; t.ba = BA_W'(3); end
      5:  begin t.cmd = CMD_LMR; t.ba = BA_W'(1); t.addr = EMR1_BASE; end
      6:  begin t.cmd = CMD_LMR; t.ba = BA_W'(0); t.addr = MR_DLL_RST; end
      7:  begin t.cmd = CMD_PRE; t.addr[10] = 1'b1; t.wait_cyc = WW'(T_RP); end
      8:  begin t.cmd = CMD_REFRESH; t.wait_cyc = WW'(T_RFC); end
      9:  begin t.cmd = CMD_REFRESH; t.wait_cyc = WW'(T_RFC); end
      10: begin t.cmd = CMD_LMR; t.ba = BA_W'(0); t.addr = MR_BASE; t.wait_cyc = WW'(T_DLL); end
      11: begin t.cmd = CMD_LMR; t.ba = BA_W'(1); t.addr = EMR1_OCD_DEF; end
      default: begin t.cmd = CMD_LMR; t.ba = BA_W'(1); t.addr = EMR1_BASE; end
    endcase
    return t;
  endfunction

  logic [$clog2(NSTEP+1)-1:0] step;   // next step to issue
  logic [WW-1:0]              wcnt;   // cycles left before the next step
  step_t                      cur;

  assign cur = step_of(int'(step));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step         <= '0;
      wcnt         <= '0;
      cmd          <= CMD_PDN_EN;
      cke_hold_low <= 1'b1;
      ba           <= '0;
      addr         <= '0;
      done         <= 1'b0;
    end else begin
      cmd  <= CMD_NOP;
      ba   <= '0;
      addr <= '0;
      if (wcnt != '0) begin
        wcnt <= wcnt - 1'b1;
        if (cke_hold_low) cmd <= CMD_DESELECT;
      end else if (int'(step) < NSTEP) begin
        cmd  <= cur.cmd;
        ba   <= cur.ba;
        addr <= cur.addr;
        wcnt <= cur.wait_cyc - 1'b1;
        step <= step + 1'b1;
        if (cur.cmd == CMD_CKE_EXIT) cke_hold_low <= 1'b0;
      end else begin
        done <= 1'b1;
      end
    end
  end

  initial begin
    assert (T_POWERUP >= 1 && T_NOP400 >= 1 && T_RP >= 1 && T_MRD >= 1 &&
            T_RFC >= 1 && T_DLL >= 1)
      else $error("ddr2_init: every wait must be at least one cycle");
  end

endmodule
