// ddr2_ctrl_fsm: command sequencer of the DDR2 controller.
//
// A state machine after the DDR2 state diagram: after the initialisation
// sequence it sits in Idle (all banks precharged). A host request opens its
// row (ACTIVATE -> Activating -> Bank active), then issues WRITE or READ,
// with or without auto precharge (Writing / Reading, Writing / Reading with
// auto precharge). From Writing and Reading the next WRITE or READ to the
// same row follows directly; a request to another row, a due refresh or a
// self refresh request closes the row with PRECHARGE (single bank, or all
// banks with A10 high) and goes through Precharging back to Idle. From Idle it
// issues REFRESH (Refreshing), enters self refresh (SREF, CKE low) or, when
// asked and nothing is pending, precharge power-down (CKE low); from Bank
// active it can enter active power-down. Leaving a CKE-low state takes a
// deselect with CKE high and a wait of T_XP (power-down) or T_XSRD (self
// refresh) cycles. A host mode register request (`mrs`) closes an open row,
// then issues LOAD MODE from Idle and waits tMRD in Setting MRS/EMRS.
//
// One row is open at a time. Priority: refresh, then self refresh, then the
// host request, then power-down. All timing is counted in clock cycles by
// down-counters: a state wait (tRCD, tRP, tRFC, tCCD, the auto-precharge
// delay, tCKE, tXP/tXSRD) and four command spacing counters: to PRECHARGE
// (tRAS, write recovery, read to precharge), to READ (write to read, tCCD),
// to WRITE (read to write, tCCD).
//
// Host interface: present `wr` or `rd` with `ba`, `row_addr`, `column_addr`,
// `ap` (auto precharge) and, for a write, `data_in`/`mask_in` in a cycle in
// which `busy` is low; the request is taken at that rising edge and `busy`
// stays high until its WRITE or READ has been issued. For `mrs` the same
// handshake applies; `ba` selects the register (0 MR, 1..3 EMR(1)..EMR(3))
// and `row_addr` carries its contents. `pd_req` and `sr_req`
// are levels: hold them high to stay in power-down / self refresh.
// All outputs are registered; `cmd`, `ba_o`, `addr_o` form the command slot
// presented to the pins for one cycle, `wr_issue`/`rd_issue` mark the
// WRITE/READ slot for the data path and `ref_ack` the REFRESH slot.
// The document gives the states and the command encodings; the row policy,
// priorities, timing values and host handshake are this design's choices.
module ddr2_ctrl_fsm
  import ddr2_pkg::*;
#(
  parameter int unsigned CL     = 3,
  parameter int unsigned T_RCD  = 2,
  parameter int unsigned T_RP   = 2,
  parameter int unsigned T_RAS  = 5,
  parameter int unsigned T_RFC  = 14,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_WTR  = 2,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned T_CKE  = 3,
  parameter int unsigned T_XP   = 2,
  parameter int unsigned T_XSRD = 200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_done,
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
  input  logic              pd_req,
  input  logic              sr_req,
  // refresh timer
  input  logic              ref_req,
  output logic              ref_ack,
  // command slot
  output ddr2_cmd_e         cmd,
  output logic              cke_hold_low,
  output logic [BA_W-1:0]   ba_o,
  output logic [ADDR_W-1:0] addr_o,
  // data path
  output logic              wr_issue,
  output burst_t            wr_data,
  output burst_mask_t       wr_mask,
  output logic              rd_issue,
  output ddr2_state_e       state
);

  localparam int unsigned WL       = CL - 1;
  localparam int unsigned HB       = BL / 2;          // tCCD, clocks per burst
  localparam int unsigned D_WR2PRE = WL + HB + T_WR;  // WRITE to PRECHARGE
  localparam int unsigned D_RD2PRE = HB;              // READ to PRECHARGE (AL = 0)
  localparam int unsigned D_WR2RD  = WL + HB + T_WTR; // WRITE to READ
  localparam int unsigned D_RD2WR  = CL + HB + 2 - WL;// READ to WRITE
  localparam int unsigned DMAX     = T_MRD + T_XSRD + T_RFC + T_RAS + D_WR2PRE + T_RP + T_CKE + T_RCD;
  localparam int unsigned CW       = $clog2(DMAX + 1);

  typedef logic [CW-1:0] cnt_t;

  function automatic cnt_t dm1(int unsigned d);  // d cycles -> counter load
    return (d == 0) ? cnt_t'(0) : cnt_t'(d - 1);
  endfunction

  function automatic cnt_t maxc(cnt_t a, cnt_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic cnt_t dec(cnt_t a);
    return (a == 0) ? a : a - 1'b1;
  endfunction

  // pending host request
  typedef struct packed {
    logic              valid;
    logic              write;
    logic              mrs;
    logic              ap;
    logic [BA_W-1:0]   ba;
    logic [ADDR_W-1:0] row;
    logic [COL_W-1:0]  col;
    burst_t            data;
    burst_mask_t       mask;
  } req_t;

  req_t              req;
  ddr2_state_e       ret_state;   // where PDN_EXIT returns to
  logic [BA_W-1:0]   open_ba;
  logic [ADDR_W-1:0] open_row;
  cnt_t              wcnt, c_ras, c_pre, c_rd, c_wr;
  logic              take, hit;

  assign busy = req.valid || !init_done;
  assign take = (wr || rd || mrs) && !busy;
  assign hit  = (req.ba == open_ba) && (req.row == open_row);

  // Column address on A: A10 is the auto precharge flag, so column bits
  // from A10 upward move one place up.
  function automatic logic [ADDR_W-1:0] col_addr(logic [COL_W-1:0] c, logic a10);
    logic [ADDR_W-1:0] a;
    a = '0;
    for (int i = 0; i < COL_W; i++) begin
      if (i < 10) a[i] = c[i];
      else        a[i+1] = c[i];
    end
    a[10] = a10;
    return a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_INIT;
      ret_state    <= ST_IDLE;
      req          <= '0;
      open_ba      <= '0;
      open_row     <= '0;
      wcnt         <= '0;
      c_ras        <= '0;
      c_pre        <= '0;
      c_rd         <= '0;
      c_wr         <= '0;
      cmd          <= CMD_NOP;
      cke_hold_low <= 1'b0;
      ba_o         <= '0;
      addr_o       <= '0;
      wr_issue     <= 1'b0;
      wr_data      <= '0;
      wr_mask      <= '0;
      rd_issue     <= 1'b0;
      ref_ack      <= 1'b0;
    end else begin
      // defaults: NOP slot, counters run down
      cmd      <= cke_hold_low ? CMD_DESELECT : CMD_NOP;
      ba_o     <= '0;
      addr_o   <= '0;
      wr_issue <= 1'b0;
      rd_issue <= 1'b0;
      ref_ack  <= 1'b0;
      wcnt     <= dec(wcnt);
      c_ras    <= dec(c_ras);
      c_pre    <= dec(c_pre);
      c_rd     <= dec(c_rd);
      c_wr     <= dec(c_wr);

      if (take) begin
        req <= '{valid: 1'b1, write: wr, mrs: mrs && !wr && !rd, ap: ap, ba: ba, row: row_addr,
                 col: column_addr, data: data_in, mask: mask_in};
      end

      unique case (state)
        ST_INIT: if (init_done) state <= ST_IDLE;

        ST_IDLE: if (wcnt == 0) begin
          if (ref_req) begin
            cmd     <= CMD_REFRESH;
            ref_ack <= 1'b1;
            wcnt    <= dm1(T_RFC);
            state   <= ST_REFRESHING;
          end else if (sr_req) begin
            cmd          <= CMD_SREF_EN;
            cke_hold_low <= 1'b1;
            wcnt         <= dm1(T_CKE);
            state        <= ST_SELF_REFR;
          end else if (req.valid && req.mrs) begin
            cmd       <= CMD_LMR;
            ba_o      <= req.ba;
            addr_o    <= req.row;
            req.valid <= 1'b0;
            wcnt      <= dm1(T_MRD);
            state     <= ST_SETTING_MR;
          end else if (req.valid) begin
            cmd      <= CMD_ACT;
            ba_o     <= req.ba;
            addr_o   <= req.row;
            open_ba  <= req.ba;
            open_row <= req.row;
            c_ras    <= dm1(T_RAS);
            wcnt     <= dm1(T_RCD);
            state    <= ST_ACTIVATING;
          end else if (pd_req) begin
            cmd          <= CMD_PDN_EN;
            cke_hold_low <= 1'b1;
            wcnt         <= dm1(T_CKE);
            state        <= ST_PRE_PDN;
          end
        end

        ST_REFRESHING, ST_SETTING_MR: if (wcnt == 0) state <= ST_IDLE;

        ST_SELF_REFR: if (wcnt == 0 && !sr_req) begin
          cmd          <= CMD_CKE_EXIT;
          cke_hold_low <= 1'b0;
          wcnt         <= dm1(T_XSRD);
          ret_state    <= ST_IDLE;
          state        <= ST_PDN_EXIT;
        end

        ST_PRE_PDN, ST_ACT_PDN:
          if (wcnt == 0 && (!pd_req || req.valid || take || ref_req || sr_req)) begin
            cmd          <= CMD_CKE_EXIT;
            cke_hold_low <= 1'b0;
            wcnt         <= dm1(T_XP);
            ret_state    <= (state == ST_ACT_PDN) ? ST_BANK_ACTIVE : ST_IDLE;
            state        <= ST_PDN_EXIT;
          end

        ST_PDN_EXIT: if (wcnt == 0) state <= ret_state;

        ST_ACTIVATING, ST_BANK_ACTIVE, ST_WRITING, ST_READING: if (wcnt == 0) begin
          if (ref_req || sr_req || (req.valid && (req.mrs || !hit))) begin
            // close the row: all banks for a refresh, the open bank otherwise
            // (a row miss or a mode register request)
            if (c_ras == 0 && c_pre == 0) begin
              cmd        <= CMD_PRE;
              ba_o       <= open_ba;
              addr_o[10] <= ref_req || sr_req;
              wcnt       <= dm1(T_RP);
              state      <= ST_PRECHARGING;
            end else if (state != ST_ACTIVATING) begin
              state <= ST_BANK_ACTIVE;
            end
          end else if (req.valid && req.write && c_wr == 0) begin
            cmd      <= CMD_WRITE;
            ba_o     <= req.ba;
            addr_o   <= col_addr(req.col, req.ap);
            wr_issue <= 1'b1;
            wr_data  <= req.data;
            wr_mask  <= req.mask;
            req.valid <= 1'b0;
            c_rd     <= maxc(dec(c_rd), dm1(D_WR2RD));
            c_wr     <= maxc(dec(c_wr), dm1(HB));
            c_pre    <= maxc(dec(c_pre), dm1(D_WR2PRE));
            if (req.ap) begin
              wcnt  <= maxc(dm1(D_WR2PRE), c_ras);
              state <= ST_WRITING_AP;
            end else begin
              wcnt  <= dm1(HB);
              state <= ST_WRITING;
            end
          end else if (req.valid && !req.write && c_rd == 0) begin
            cmd      <= CMD_READ;
            ba_o     <= req.ba;
            addr_o   <= col_addr(req.col, req.ap);
            rd_issue <= 1'b1;
            req.valid <= 1'b0;
            c_rd     <= maxc(dec(c_rd), dm1(HB));
            c_wr     <= maxc(dec(c_wr), dm1(D_RD2WR));
            c_pre    <= maxc(dec(c_pre), dm1(D_RD2PRE));
            if (req.ap) begin
              wcnt  <= maxc(dm1(D_RD2PRE), c_ras);
              state <= ST_READING_AP;
            end else begin
              wcnt  <= dm1(HB);
              state <= ST_READING;
            end
          end else if (!req.valid && pd_req && !take &&
                       c_pre == 0 && c_rd == 0 && c_wr == 0) begin
            cmd          <= CMD_PDN_EN;
            cke_hold_low <= 1'b1;
            wcnt         <= dm1(T_CKE);
            state        <= ST_ACT_PDN;
          end else if (!req.valid) begin
            state <= ST_BANK_ACTIVE;
          end
        end

        // auto precharge: the device closes the row by itself after the
        // burst (and not before tRAS); then tRP as for an explicit PRECHARGE
        ST_WRITING_AP, ST_READING_AP: if (wcnt == 0) begin
          wcnt  <= dm1(T_RP);
          state <= ST_PRECHARGING;
        end

        ST_PRECHARGING: if (wcnt == 0) state <= ST_IDLE;

        default: state <= ST_IDLE;
      endcase
    end
  end

  // a request is only taken when none is pending
  assert property (@(posedge clk) disable iff (!rst_n) take |-> !req.valid);
  // WRITE/READ only with the addressed row open
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_issue || rd_issue) |-> (ba_o == open_ba));

  initial begin
    assert (CL >= 3 && BL == 4) else $error("ddr2_ctrl_fsm: needs CL >= 3 and BL = 4");
  end

endmodule
