// tb_ddr2_ctrl_fsm: directed tests of the command state machine.
//
// Drives host requests, refresh requests and power requests, logs every
// command slot with its cycle, and checks the order of commands and the
// spacing between them against the DDR2 rules written out here:
//   ACT -> WRITE/READ           T_RCD
//   WRITE -> WRITE (same row)   BL/2
//   WRITE -> READ               WL + BL/2 + T_WTR
//   READ -> WRITE               CL + BL/2 + 2 - WL
//   ACT -> PRE                  >= T_RAS,  WRITE -> PRE >= WL + BL/2 + T_WR
//   PRE -> ACT / REFRESH        >= T_RP,   REFRESH -> next >= T_RFC
//   WRITE A -> next ACT         >= WL + BL/2 + T_WR + T_RP
//   CKE low -> CKE high         >= T_CKE,  self refresh exit -> next >= T_XSRD
//   (E)MRS -> next command      >= T_MRD (a row is closed first)
// It also checks A10 (auto precharge, all-bank precharge), that the write
// data and mask reach `wr_data`/`wr_mask` with the WRITE, that `ref_ack`
// marks the REFRESH slot, and the state reached for power-down.
module tb_ddr2_ctrl_fsm;
  import ddr2_pkg::*;

  localparam int CL = 3, WL = 2, HB = 2;
  localparam int T_RCD = 2, T_RP = 2, T_RAS = 5, T_RFC = 6, T_WR = 2, T_WTR = 2;
  localparam int T_CKE = 3, T_XP = 2, T_XSRD = 8, T_MRD = 2;

  logic clk = 0, rst_n = 0, init_done = 0;
  logic wr = 0, rd = 0, mrs = 0, ap = 0, pd_req = 0, sr_req = 0, ref_req = 0;
  logic [BA_W-1:0] ba = '0;
  logic [ADDR_W-1:0] row_addr = '0;
  logic [COL_W-1:0] column_addr = '0;
  burst_t data_in = '0, wr_data;
  burst_mask_t mask_in = '0, wr_mask;
  logic busy, ref_ack, cke_hold_low, wr_issue, rd_issue;
  ddr2_cmd_e cmd;
  logic [BA_W-1:0] ba_o;
  logic [ADDR_W-1:0] addr_o;
  ddr2_state_e state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddr2_ctrl_fsm #(.CL(CL), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_RFC(T_RFC),
                  .T_WR(T_WR), .T_WTR(T_WTR), .T_MRD(T_MRD), .T_CKE(T_CKE), .T_XP(T_XP), .T_XSRD(T_XSRD))
    dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { ddr2_cmd_e c; int t; int b; logic [ADDR_W-1:0] a; } ev_s;
  ev_s log_q[$];
  int cyc = 0;

  always @(negedge clk) begin
    cyc++;
    if (cmd != CMD_NOP && cmd != CMD_DESELECT) begin
      log_q.push_back('{c: cmd, t: cyc, b: int'(ba_o), a: addr_o});
      check((cmd == CMD_WRITE) == wr_issue && (cmd == CMD_READ) == rd_issue, "issue flags match slot");
      check((cmd == CMD_REFRESH) == ref_ack, "ref_ack marks REFRESH");
    end
  end

  // pop the next logged command, checking its kind
  task automatic expect_cmd(ddr2_cmd_e c, output ev_s e);
    int guard;
    guard = 0;
    while (log_q.size() == 0 && guard < 500) begin @(negedge clk); #1; guard++; end
    if (log_q.size() == 0) begin
      check(0, $sformatf("no command, wanted %s", c.name()));
      e = '{c: CMD_NOP, t: 0, b: 0, a: '0};
      return;
    end
    e = log_q.pop_front();
    check(e.c == c, $sformatf("command %s, wanted %s (cycle %0d)", e.c.name(), c.name(), e.t));
  endtask

  task automatic host(logic w, logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [COL_W-1:0] c, logic a,
                      burst_t d = '0, burst_mask_t m = '0);
    while (busy) @(negedge clk);
    wr = w; rd = !w; ba = b; row_addr = r; column_addr = c; ap = a; data_in = d; mask_in = m;
    @(negedge clk);
    wr = 0; rd = 0;
  endtask

  task automatic host_mrs(logic [BA_W-1:0] b, logic [ADDR_W-1:0] op);
    while (busy) @(negedge clk);
    mrs = 1; ba = b; row_addr = op;
    @(negedge clk);
    mrs = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_s e_act, e_w1, e_w2, e_r1, e_w3, e_pre, e_act2, e_x, e_ref, e_y;
    burst_t d;
    d = '{16'h1111, 16'h2222, 16'h3333, 16'h4444};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(busy && state == ST_INIT, "busy until init done");
    init_done = 1;
    @(negedge clk);

    // closed row -> ACT, WRITE after tRCD, with the data
    host(1, 3'd2, 14'h0155, 10'h008, 0, d, '{2'b00, 2'b01, 2'b10, 2'b00});
    expect_cmd(CMD_ACT, e_act);
    check(e_act.b == 2 && e_act.a == 14'h0155, "ACT bank/row");
    expect_cmd(CMD_WRITE, e_w1);
    check(e_w1.t - e_act.t == T_RCD, $sformatf("tRCD %0d", e_w1.t - e_act.t));
    check(e_w1.a == 14'h0008 && e_w1.b == 2, "WRITE column, A10 low");
    // row hits: WRITE -> WRITE back to back, then READ, then WRITE
    host(1, 3'd2, 14'h0155, 10'h00c, 0, d);
    expect_cmd(CMD_WRITE, e_w2);
    check(e_w2.t - e_w1.t == HB, $sformatf("WRITE->WRITE %0d", e_w2.t - e_w1.t));
    host(0, 3'd2, 14'h0155, 10'h008, 0);
    expect_cmd(CMD_READ, e_r1);
    check(e_r1.t - e_w2.t == WL + HB + T_WTR, $sformatf("WRITE->READ %0d", e_r1.t - e_w2.t));
    host(1, 3'd2, 14'h0155, 10'h010, 0, d);
    expect_cmd(CMD_WRITE, e_w3);
    check(e_w3.t - e_r1.t == CL + HB + 2 - WL, $sformatf("READ->WRITE %0d", e_w3.t - e_r1.t));
    // row miss: PRE (single bank) after write recovery, then ACT after tRP
    host(0, 3'd5, 14'h0001, 10'h000, 0);
    expect_cmd(CMD_PRE, e_pre);
    check(e_pre.b == 2 && !e_pre.a[10], "single-bank PRECHARGE of the open bank");
    check(e_pre.t - e_w3.t >= WL + HB + T_WR, "write recovery before PRECHARGE");
    check(e_pre.t - e_act.t >= T_RAS, "tRAS before PRECHARGE");
    expect_cmd(CMD_ACT, e_act2);
    check(e_act2.t - e_pre.t >= T_RP, "tRP before ACT");
    check(e_act2.b == 5 && e_act2.a == 14'h0001, "ACT of the new row");
    expect_cmd(CMD_READ, e_x);
    check(e_x.t - e_act2.t == T_RCD, "tRCD for READ");
    // refresh while a row is open: PRE ALL, REFRESH, then ACT after tRFC
    @(negedge clk);
    ref_req = 1;
    expect_cmd(CMD_PRE, e_pre);
    check(e_pre.a[10], "PRECHARGE ALL before refresh");
    expect_cmd(CMD_REFRESH, e_ref);
    ref_req = 0;
    check(e_ref.t - e_pre.t >= T_RP, "tRP before REFRESH");
    host(1, 3'd5, 14'h0001, 10'h004, 1, d);   // write with auto precharge
    expect_cmd(CMD_ACT, e_act);
    check(e_act.t - e_ref.t >= T_RFC, "tRFC before ACT");
    expect_cmd(CMD_WRITE, e_w1);
    check(e_w1.a[10], "WRITE with auto precharge: A10 high");
    check(wr_data == d, "write data with the WRITE");
    host(0, 3'd5, 14'h0001, 10'h004, 1);      // same row, but it was auto-precharged
    expect_cmd(CMD_ACT, e_act2);
    check(e_act2.t - e_w1.t >= WL + HB + T_WR + T_RP, "auto precharge recovery before ACT");
    expect_cmd(CMD_READ, e_r1);
    check(e_r1.a[10], "READ with auto precharge: A10 high");
    check(state == ST_READING_AP || state == ST_PRECHARGING || state == ST_IDLE, "row closed after READ A");
    // precharge power-down from idle
    repeat (12) @(negedge clk);
    check(state == ST_IDLE, "idle after auto precharge");
    pd_req = 1;
    expect_cmd(CMD_PDN_EN, e_x);
    @(negedge clk);
    check(state == ST_PRE_PDN && cke_hold_low, "precharge power-down, CKE low");
    repeat (5) @(negedge clk);
    pd_req = 0;
    expect_cmd(CMD_CKE_EXIT, e_y);
    check(e_y.t - e_x.t >= T_CKE, "tCKE in power-down");
    // active power-down: open a row and leave it
    host(0, 3'd1, 14'h0002, 10'h000, 0);
    expect_cmd(CMD_ACT, e_act);
    check(e_act.t - e_y.t >= T_XP, "tXP after power-down exit");
    expect_cmd(CMD_READ, e_r1);
    pd_req = 1;
    expect_cmd(CMD_PDN_EN, e_x);
    @(negedge clk);
    check(state == ST_ACT_PDN, "active power-down");
    // a host request wakes it up and is served in the open row
    pd_req = 0;
    host(1, 3'd1, 14'h0002, 10'h020, 0, d);
    expect_cmd(CMD_CKE_EXIT, e_y);
    expect_cmd(CMD_WRITE, e_w1);
    check(e_w1.t - e_y.t >= T_XP, "tXP before WRITE");
    // self refresh: row gets closed first
    sr_req = 1;
    expect_cmd(CMD_PRE, e_pre);
    check(e_pre.a[10], "PRECHARGE ALL before self refresh");
    expect_cmd(CMD_SREF_EN, e_x);
    @(negedge clk);
    check(state == ST_SELF_REFR && cke_hold_low, "self refresh, CKE low");
    repeat (10) @(negedge clk);
    sr_req = 0;
    expect_cmd(CMD_CKE_EXIT, e_y);
    host(0, 3'd0, 14'h0003, 10'h000, 0);
    expect_cmd(CMD_ACT, e_act);
    check(e_act.t - e_y.t >= T_XSRD, $sformatf("tXSRD after self refresh %0d", e_act.t - e_y.t));
    expect_cmd(CMD_READ, e_r1);
    // mode register set with a row open: PRECHARGE, LOAD MODE, tMRD
    host_mrs(3'd1, 14'h0044);
    expect_cmd(CMD_PRE, e_pre);
    check(e_pre.b == 0 && !e_pre.a[10], "single-bank PRECHARGE before (E)MRS");
    expect_cmd(CMD_LMR, e_x);
    check(e_x.b == 1 && e_x.a == 14'h0044, "(E)MRS register and contents");
    check(e_x.t - e_pre.t >= T_RP, "tRP before (E)MRS");
    @(negedge clk);
    check(state == ST_SETTING_MR, "Setting MRS/EMRS state");
    host_mrs(3'd0, 14'h0232);                 // from Idle: no PRECHARGE
    expect_cmd(CMD_LMR, e_y);
    check(e_y.b == 0 && e_y.a == 14'h0232, "MRS from Idle");
    check(e_y.t - e_x.t >= T_MRD, "tMRD between (E)MRS");
    host(0, 3'd0, 14'h0003, 10'h000, 0);
    expect_cmd(CMD_ACT, e_act);
    check(e_act.t - e_y.t >= T_MRD, "tMRD before ACT");
    expect_cmd(CMD_READ, e_r1);
    repeat (10) @(negedge clk);
    check(log_q.size() == 0, "no stray commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
