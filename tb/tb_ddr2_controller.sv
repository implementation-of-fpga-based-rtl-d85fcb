// tb_ddr2_controller: end-to-end test of the DDR2 controller against the
// behavioural device model.
//
// Runs the controller with shortened power-up, DLL and refresh intervals so
// that refreshes happen during traffic. After initialisation it writes bursts
// (some with byte masks, some with auto precharge) to several banks and rows,
// reads them back and compares with a scoreboard kept here, which applies the
// masks itself. It exercises every state of the controller: row hits
// (write->write, write->read, read->write, read->read), row misses (single
// bank precharge), auto precharge, refresh (precharge all + REFRESH), self
// refresh, precharge power-down, active power-down and mode register writes
// from the host (OCD default / exit, MRS); a mechanism that never
// happens is a failure. The read latency from READ on the pins to
// `data_valid` must be CL+3 cycles. The device model's protocol and timing
// checks must all pass, and DQ must never be driven from both sides.
module tb_ddr2_controller;
  import ddr2_pkg::*;

  localparam int unsigned CL     = 3;
  localparam int unsigned T_REFI = 120;

  logic clk = 1'b0, clk90 = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // asynchronous reset from time 1
  always #4 clk = ~clk;
  initial begin #2; forever #4 clk90 = ~clk90; end

  logic              wr = 0, rd = 0, mrs = 0, ap = 0, pd_req = 0, sr_req = 0;
  logic [BA_W-1:0]   ba = '0;
  logic [ADDR_W-1:0] row_addr = '0;
  logic [COL_W-1:0]  column_addr = '0;
  burst_t            data_in = '0, data_out;
  burst_mask_t       mask_in = '0;
  logic              busy, data_valid, init_done, refresh_overflow;
  ddr2_state_e       state;
  logic              ck, ck_n, cke, cs_n, ras_n, cas_n, we_n, dq_oe, dqs_o, dqs_oe, odt;
  logic [BA_W-1:0]   mem_ba;
  logic [ADDR_W-1:0] mem_a;
  logic [DQ_W-1:0]   dq_o, dq_i, mdq;
  logic              mdq_oe;
  logic [DM_W-1:0]   dm;
  int                merr;

  ddr2_controller #(
    .CL(CL), .T_REFI(T_REFI), .T_POWERUP(20), .T_NOP400(4), .T_DLL(20), .T_XSRD(20)
  ) dut (.*);

  assign dq_i = mdq_oe ? mdq : (dq_oe ? dq_o : '0);

  ddr2_sdram_model #(.CL(CL)) u_mem (
    .ck, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba(mem_ba), .a(mem_a),
    .dq_in(dq_o), .dq_in_oe(dq_oe), .dqs_in(dqs_o), .dqs_in_oe(dqs_oe), .dm, .odt,
    .dq_out(mdq), .dq_out_oe(mdq_oe), .errors(merr)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- scoreboard ----------------
  logic [DQ_W-1:0] sb [logic [BA_W+ADDR_W+COL_W-1:0]];
  typedef struct { logic [BA_W-1:0] b; logic [ADDR_W-1:0] r; logic [COL_W-1:0] c; } rd_s;
  rd_s rdq[$];

  function automatic logic [BA_W+ADDR_W+COL_W-1:0] k_of(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r,
                                                       logic [COL_W-1:0] c, int beat);
    return {b, r, c[COL_W-1:2], 2'(c[1:0] + 2'(beat))};
  endfunction

  task automatic host_write(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [COL_W-1:0] c,
                            burst_t d, burst_mask_t m, logic a);
    @(negedge clk);
    while (busy) @(negedge clk);
    wr = 1; ap = a; ba = b; row_addr = r; column_addr = c; data_in = d; mask_in = m;
    for (int i = 0; i < BL; i++) begin
      logic [DQ_W-1:0] old;
      old = sb.exists(k_of(b, r, c, i)) ? sb[k_of(b, r, c, i)] : '0;
      for (int by = 0; by < DM_W; by++) if (!m[i][by]) old[8*by +: 8] = d[i][8*by +: 8];
      sb[k_of(b, r, c, i)] = old;
    end
    @(negedge clk);
    wr = 0;
  endtask

  task automatic host_mrs(logic [BA_W-1:0] b, logic [ADDR_W-1:0] op);
    @(negedge clk);
    while (busy) @(negedge clk);
    mrs = 1; ba = b; row_addr = op;
    @(negedge clk);
    mrs = 0;
  endtask

  task automatic host_read(logic [BA_W-1:0] b, logic [ADDR_W-1:0] r, logic [COL_W-1:0] c, logic a);
    @(negedge clk);
    while (busy) @(negedge clk);
    rd = 1; ap = a; ba = b; row_addr = r; column_addr = c;
    rdq.push_back('{b: b, r: r, c: c});
    @(negedge clk);
    rd = 0;
  endtask

  function automatic burst_t rand_burst();
    burst_t d;
    for (int i = 0; i < BL; i++) d[i] = DQ_W'($urandom);
    return d;
  endfunction

  // ---------------- monitors ----------------
  longint cyc = 0;
  longint rd_cmd_at[$];
  int n_reads_done = 0, lat_bad = 0;
  int n_wr_wr = 0, n_wr_rd = 0, n_rd_wr = 0, n_rd_rd = 0;
  int n_act_pdn = 0, n_pre_pdn = 0, n_self = 0, n_set_mr = 0, n_contention = 0;
  ddr2_state_e prev_state = ST_INIT;
  int last_rw = 0;  // 0 none since ACT, 1 write, 2 read

  always @(posedge clk) begin
    cyc++;
    if (dq_oe && mdq_oe) n_contention++;
    if (init_done && cke && !cs_n) begin
      unique case ({ras_n, cas_n, we_n})
        3'b100: begin
          if (last_rw == 1) n_wr_wr++;
          if (last_rw == 2) n_rd_wr++;
          last_rw = 1;
        end
        3'b101: begin
          if (last_rw == 1) n_wr_rd++;
          if (last_rw == 2) n_rd_rd++;
          last_rw = 2;
          rd_cmd_at.push_back(cyc);
        end
        3'b011, 3'b010: last_rw = 0;
        default: ;
      endcase
    end
    if (state != prev_state) begin
      if (state == ST_ACT_PDN) n_act_pdn++;
      if (state == ST_PRE_PDN) n_pre_pdn++;
      if (state == ST_SELF_REFR) n_self++;
      if (state == ST_SETTING_MR) n_set_mr++;
    end
    prev_state = state;
    if (data_valid) begin
      rd_s e;
      longint t;
      check(rdq.size() != 0, "read data without a pending read");
      if (rdq.size() != 0) begin
        e = rdq.pop_front();
        for (int i = 0; i < BL; i++) begin
          logic [DQ_W-1:0] exp;
          exp = sb.exists(k_of(e.b, e.r, e.c, i)) ? sb[k_of(e.b, e.r, e.c, i)] : '0;
          check(data_out[i] == exp, $sformatf("read data b%0d r%0h c%0h beat %0d: got %h want %h",
                                              e.b, e.r, e.c, i, data_out[i], exp));
        end
      end
      t = (rd_cmd_at.size() != 0) ? rd_cmd_at.pop_front() : 0;
      if (cyc - t != longint'(CL + 3)) lat_bad++;
      n_reads_done++;
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    burst_t d;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    check(u_mem.n_ocd_default == 1, "OCD default set once during init");
    check(u_mem.n_dll_reset == 1, "DLL reset once during init");
    check(u_mem.n_mrs == 2 && u_mem.n_emrs == 5, "2 MRS and 5 EMRS during init");
    check(u_mem.n_ref == 2 && u_mem.n_prea == 2, "2 REFRESH and 2 PRECHARGE ALL during init");

    // 1. row hits: four writes to one row, then read them back
    for (int i = 0; i < 4; i++) host_write(3'd1, 14'h0123, COL_W'(i * 4), rand_burst(), '0, 1'b0);
    for (int i = 0; i < 4; i++) host_read(3'd1, 14'h0123, COL_W'(i * 4), 1'b0);
    // 2. interleaved write/read on one row
    for (int i = 0; i < 4; i++) begin
      host_write(3'd2, 14'h0044, COL_W'(16 + i * 4), rand_burst(), '0, 1'b0);
      host_read(3'd2, 14'h0044, COL_W'(16 + i * 4), 1'b0);
    end
    // 3. masked writes: overwrite parts of earlier bursts
    host_write(3'd1, 14'h0123, 10'd0, rand_burst(), '{2'b01, 2'b10, 2'b11, 2'b00}, 1'b0);
    host_write(3'd1, 14'h0123, 10'd4, rand_burst(), '{2'b11, 2'b11, 2'b00, 2'b01}, 1'b0);
    host_read(3'd1, 14'h0123, 10'd0, 1'b0);
    host_read(3'd1, 14'h0123, 10'd4, 1'b0);
    // 4. auto precharge writes and reads, and row misses on random addresses
    for (int i = 0; i < 24; i++) begin
      logic [BA_W-1:0] b;
      logic [ADDR_W-1:0] r;
      logic [COL_W-1:0] c;
      b = BA_W'($urandom_range(0, 7));
      r = ADDR_W'($urandom_range(0, 3));
      c = COL_W'($urandom_range(0, 255) * 4);
      host_write(b, r, c, rand_burst(), '0, 1'(i % 3 == 0));
      host_read(b, r, c, 1'(i % 4 == 0));
    end
    // 5. unaligned column (burst wraps inside the group of four)
    host_write(3'd5, 14'h3fff, 10'h3fe, rand_burst(), '0, 1'b0);
    host_read(3'd5, 14'h3fff, 10'h3fc, 1'b0);
    host_read(3'd5, 14'h3fff, 10'h3fe, 1'b0);
    // 6. active power-down: row left open, nothing pending
    host_write(3'd0, 14'h0001, 10'd8, rand_burst(), '0, 1'b0);
    @(negedge clk); pd_req = 1;
    repeat (30) @(negedge clk);
    pd_req = 0;
    host_read(3'd0, 14'h0001, 10'd8, 1'b0);
    // 7. precharge power-down: close the row first with an auto-precharge read
    host_read(3'd0, 14'h0001, 10'd8, 1'b1);
    repeat (20) @(negedge clk);
    pd_req = 1;
    repeat (30) @(negedge clk);
    pd_req = 0;
    // 8. self refresh
    repeat (5) @(negedge clk);
    sr_req = 1;
    repeat (300) @(negedge clk);
    sr_req = 0;
    host_read(3'd1, 14'h0123, 10'd12, 1'b0);
    host_read(3'd2, 14'h0044, 10'd16, 1'b0);
    // 9. host mode register writes with a row open: EMRS(1) OCD default,
    //    EMRS(1) OCD exit, MRS (same CL and BL); data must survive
    host_mrs(3'd1, 14'h0784);
    host_mrs(3'd1, 14'h0404);
    host_mrs(3'd0, 14'h0232);
    host_read(3'd2, 14'h0044, 10'd20, 1'b0);
    // drain
    repeat (200) @(negedge clk);

    check(rdq.size() == 0, "every read returned data");
    check(n_reads_done == 4 + 4 + 2 + 24 + 2 + 2 + 2 + 1, $sformatf("number of reads completed: %0d", n_reads_done));
    check(lat_bad == 0, $sformatf("read latency CL+3 (%0d bad)", lat_bad));
    check(merr == 0, $sformatf("device model protocol errors: %0d", merr));
    check(n_contention == 0, "no DQ contention");
    check(!refresh_overflow, "refresh never fell behind");
    // mechanisms
    check(n_wr_wr > 0, "row hit write->write");
    check(n_wr_rd > 0, "row hit write->read");
    check(n_rd_wr > 0, "row hit read->write");
    check(n_rd_rd > 0, "row hit read->read");
    check(u_mem.n_wra > 0, "WRITE with auto precharge");
    check(u_mem.n_rda > 0, "READ with auto precharge");
    check(u_mem.n_pre > 0, "single bank PRECHARGE on a row miss");
    check(u_mem.n_prea > 2, "PRECHARGE ALL before refresh");
    check(u_mem.n_ref > 4, "periodic REFRESH during traffic");
    check(u_mem.n_bytes_masked > 0, "data mask used");
    check(u_mem.n_odt_writes == u_mem.n_wr + u_mem.n_wra, "ODT high during every write burst");
    check(n_act_pdn > 0 && n_pre_pdn > 0, "active and precharge power-down");
    check(n_self == 1 && u_mem.n_sre == 1 && u_mem.n_srx == 1, "self refresh entry and exit");
    check(u_mem.n_pde == u_mem.n_pdx && u_mem.n_pde == 2, "every power-down exited");
    check(n_set_mr == 3, $sformatf("host (E)MRS through Setting MRS/EMRS: %0d", n_set_mr));
    check(u_mem.n_mrs == 3 && u_mem.n_emrs == 7, "host MRS and EMRS reached the device");
    check(u_mem.n_ocd_default == 2 && u_mem.emr1 == 14'h0404, "OCD default then OCD exit from the host");
    $display("wr->wr %0d wr->rd %0d rd->wr %0d rd->rd %0d, ACT %0d PRE %0d PREA %0d REF %0d WRA %0d RDA %0d",
             n_wr_wr, n_wr_rd, n_rd_wr, n_rd_rd, u_mem.n_act, u_mem.n_pre, u_mem.n_prea,
             u_mem.n_ref, u_mem.n_wra, u_mem.n_rda);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
