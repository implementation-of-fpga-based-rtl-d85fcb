// tb_ddr2_write_stream: a long stream of writes to one bank, the pattern of a
// recorder storing samples: bank 0, one row, column advancing by one burst
// per request, the host raising `wr` again as soon as `busy` drops.
//
// Checks that within the open row the WRITE commands follow each other every
// BL/2 = 2 cycles (one command per burst, so DQ carries data on every clock
// edge), apart from the interruptions for refresh; that each refresh costs a
// PRECHARGE ALL, a REFRESH and a new ACTIVATE; and, through the device
// model's storage, that every 16-bit word landed at its address.
// Shortened power-up and refresh interval keep the run short.
module tb_ddr2_write_stream;
  import ddr2_pkg::*;

  localparam int CL = 3, NREQ = 200, T_REFI = 150;

  logic clk = 1'b0, clk90 = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #4 clk = ~clk;
  initial begin #2; forever #4 clk90 = ~clk90; end

  logic              wr = 0, rd = 0, mrs = 0, ap = 0, pd_req = 0, sr_req = 0;
  logic [BA_W-1:0]   ba = '0;
  logic [ADDR_W-1:0] row_addr = 14'h0010;
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

  ddr2_controller #(.CL(CL), .T_REFI(T_REFI), .T_POWERUP(20), .T_NOP400(4), .T_DLL(20)) dut (.*);

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

  function automatic logic [DQ_W-1:0] word(int n);
    return DQ_W'(n * 16'h0731 + 16'h1234);
  endfunction

  // command spacing monitor
  longint cyc = 0, last_wr = -1;
  int n_gap2 = 0, n_gap_other = 0, n_ref_gaps = 0, n_busy_rise = 0;
  bit ref_since = 0, busy_prev = 0;
  always @(posedge clk) begin
    cyc++;
    if (init_done && cke && !cs_n) begin
      if ({ras_n, cas_n, we_n} == 3'b001) ref_since = 1;
      if ({ras_n, cas_n, we_n} == 3'b100) begin
        if (last_wr >= 0) begin
          if (ref_since) n_ref_gaps++;
          else if (cyc - last_wr == 2) n_gap2++;
          else n_gap_other++;
        end
        last_wr = cyc;
        ref_since = 0;
      end
    end
    if (busy && !busy_prev) n_busy_rise++;
    busy_prev = busy;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref0, act0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    ref0 = u_mem.n_ref;
    act0 = u_mem.n_act;
    for (int i = 0; i < NREQ; i++) begin
      @(negedge clk);
      while (busy) @(negedge clk);
      wr = 1;
      column_addr = COL_W'((4 * i) % 1024);
      for (int k = 0; k < BL; k++) data_in[k] = word(4 * i + k);
      @(negedge clk);
      wr = 0;
    end
    repeat (30) @(negedge clk);
    for (int i = 0; i < NREQ; i++)
      for (int k = 0; k < BL; k++)
        check(u_mem.peek(3'd0, 14'h0010, COL_W'((4 * i + k) % 1024)) == word(4 * i + k),
              $sformatf("word %0d stored", 4 * i + k));
    check(merr == 0, $sformatf("device model errors: %0d", merr));
    check(n_gap_other == 0, $sformatf("%0d WRITE gaps other than 2 cycles within a row", n_gap_other));
    check(n_gap2 > NREQ / 2, $sformatf("back-to-back WRITEs: %0d", n_gap2));
    check(n_ref_gaps > 0 && n_ref_gaps >= u_mem.n_ref - ref0 - 1 && n_ref_gaps <= u_mem.n_ref - ref0,
          "every refresh during the stream interrupts it once");
    check(u_mem.n_act - act0 == 1 + n_ref_gaps, "row opened once, reopened once per refresh");
    check(u_mem.n_prea >= 2 + n_ref_gaps, "PRECHARGE ALL before each refresh");
    check(n_busy_rise >= NREQ, "busy raised for every request");
    $display("stream: %0d back-to-back WRITEs, %0d refresh interruptions", n_gap2, n_ref_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
