// tb_ddr2_controller_full: the controller at its default parameters
// (125 MHz, 200 us power-up wait, one refresh every 7.8 us) through one
// complete use: power-up initialisation, then writes and read-back of bursts
// spread over all eight banks, kept running across several refresh intervals.
// Checks the read data, the CL+3 read latency, that the device model saw no
// protocol or timing violation and the expected initialisation commands, that
// refreshes arrived at the default interval, and that the refresh timer never
// fell behind.
module tb_ddr2_controller_full;
  import ddr2_pkg::*;

  localparam int CL = 3;

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

  ddr2_controller dut (.*);

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

  // expected contents: burst i lives at bank i%8, row 3*i, column 8*i
  function automatic burst_t pattern(int i);
    burst_t d;
    for (int k = 0; k < BL; k++) d[k] = DQ_W'((i * 4 + k) * 16'h0101 ^ 16'h5a5a);
    return d;
  endfunction

  longint cyc = 0, init_at = 0;
  longint rd_at[$];
  int n_lat_bad = 0, n_got = 0, n_bad_data = 0;
  int exp_idx[$];

  always @(posedge clk) begin
    cyc++;
    if (init_done && cke && !cs_n && {ras_n, cas_n, we_n} == 3'b101) rd_at.push_back(cyc);
    if (data_valid) begin
      int i;
      i = exp_idx.pop_front();
      if (data_out != pattern(i)) n_bad_data++;
      if (cyc - rd_at.pop_front() != longint'(CL + 3)) n_lat_bad++;
      n_got++;
    end
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(logic w, int i);
    @(negedge clk);
    while (busy) @(negedge clk);
    wr = w; rd = !w; ba = BA_W'(i % 8); row_addr = ADDR_W'(3 * i); column_addr = COL_W'(8 * i);
    data_in = pattern(i); ap = 1'b0;
    if (!w) exp_idx.push_back(i);
    @(negedge clk);
    wr = 0; rd = 0;
  endtask

  initial begin
    int ref0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (init_done);
    init_at = cyc;
    check(init_at > 25000, $sformatf("power-up wait respected (%0d cycles)", init_at));
    check(u_mem.n_mrs == 2 && u_mem.n_emrs == 5 && u_mem.n_ocd_default == 1, "mode registers set");
    ref0 = u_mem.n_ref;
    // traffic over about four refresh intervals
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 16; i++) request(1'b1, i + 16 * pass);
      for (int i = 0; i < 16; i++) request(1'b0, i + 16 * pass);
      repeat (800) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(n_got == 64, $sformatf("64 bursts read back, got %0d", n_got));
    check(n_bad_data == 0, $sformatf("read data mismatches: %0d", n_bad_data));
    check(n_lat_bad == 0, "read latency CL+3");
    check(merr == 0, $sformatf("device model errors: %0d", merr));
    check(!refresh_overflow, "refresh kept up");
    check(u_mem.n_ref - ref0 == int'((cyc - init_at) / 975) ||
          u_mem.n_ref - ref0 == int'((cyc - init_at) / 975) + 1,
          $sformatf("one refresh per 975 cycles: %0d in %0d cycles", u_mem.n_ref - ref0, cyc - init_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
