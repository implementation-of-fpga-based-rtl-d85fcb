// tb_ddr2_phy: checks the pin timing of the DDR2 data path.
//
// Write: after `wr_issue` is sampled at rising edge P, the device would take
// the WRITE at P (the command pins follow half a period later, registered on
// the falling edge), so the first DQS rising edge must come WL cycles plus a
// quarter period after P. At every DQS edge the testbench samples DQ and DM
// and expects beats 0..3 and their masks in order, DQ and DQS driven; before
// the first edge DQS must already be driven low (preamble). ODT must be high
// during the burst. Two writes two cycles apart must give one seamless
// 8-beat stream. Read: the testbench plays the device, driving beat i at the
// CK edge CL cycles (plus i half periods) after P; `rd_valid` must follow
// CL+2 cycles after P with the four beats in order. It also checks that the
// command pins are the encoder's levels re-registered on the falling edge,
// and that CK follows the clock and CK# its inverse.
module tb_ddr2_phy;
  import ddr2_pkg::*;

  localparam int CL = 3, WL = 2;
  localparam realtime T = 10.0;

  logic clk = 0, clk90 = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #2.5; forever #5 clk90 = ~clk90; end

  logic wr_issue = 0, rd_issue = 0, rd_valid, wr_busy;
  burst_t wr_data = '0, rd_data;
  burst_mask_t wr_mask = '0;
  logic cke_d = 1, cs_n_d = 1, ras_n_d = 1, cas_n_d = 1, we_n_d = 1;
  logic [BA_W-1:0] ba_d = '0, ba;
  logic [ADDR_W-1:0] a_d = '0, a;
  logic cke, cs_n, ras_n, cas_n, we_n, ck, ck_n, dq_oe, dqs_o, dqs_oe, odt;
  logic [DQ_W-1:0] dq_o, dq_i = '0;
  logic [DM_W-1:0] dm;
  int checks = 0, failures = 0;

  ddr2_phy #(.CL(CL)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $realtime); end
  endtask

  // DQS edge sampler
  realtime edge_t[$];
  logic [DQ_W-1:0] edge_dq[$];
  logic [DM_W-1:0] edge_dm[$];
  logic edge_ok[$], edge_odt[$];
  always @(posedge dqs_o or negedge dqs_o) begin
    edge_t.push_back($realtime); edge_dq.push_back(dq_o); edge_dm.push_back(dm);
    edge_ok.push_back(dq_oe && dqs_oe); edge_odt.push_back(odt);
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime p;
    burst_t b1, b2;
    burst_mask_t m1;
    b1 = '{16'hd004, 16'hc003, 16'hb002, 16'ha001};   // beat 0 = a001
    b2 = '{16'h4444, 16'h3333, 16'h2222, 16'h1111};
    m1 = '{2'b00, 2'b10, 2'b01, 2'b00};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!dq_oe && !dqs_oe && !odt, "idle: nothing driven");

    // ---- single write ----
    edge_t.delete(); edge_dq.delete(); edge_dm.delete(); edge_ok.delete(); edge_odt.delete();
    wr_issue = 1; wr_data = b1; wr_mask = m1;
    @(posedge clk); p = $realtime;
    @(negedge clk); wr_issue = 0;
    #(T * WL - T / 2 - 1);           // just before P + WL*T - T/4... check preamble
    #(T / 4 + 1);
    check(dqs_oe && !dqs_o, "DQS preamble driven low");
    repeat (WL + 3) @(negedge clk);
    check(edge_t.size() == 4, $sformatf("4 DQS edges, saw %0d", edge_t.size()));
    if (edge_t.size() == 4) begin
      check(edge_t[0] == p + WL * T + T / 4, $sformatf("first DQS edge at %0t, want %0t", edge_t[0], p + WL * T + T / 4));
      for (int i = 0; i < 4; i++) begin
        check(edge_dq[i] == b1[i] && edge_dm[i] == m1[i], $sformatf("write beat %0d: %h/%b", i, edge_dq[i], edge_dm[i]));
        check(edge_ok[i] && edge_odt[i], "DQ, DQS and ODT on during the burst");
        if (i > 0) check(edge_t[i] - edge_t[i-1] == T / 2, "beats half a period apart");
      end
    end
    check(!dq_oe && !dqs_oe, "bus released after the burst");
    edge_t.delete(); edge_dq.delete(); edge_dm.delete(); edge_ok.delete(); edge_odt.delete();

    // ---- two writes two cycles apart: seamless ----
    wr_issue = 1; wr_data = b1; wr_mask = '0;
    @(negedge clk); wr_issue = 0;
    @(negedge clk); wr_issue = 1; wr_data = b2;
    @(negedge clk); wr_issue = 0;
    repeat (WL + 5) @(negedge clk);
    check(edge_t.size() == 8, $sformatf("8 DQS edges, saw %0d", edge_t.size()));
    if (edge_t.size() == 8)
      for (int i = 0; i < 8; i++) begin
        check(edge_dq[i] == (i < 4 ? b1[i % 4] : b2[i % 4]), $sformatf("stream beat %0d", i));
        if (i > 0) check(edge_t[i] - edge_t[i-1] == T / 2, "no gap between bursts");
      end

    // ---- read ----
    rd_issue = 1;
    @(posedge clk); p = $realtime;
    @(negedge clk); rd_issue = 0;
    fork
      begin
        // device: beats at CK edges CL cycles after P
        #(CL * T - T);              // now at P + CL*T - T/2 (a falling edge)
        for (int i = 0; i < 4; i++) begin
          #(T / 2);
          dq_i = b2[i];
        end
        #(T / 2);
        dq_i = 16'hdead;
      end
      begin
        @(posedge rd_valid);
        check($realtime == p + (CL + 2) * T, $sformatf("rd_valid %0t after P, want %0t", $realtime - p, (CL + 2) * T));
        check(rd_data == b2, $sformatf("read burst %h", rd_data));
        @(negedge clk);
        @(negedge clk);
        check(!rd_valid, "rd_valid is one cycle long");
      end
    join

    // ---- command pins and clock ----
    @(posedge clk);
    {cke_d, cs_n_d, ras_n_d, cas_n_d, we_n_d} = 5'b10011; ba_d = 3'd6; a_d = 14'h2abc;
    @(negedge clk); #1;
    check({cke, cs_n, ras_n, cas_n, we_n} == 5'b10011 && ba == 3'd6 && a == 14'h2abc,
          "command pins registered on the falling edge");
    check(ck == 0 && ck_n == 1, "CK low, CK# high in the low half");
    {cke_d, cs_n_d, ras_n_d, cas_n_d, we_n_d} = 5'b10111;
    @(posedge clk); #1;
    check({cke, cs_n, ras_n, cas_n, we_n} == 5'b10011, "pins hold until the falling edge");
    check(ck == 1 && ck_n == 0, "CK high, CK# low in the high half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
