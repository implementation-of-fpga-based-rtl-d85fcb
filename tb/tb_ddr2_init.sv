// tb_ddr2_init: checks the DDR2 power-up command list and its waits.
//
// Records every command slot the sequencer issues (with the cycle), and
// compares with the expected list: command, bank address, address bits and
// the number of cycles to the next command. Mode register values are worked
// out here from the field layout (BL = 4 -> 010, CL = 3 -> A6:A4 = 011,
// WR = 2 -> A11:A9 = 001, DLL reset A8; EMRS(1): A10 DQS# off, A2 Rtt 75
// ohm, A9:A7 = 111 for OCD default). Also checks that CKE is held low until
// the second step and that `done` rises once the last wait has passed.
module tb_ddr2_init;
  import ddr2_pkg::*;

  localparam int unsigned TPU = 20, TNOP = 4, TRP = 2, TMRD = 2, TRFC = 6, TDLL = 10;

  logic clk = 0, rst_n = 0;
  ddr2_cmd_e cmd;
  logic cke_hold_low, done;
  logic [BA_W-1:0] ba;
  logic [ADDR_W-1:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddr2_init #(.T_POWERUP(TPU), .T_NOP400(TNOP), .T_RP(TRP), .T_MRD(TMRD), .T_RFC(TRFC),
              .T_DLL(TDLL), .CL(3), .WR(2)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { ddr2_cmd_e c; int b; int a; int gap; } exp_s;
  exp_s exp_list[13];
  initial begin
    exp_list[0]  = '{CMD_PDN_EN,   0, 'h000, TPU};
    exp_list[1]  = '{CMD_CKE_EXIT, 0, 'h000, TNOP};
    exp_list[2]  = '{CMD_PRE,      0, 'h400, TRP};
    exp_list[3]  = '{CMD_LMR,      2, 'h000, TMRD};
    exp_list[4]  = '{CMD_LMR,      3, 'h000, TMRD};
    exp_list[5]  = '{CMD_LMR,      1, 'h404, TMRD};
    exp_list[6]  = '{CMD_LMR,      0, 'h332, TMRD};
    exp_list[7]  = '{CMD_PRE,      0, 'h400, TRP};
    exp_list[8]  = '{CMD_REFRESH,  0, 'h000, TRFC};
    exp_list[9]  = '{CMD_REFRESH,  0, 'h000, TRFC};
    exp_list[10] = '{CMD_LMR,      0, 'h232, TDLL};
    exp_list[11] = '{CMD_LMR,      1, 'h784, TMRD};
    exp_list[12] = '{CMD_LMR,      1, 'h404, TMRD};
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc, last_at, done_at;
    ddr2_cmd_e seen_c[$];
    int seen_b[$], seen_a[$], seen_t[$];
    n = 0; cyc = 0; done_at = -1;
    repeat (2) @(negedge clk);
    check(cmd == CMD_PDN_EN && cke_hold_low && !done, "reset state: CKE low, not done");
    rst_n = 1;
    while (cyc < 200) begin
      @(negedge clk);
      cyc++;
      if (cmd != CMD_NOP && cmd != CMD_DESELECT) begin
        seen_c.push_back(cmd); seen_b.push_back(int'(ba)); seen_a.push_back(int'(addr)); seen_t.push_back(cyc);
      end
      if (seen_c.size() == 1 && cmd == CMD_DESELECT) check(cke_hold_low, "CKE held low in power-up wait");
      if (seen_c.size() >= 2) check(!cke_hold_low, "CKE released from step 1 on");
      if (done && done_at < 0) done_at = cyc;
    end
    check(seen_c.size() == 13, $sformatf("13 commands, saw %0d", seen_c.size()));
    for (int i = 0; i < 13 && i < seen_c.size(); i++) begin
      check(seen_c[i] == exp_list[i].c && seen_b[i] == exp_list[i].b && seen_a[i] == exp_list[i].a,
            $sformatf("step %0d: got %s ba %0d a %h", i, seen_c[i].name(), seen_b[i], seen_a[i]));
      if (i < 12 && i + 1 < seen_c.size())
        check(seen_t[i+1] - seen_t[i] == exp_list[i].gap,
              $sformatf("step %0d wait %0d, want %0d", i, seen_t[i+1] - seen_t[i], exp_list[i].gap));
    end
    if (seen_t.size() == 13)
      check(done_at == seen_t[12] + TMRD, $sformatf("done at %0d, want %0d", done_at, seen_t[12] + TMRD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
