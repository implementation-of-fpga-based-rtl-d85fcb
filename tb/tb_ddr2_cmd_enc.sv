// tb_ddr2_cmd_enc: checks the command encoder against the DDR2 truth table.
//
// For every command and both values of `cke_hold_low` it compares CKE, CS#,
// RAS#, CAS#, WE# with the truth-table row written out here as a string of
// pin levels ("H"/"L"), independently of the encoder's case statement.
module tb_ddr2_cmd_enc;
  import ddr2_pkg::*;

  ddr2_cmd_e cmd;
  logic      hold, cke, cs_n, ras_n, cas_n, we_n;
  int        checks = 0, failures = 0;

  ddr2_cmd_enc dut (.cmd, .cke_hold_low(hold), .cke, .cs_n, .ras_n, .cas_n, .we_n);

  // expected "CKE CS# RAS# CAS# WE#" as H/L characters
  function automatic string expect_pins(ddr2_cmd_e c, logic h);
    case (c)
      CMD_LMR:      return "HLLLL";
      CMD_REFRESH:  return "HLLLH";
      CMD_SREF_EN:  return "LLLLH";
      CMD_PRE:      return "HLLHL";
      CMD_ACT:      return "HLLHH";
      CMD_WRITE:    return "HLHLL";
      CMD_READ:     return "HLHLH";
      CMD_NOP:      return h ? "LLHHH" : "HLHHH";
      CMD_DESELECT: return h ? "LHHHH" : "HHHHH";
      CMD_PDN_EN:   return "LHHHH";
      CMD_CKE_EXIT: return "HHHHH";
      default:      return "?????";
    endcase
  endfunction

  function automatic string got_pins();
    string s;
    s = "";
    s = {cke ? "H" : "L", cs_n ? "H" : "L", ras_n ? "H" : "L", cas_n ? "H" : "L", we_n ? "H" : "L"};
    return s;
  endfunction

  initial begin
    repeat (1000) #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 2; h++) begin
      for (int c = 0; c <= int'(CMD_CKE_EXIT); c++) begin
        cmd  = ddr2_cmd_e'(c);
        hold = 1'(h);
        #1;
        checks++;
        if (got_pins() != expect_pins(cmd, hold)) begin
          failures++;
          $display("FAIL: %s hold=%0d got %s want %s", cmd.name(), h, got_pins(), expect_pins(cmd, hold));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
