// ddr2_cmd_enc: DDR2 command truth table.
//
// Turns a controller command into the levels of the four active-low command
// pins CS#, RAS#, CAS#, WE#, and the clock enable CKE. The encoding is the
// DDR2 truth table:
//   LOAD MODE   L L L L        REFRESH        L L L H
//   PRECHARGE   L L H L        BANK ACTIVATE  L L H H
//   WRITE       L H L L        READ           L H L H
//   NO OPERATION L H H H       DESELECT       H x x x
// Self refresh entry is the REFRESH encoding with CKE going low; power-down
// entry and exit, and self refresh exit, are a deselect with CKE going low or
// high. While the device sits in power-down or self refresh (cke_hold_low) CKE
// stays low for NOP/deselect; any other command drives CKE high.
// The bank address, A10 and the other address bits are not touched here:
// the sequencer sets them (A10 high = all banks / auto precharge).
// Purely combinational; the command source is registered, so the pins change
// once per clock right after the rising edge. "Don't care" (X) truth table
// entries are driven high, a choice of this design.
module ddr2_cmd_enc
  import ddr2_pkg::*;
(
  input  ddr2_cmd_e cmd,
  input  logic      cke_hold_low,  // device is in power-down / self refresh
  output logic      cke,
  output logic      cs_n,
  output logic      ras_n,
  output logic      cas_n,
  output logic      we_n
);

  always_comb begin
    cke = 1'b1;
    {cs_n, ras_n, cas_n, we_n} = 4'b0111;  // NOP
    unique case (cmd)
      CMD_NOP:      begin cke = ~cke_hold_low; {cs_n, ras_n, cas_n, we_n} = 4'b0111; end
      CMD_DESELECT: begin cke = ~cke_hold_low; {cs_n, ras_n, cas_n, we_n} = 4'b1111; end
      CMD_LMR:      {cs_n, ras_n, cas_n, we_n} = 4'b0000;
      CMD_REFRESH:  {cs_n, ras_n, cas_n, we_n} = 4'b0001;
      CMD_SREF_EN:  begin cke = 1'b0; {cs_n, ras_n, cas_n, we_n} = 4'b0001; end
      CMD_PRE:      {cs_n, ras_n, cas_n, we_n} = 4'b0010;
      CMD_ACT:      {cs_n, ras_n, cas_n, we_n} = 4'b0011;
      CMD_WRITE:    {cs_n, ras_n, cas_n, we_n} = 4'b0100;
      CMD_READ:     {cs_n, ras_n, cas_n, we_n} = 4'b0101;
      CMD_PDN_EN:   begin cke = 1'b0; {cs_n, ras_n, cas_n, we_n} = 4'b1111; end
      CMD_CKE_EXIT: begin cke = 1'b1; {cs_n, ras_n, cas_n, we_n} = 4'b1111; end
      default:      {cs_n, ras_n, cas_n, we_n} = 4'b0111;
    endcase
  end

endmodule
