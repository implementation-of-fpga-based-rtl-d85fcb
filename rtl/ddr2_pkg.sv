// ddr2_pkg: types and constants shared by the DDR2 SDRAM controller.
//
// The command set is the one of the DDR2 truth table (load mode, refresh,
// self refresh entry, precharge, activate, write, read, NOP, deselect).
// Power-down and self refresh are not separate pin encodings: they are a NOP
// or REFRESH issued together with CKE going low, so the enum carries them as
// commands and the encoder derives the pin levels. The state enum follows the
// controller state diagram (idle, activating, bank active, writing, reading,
// the auto-precharge variants, precharging, refreshing and the two power-down
// states plus self refresh), with one extra state of this design's own for
// the wait after leaving a CKE-low state. Widths follow the device: 14 row/address bits
// (A0-A13), 3 bank bits (BA2-BA0), 10 column bits and a 16-bit data bus,
// and the burst length is 4 (the 4n prefetch of DDR2). The numeric encodings
// of both enums are this design's choice.
package ddr2_pkg;

  localparam int unsigned ADDR_W = 14;  // A0..A13
  localparam int unsigned BA_W   = 3;   // BA2..BA0
  localparam int unsigned COL_W  = 10;  // column address width
  localparam int unsigned DQ_W   = 16;  // external data bus
  localparam int unsigned DM_W   = DQ_W / 8;  // one mask bit per byte lane
  localparam int unsigned BL     = 4;   // burst length: 4n prefetch

  // Controller-level commands.
  typedef enum logic [3:0] {
    CMD_NOP      = 4'd0,
    CMD_DESELECT = 4'd1,
    CMD_LMR      = 4'd2,   // LOAD MODE (MRS / EMRS, register chosen by BA)
    CMD_REFRESH  = 4'd3,   // auto refresh
    CMD_SREF_EN  = 4'd4,   // self refresh entry (REFRESH with CKE low)
    CMD_PRE      = 4'd5,   // precharge (A10 selects single bank / all banks)
    CMD_ACT      = 4'd6,   // bank activate
    CMD_WRITE    = 4'd7,   // write (A10 = auto precharge)
    CMD_READ     = 4'd8,   // read  (A10 = auto precharge)
    CMD_PDN_EN   = 4'd9,   // power-down entry (NOP with CKE low)
    CMD_CKE_EXIT = 4'd10   // power-down / self refresh exit (NOP, CKE high)
  } ddr2_cmd_e;

  // Pin levels of one command slot (active-low controls).
  typedef struct packed {
    logic cs_n;
    logic ras_n;
    logic cas_n;
    logic we_n;
  } ddr2_pins_t;

  // Controller states.
  typedef enum logic [3:0] {
    ST_INIT        = 4'd0,
    ST_IDLE        = 4'd1,
    ST_REFRESHING  = 4'd2,
    ST_SELF_REFR   = 4'd3,
    ST_PRE_PDN     = 4'd4,
    ST_ACTIVATING  = 4'd5,
    ST_BANK_ACTIVE = 4'd6,
    ST_ACT_PDN     = 4'd7,
    ST_WRITING     = 4'd8,
    ST_WRITING_AP  = 4'd9,
    ST_READING     = 4'd10,
    ST_READING_AP  = 4'd11,
    ST_PRECHARGING = 4'd12,
    ST_PDN_EXIT    = 4'd13,  // waiting tXP / tXSNR after CKE returns high
    ST_SETTING_MR  = 4'd14   // waiting tMRD after a host (E)MRS
  } ddr2_state_e;

  // One burst of data as seen by the host: BL beats of DQ_W bits.
  typedef logic [BL-1:0][DQ_W-1:0] burst_t;
  typedef logic [BL-1:0][DM_W-1:0] burst_mask_t;

endpackage
