// ddr2_pkg -- types and constants shared by the DDR2 SDRAM model.
//
// The model turns the command pins of a DDR2 device into "advanced"
// commands (one enumerated value per DDR2 instruction) and keeps those
// encodings here, together with the mode-register fields that set burst
// length, burst order, CAS latency, additive latency and the RDQS enable.
// Grouping the command encodings in one package follows the design; the
// particular encodings, the mode-register bit positions (taken from the
// JEDEC DDR2 definition) and the timing defaults are this model's choice.
package ddr2_pkg;

  // Decoded command, one per clock.
  typedef enum logic [3:0] {
    CMD_DESEL      = 4'd0,   // chip not selected
    CMD_NOP        = 4'd1,
    CMD_ACT        = 4'd2,   // activate a row
    CMD_READ       = 4'd3,
    CMD_READA      = 4'd4,   // read with auto precharge
    CMD_WRITE      = 4'd5,
    CMD_WRITEA     = 4'd6,   // write with auto precharge
    CMD_PRE        = 4'd7,   // precharge one bank
    CMD_PREA       = 4'd8,   // precharge all banks
    CMD_REF        = 4'd9,   // auto refresh
    CMD_SREF_ENTRY = 4'd10,  // self refresh entry (CKE falls)
    CMD_PD_ENTRY   = 4'd11,  // power-down entry (CKE falls)
    CMD_CKE_EXIT   = 4'd12,  // power-down or self-refresh exit (CKE rises)
    CMD_MRS        = 4'd13,  // load (extended) mode register
    CMD_NONE       = 4'd14,  // CKE held low: no command
    CMD_ILLEGAL    = 4'd15
  } ddr2_cmd_e;

  // Reason for a flagged command sequence.
  typedef enum logic [2:0] {
    ERR_NONE       = 3'd0,
    ERR_ILLEGAL    = 3'd1,   // pin combination that is no DDR2 command
    ERR_BANK_STATE = 3'd2,   // bank command not allowed in the bank's state
    ERR_TIMING     = 3'd3,   // bank command issued before tRCD / tRP elapsed
    ERR_DEV_STATE  = 3'd4,   // command not allowed in refresh, MRS, power down
    ERR_NOT_IDLE   = 3'd5,   // refresh / MRS / self refresh with banks open
    ERR_BURST      = 3'd6    // a new burst collides with one in progress
  } ddr2_err_e;

  // Operating mode held by the mode registers.
  typedef struct packed {
    logic       bl8;         // MR A2:A0 = 3'b011 -> 8, otherwise 4
    logic       interleave;  // MR A3: 0 sequential, 1 interleaved
    logic [2:0] cl;          // MR A6:A4: CAS latency, 3..6
    logic [2:0] al;          // EMR A5:A3: additive latency, 0..5
    logic       rdqs_en;     // EMR A11: RDQS enable
  } ddr2_mode_t;

  localparam ddr2_mode_t MODE_RESET = '{bl8: 1'b0, interleave: 1'b0,
                                        cl: 3'd3, al: 3'd0, rdqs_en: 1'b0};

  // Width of the mode-register operand (address pins A13..A0).
  localparam int unsigned OPCODE_BITS = 14;

  // Largest read latency AL + CL that the scheduler supports.
  localparam int unsigned MAX_RL = 11;

endpackage
