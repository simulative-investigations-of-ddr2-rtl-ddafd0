// ddr2_instr_decoder -- turns the DDR2 command pins into one command per clock.
//
// On every rising clock edge the pins CKE, CS#, RAS#, CAS#, WE# are sampled
// together with the value CKE had on the previous edge and translated into
// an enumerated command (ddr2_pkg::ddr2_cmd_e). The bank address, the row
// address, the column address and the mode-register operand are registered
// in the same edge, so all outputs appear one clock after the pins.
// Address bit A10 selects auto precharge for READ/WRITE and "all banks" for
// PRECHARGE. While rst_n is low the command reads DESEL and every address
// output is zero, as the design specifies.
//
// The truth table is the JEDEC DDR2 one:
//   CKE prev/cur = 1/1 : CS#=1 DESEL; RAS#,CAS#,WE# = 111 NOP, 011 ACT,
//                        101 READ(A), 100 WRITE(A), 010 PRE(A), 001 REF,
//                        000 MRS, 110 illegal
//   CKE 1/0           : REF -> self-refresh entry, NOP/DESEL -> power-down entry
//   CKE 0/1           : NOP/DESEL -> exit from power down or self refresh
//   CKE 0/0           : no command
// Column bits above A9 come from A11 upwards, skipping A10 (JEDEC).
// The default sizes (3 bank bits, 11 row bits, 9 column bits, 11 address
// pins) follow the design; the 14-bit operand is the address zero-extended
// to A13..A0.
module ddr2_instr_decoder
  import ddr2_pkg::*;
#(
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = 11,
  parameter int unsigned COL_BITS  = 9,
  parameter int unsigned ADDR_BITS = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cke,
  input  logic                   cs_n,
  input  logic                   ras_n,
  input  logic                   cas_n,
  input  logic                   we_n,
  input  logic [BANK_BITS-1:0]   bank_in,
  input  logic [ADDR_BITS-1:0]   addr,
  output ddr2_cmd_e              cmd,
  output logic [BANK_BITS-1:0]   bank,
  output logic [ROW_BITS-1:0]    row_addr,
  output logic [COL_BITS-1:0]    col_addr,
  output logic [OPCODE_BITS-1:0] opcode
);

  logic cke_q;  // CKE as sampled on the last edge

  initial begin
    assert (ADDR_BITS >= 11 && ADDR_BITS >= ROW_BITS && ADDR_BITS >= COL_BITS
            && (COL_BITS <= 10 || ADDR_BITS > COL_BITS) && ADDR_BITS <= OPCODE_BITS)
      else $error("ddr2_instr_decoder: address width does not fit");
  end

  ddr2_cmd_e cmd_d;
  logic      a10;

  assign a10 = addr[10];

  // Column address pins: A9..A0, then A11 and up (A10 is the auto
  // precharge flag and never carries a column bit).
  logic [COL_BITS-1:0] col_d;

  always_comb begin
    for (int i = 0; i < COL_BITS; i++) col_d[i] = (i < 10) ? addr[i] : addr[i + 1];
  end

  always_comb begin
    cmd_d = CMD_ILLEGAL;
    unique case ({cke_q, cke})
      2'b11: begin
        if (cs_n) cmd_d = CMD_DESEL;
        else begin
          unique case ({ras_n, cas_n, we_n})
            3'b111: cmd_d = CMD_NOP;
            3'b011: cmd_d = CMD_ACT;
            3'b101: cmd_d = a10 ? CMD_READA  : CMD_READ;
            3'b100: cmd_d = a10 ? CMD_WRITEA : CMD_WRITE;
            3'b010: cmd_d = a10 ? CMD_PREA   : CMD_PRE;
            3'b001: cmd_d = CMD_REF;
            3'b000: cmd_d = CMD_MRS;
            default: cmd_d = CMD_ILLEGAL;
          endcase
        end
      end
      2'b10: begin
        if (!cs_n && {ras_n, cas_n, we_n} == 3'b001) cmd_d = CMD_SREF_ENTRY;
        else if (cs_n || {ras_n, cas_n, we_n} == 3'b111) cmd_d = CMD_PD_ENTRY;
        else cmd_d = CMD_ILLEGAL;
      end
      2'b01: begin
        if (cs_n || {ras_n, cas_n, we_n} == 3'b111) cmd_d = CMD_CKE_EXIT;
        else cmd_d = CMD_ILLEGAL;
      end
      default: cmd_d = CMD_NONE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd      <= CMD_DESEL;
      bank     <= '0;
      row_addr <= '0;
      col_addr <= '0;
      opcode   <= '0;
      cke_q    <= 1'b0;
    end else begin
      cmd      <= cmd_d;
      bank     <= bank_in;
      row_addr <= addr[ROW_BITS-1:0];
      col_addr <= col_d;
      opcode   <= OPCODE_BITS'(addr);
      cke_q    <= cke;
    end
  end

endmodule
