// ddr2_model -- synthesizable, cycle-accurate DDR2 SDRAM model that keeps its
// data in two external SRAMs.
//
// Seen from the memory controller, this behaves like a DDR2 device: it
// takes commands on CKE/CS#/RAS#/CAS#/WE#, bank and address pins, accepts
// write bursts strobed by DQS and returns read bursts with DQS (and RDQS)
// at read latency RL = AL + CL, write latency WL = RL - 1, burst length 4
// or 8, sequential or interleaved order. Seen from the storage side, it is
// two SRAMs, each one beat wide, one for even and one for odd columns.
//
// Control path: ddr2_instr_decoder -> ddr2_bank_control (all-bank FSM,
// one FSM per bank, illegal sequences flagged on seq_err/err_code, burst
// scheduling).
// Data path: ddr2_interface (DDR <-> double-width word per clock) ->
// ddr2_sram_interface (burst order, even/odd split, CS/WE/byte masks) ->
// ddr2_addr_reorder (one per SRAM: {bank,row,col} -> {row,bank,col}).
//
// Pins that are bidirectional on a DDR2 device (DQ, DQS, DQS#, RDQS) are
// split into input, output and output-enable signals. Defaults: 8 banks,
// 11 row bits, 9 column bits (from the design), 16 data bits and DDR2-400
// timings in clocks (this model's choice). SRAM_RD_LAT selects the kind of
// SRAM: 1 (default) for synchronous SRAM or block RAM that returns data one
// clock after the address, 0 for asynchronous SRAM that returns it in the
// same clock.
module ddr2_model
  import ddr2_pkg::*;
#(
  parameter int unsigned DQ_BITS   = 16,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = 11,
  parameter int unsigned COL_BITS  = 9,
  parameter int unsigned ADDR_BITS = 11,
  parameter int unsigned T_RCD     = 3,
  parameter int unsigned T_RP      = 3,
  parameter int unsigned T_WR      = 3,
  parameter int unsigned T_RFC     = 21,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned SRAM_RD_LAT = 1,
  localparam int unsigned DM_BITS  = (DQ_BITS + 7) / 8,
  localparam int unsigned DQS_BITS = (DQ_BITS + 7) / 8,
  localparam int unsigned SA_BITS  = BANK_BITS + ROW_BITS + COL_BITS - 1
) (
  input  logic                 ck,
  input  logic                 rst_n,
  // command and address pins
  input  logic                 cke,
  input  logic                 cs_n,
  input  logic                 ras_n,
  input  logic                 cas_n,
  input  logic                 we_n,
  input  logic [BANK_BITS-1:0] ba,
  input  logic [ADDR_BITS-1:0] addr,
  // data pins
  input  logic [DQ_BITS-1:0]   dq_in,
  input  logic [DQS_BITS-1:0]  dqs_in,
  input  logic [DM_BITS-1:0]   dm_in,
  output logic [DQ_BITS-1:0]   dq_out,
  output logic                 dq_oe,
  output logic [DQS_BITS-1:0]  dqs_out,
  output logic [DQS_BITS-1:0]  dqs_n_out,
  output logic                 dqs_oe,
  output logic                 rdqs_out,
  output logic                 rdqs_n_out,
  output logic                 rdqs_oe,
  // sequence checker
  output logic                 seq_err,
  output ddr2_err_e            err_code,
  // device state, for observation
  output logic [(1<<BANK_BITS)-1:0] bank_open,
  output logic                 refreshing,
  output logic                 power_down,
  output logic                 self_refresh,
  // SRAM0 (even columns)
  output logic                 sram0_cs_n,
  output logic                 sram0_we_n,
  output logic [SA_BITS-1:0]   sram0_addr,
  output logic [DQ_BITS-1:0]   sram0_wdata,
  output logic [DM_BITS-1:0]   sram0_be_n,
  input  logic [DQ_BITS-1:0]   sram0_rdata,
  // SRAM1 (odd columns)
  output logic                 sram1_cs_n,
  output logic                 sram1_we_n,
  output logic [SA_BITS-1:0]   sram1_addr,
  output logic [DQ_BITS-1:0]   sram1_wdata,
  output logic [DM_BITS-1:0]   sram1_be_n,
  input  logic [DQ_BITS-1:0]   sram1_rdata
);

  // ----------------------------------------------------------- control
  ddr2_cmd_e              cmd;
  logic [BANK_BITS-1:0]   dec_bank;
  logic [ROW_BITS-1:0]    dec_row;
  logic [COL_BITS-1:0]    dec_col;
  logic [OPCODE_BITS-1:0] dec_opcode;

  ddr2_instr_decoder #(
    .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS),
    .COL_BITS(COL_BITS), .ADDR_BITS(ADDR_BITS)
  ) u_decoder (
    .clk(ck), .rst_n, .cke, .cs_n, .ras_n, .cas_n, .we_n,
    .bank_in(ba), .addr,
    .cmd, .bank(dec_bank), .row_addr(dec_row), .col_addr(dec_col),
    .opcode(dec_opcode)
  );

  ddr2_mode_t             mode;
  logic                   burst_start, burst_write;
  logic [BANK_BITS-1:0]   burst_bank;
  logic [ROW_BITS-1:0]    burst_row;
  logic [COL_BITS-1:0]    burst_col;

  ddr2_bank_control #(
    .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS),
    .T_RCD(T_RCD), .T_RP(T_RP), .T_WR(T_WR), .T_RFC(T_RFC), .T_MRD(T_MRD),
    .SRAM_RD_LAT(SRAM_RD_LAT)
  ) u_bank_control (
    .clk(ck), .rst_n, .cmd, .bank(dec_bank), .row_addr(dec_row),
    .col_addr(dec_col), .opcode(dec_opcode),
    .mode, .burst_start, .burst_write, .burst_bank, .burst_row, .burst_col,
    .seq_err, .err_code, .bank_open, .refreshing, .power_down, .self_refresh
  );

  // -------------------------------------------------------------- data
  logic [2*DQ_BITS-1:0] wr_data, rd_data;
  logic [2*DM_BITS-1:0] wr_mask;
  logic                 rd_valid;

  ddr2_interface #(.DQ_BITS(DQ_BITS)) u_ddr2_if (
    .clk(ck), .rst_n, .mode,
    .dq_in, .dqs_in, .dm_in,
    .dq_out, .dq_oe, .dqs_out, .dqs_n_out, .dqs_oe,
    .rdqs_out, .rdqs_n_out, .rdqs_oe,
    .wr_data, .wr_mask, .rd_valid, .rd_data
  );

  logic [SA_BITS-1:0] s0_addr, s1_addr;

  ddr2_sram_interface #(
    .DQ_BITS(DQ_BITS), .BANK_BITS(BANK_BITS),
    .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .SRAM_RD_LAT(SRAM_RD_LAT)
  ) u_sram_if (
    .clk(ck), .rst_n, .mode,
    .burst_start, .burst_write, .burst_bank, .burst_row, .burst_col,
    .wr_data, .wr_mask, .rd_valid, .rd_data,
    .sram0_cs_n, .sram0_we_n, .sram0_addr(s0_addr), .sram0_wdata,
    .sram0_be_n, .sram0_rdata,
    .sram1_cs_n, .sram1_we_n, .sram1_addr(s1_addr), .sram1_wdata,
    .sram1_be_n, .sram1_rdata
  );

  ddr2_addr_reorder #(
    .ADDR_W(SA_BITS), .BANK_BITS(BANK_BITS), .COL_BITS(COL_BITS - 1)
  ) u_reorder0 (.sram_addr(s0_addr), .addr_re(sram0_addr));

  ddr2_addr_reorder #(
    .ADDR_W(SA_BITS), .BANK_BITS(BANK_BITS), .COL_BITS(COL_BITS - 1)
  ) u_reorder1 (.sram_addr(s1_addr), .addr_re(sram1_addr));

endmodule
