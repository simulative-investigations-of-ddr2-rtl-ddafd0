// ddr2_sram_interface -- reads and writes the burst data in two SRAMs.
//
// The storage is split in two: SRAM0 holds the beats whose column address
// is even, SRAM1 those whose column address is odd. Each clock carries one
// double-width data pair (two consecutive beats of the DDR2 burst), and in
// both burst orders two consecutive beats always have one even and one odd
// column, so each SRAM makes exactly one access per clock. The address
// given to each SRAM is {bank, row, column / 2}.
//
// A burst starts when burst_start is high; the first pair is addressed in
// that same clock (combinationally), the remaining BL/2 - 1 pairs in the
// following clocks. Beat i of a burst starting at column c uses column
//   sequential : c[2] ^ i[2] (BL8 only), (c[1:0] + i[1:0]) mod 4
//   interleaved: c[2:0] ^ i (BL8), c[1:0] ^ i (BL4)
// which is the DDR2 burst order (JEDEC), with the upper column bits fixed.
// In a pair, the low half is the first beat. If that beat's column is odd
// the halves are swapped on their way to and from the SRAMs.
//
// Writes: wr_data/wr_mask hold the pair in the clock the pair is addressed;
// chip select, write enable and active-low byte write enables are driven in
// the same clock (the SRAMs sample on the next rising edge). Masked bytes
// (DM = 1) keep their byte enable high.
// Reads: with SRAM_RD_LAT = 1 (default, synchronous SRAM or FPGA block RAM)
// the SRAMs return data one clock after the address and rd_valid/rd_data
// (the pair, first beat low) follow in that clock. With SRAM_RD_LAT = 0
// (asynchronous SRAM) data return in the same clock, rd_valid is
// combinational, and WE# is pulsed only while the clock is low.
// The even/odd split, the double-width bus and the CS/WE/mask generation
// follow the design; the two SRAM timings and the WE# pulse are this
// model's choices.
module ddr2_sram_interface
  import ddr2_pkg::*;
#(
  parameter int unsigned DQ_BITS   = 16,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = 11,
  parameter int unsigned COL_BITS  = 9,
  parameter int unsigned SRAM_RD_LAT = 1,
  localparam int unsigned DM_BITS  = (DQ_BITS + 7) / 8,
  localparam int unsigned SA_BITS  = BANK_BITS + ROW_BITS + COL_BITS - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ddr2_mode_t             mode,
  input  logic                   burst_start,
  input  logic                   burst_write,
  input  logic [BANK_BITS-1:0]   burst_bank,
  input  logic [ROW_BITS-1:0]    burst_row,
  input  logic [COL_BITS-1:0]    burst_col,
  input  logic [2*DQ_BITS-1:0]   wr_data,
  input  logic [2*DM_BITS-1:0]   wr_mask,
  output logic                   rd_valid,
  output logic [2*DQ_BITS-1:0]   rd_data,
  // SRAM0: even columns
  output logic                   sram0_cs_n,
  output logic                   sram0_we_n,
  output logic [SA_BITS-1:0]     sram0_addr,
  output logic [DQ_BITS-1:0]     sram0_wdata,
  output logic [DM_BITS-1:0]     sram0_be_n,
  input  logic [DQ_BITS-1:0]     sram0_rdata,
  // SRAM1: odd columns
  output logic                   sram1_cs_n,
  output logic                   sram1_we_n,
  output logic [SA_BITS-1:0]     sram1_addr,
  output logic [DQ_BITS-1:0]     sram1_wdata,
  output logic [DM_BITS-1:0]     sram1_be_n,
  input  logic [DQ_BITS-1:0]     sram1_rdata
);

  initial assert (COL_BITS >= 3 && (DQ_BITS % 8 == 0 || DQ_BITS == 4))
    else $error("ddr2_sram_interface: unsupported widths");

  // burst state kept for the pairs after the first
  logic                 act_q, wr_q, bl8_q, il_q;
  logic [1:0]           k_q;
  logic [BANK_BITS-1:0] bank_q;
  logic [ROW_BITS-1:0]  row_q;
  logic [COL_BITS-1:0]  col_q;

  // the pair addressed in this clock
  logic                 cur_act, cur_wr, cur_bl8, cur_il;
  logic [1:0]           cur_k;
  logic [BANK_BITS-1:0] cur_bank;
  logic [ROW_BITS-1:0]  cur_row;
  logic [COL_BITS-1:0]  cur_col, c_first, c_second, c_even, c_odd;
  logic                 swap;

  function automatic logic [COL_BITS-1:0] beat_col(
      input logic [COL_BITS-1:0] c, input logic [2:0] i,
      input logic bl8, input logic il);
    logic [COL_BITS-1:0] r;
    r = c;
    r[1:0] = il ? (c[1:0] ^ i[1:0]) : (c[1:0] + i[1:0]);
    if (bl8) r[2] = c[2] ^ i[2];
    return r;
  endfunction

  always_comb begin
    if (burst_start) begin
      cur_act  = 1'b1;
      cur_wr   = burst_write;
      cur_bl8  = mode.bl8;
      cur_il   = mode.interleave;
      cur_k    = 2'd0;
      cur_bank = burst_bank;
      cur_row  = burst_row;
      cur_col  = burst_col;
    end else begin
      cur_act  = act_q;
      cur_wr   = wr_q;
      cur_bl8  = bl8_q;
      cur_il   = il_q;
      cur_k    = k_q;
      cur_bank = bank_q;
      cur_row  = row_q;
      cur_col  = col_q;
    end
    c_first  = beat_col(cur_col, {cur_k, 1'b0}, cur_bl8, cur_il);
    c_second = beat_col(cur_col, {cur_k, 1'b1}, cur_bl8, cur_il);
    swap     = c_first[0];
    c_even   = swap ? c_second : c_first;
    c_odd    = swap ? c_first  : c_second;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q  <= 1'b0;
      wr_q   <= 1'b0;
      bl8_q  <= 1'b0;
      il_q   <= 1'b0;
      k_q    <= '0;
      bank_q <= '0;
      row_q  <= '0;
      col_q  <= '0;
    end else begin
      if (burst_start) begin
        wr_q   <= burst_write;
        bl8_q  <= mode.bl8;
        il_q   <= mode.interleave;
        bank_q <= burst_bank;
        row_q  <= burst_row;
        col_q  <= burst_col;
      end
      act_q <= cur_act && (cur_k != (cur_bl8 ? 2'd3 : 2'd1));
      k_q   <= cur_act ? cur_k + 2'd1 : 2'd0;
    end
  end

  // SRAM strobes, addresses and write data
  assign sram0_cs_n  = !cur_act;
  assign sram1_cs_n  = !cur_act;
  // An asynchronous SRAM writes while WE# is low, so WE# is then only
  // pulsed in the clock's low half, when address and data are stable.
  logic we_phase;
  assign we_phase    = (SRAM_RD_LAT != 0) || !clk;
  assign sram0_we_n  = !(cur_act && cur_wr && we_phase);
  assign sram1_we_n  = !(cur_act && cur_wr && we_phase);
  assign sram0_addr  = {cur_bank, cur_row, c_even[COL_BITS-1:1]};
  assign sram1_addr  = {cur_bank, cur_row, c_odd[COL_BITS-1:1]};
  assign sram0_wdata = swap ? wr_data[2*DQ_BITS-1:DQ_BITS] : wr_data[DQ_BITS-1:0];
  assign sram1_wdata = swap ? wr_data[DQ_BITS-1:0] : wr_data[2*DQ_BITS-1:DQ_BITS];
  assign sram0_be_n  = swap ? wr_mask[2*DM_BITS-1:DM_BITS] : wr_mask[DM_BITS-1:0];
  assign sram1_be_n  = swap ? wr_mask[DM_BITS-1:0] : wr_mask[2*DM_BITS-1:DM_BITS];

  // read data return SRAM_RD_LAT clocks after the address (0 or 1)
  logic rd_q, swap_q, rd_now, swap_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= 1'b0;
      swap_q <= 1'b0;
    end else begin
      rd_q   <= cur_act && !cur_wr;
      swap_q <= swap;
    end
  end

  assign rd_now   = (SRAM_RD_LAT == 0) ? (cur_act && !cur_wr) : rd_q;
  assign swap_rd  = (SRAM_RD_LAT == 0) ? swap : swap_q;
  assign rd_valid = rd_now;
  assign rd_data  = swap_rd ? {sram0_rdata, sram1_rdata} : {sram1_rdata, sram0_rdata};

endmodule
