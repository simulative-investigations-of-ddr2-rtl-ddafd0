// ddr2_addr_reorder -- reorders the address fields for the SRAM address bus.
//
// The controller side forms the storage address as {bank, row, column};
// the SRAM bus expects the bank field between row and column, so that the
// banks of one row sit next to each other:
//   sram_addr = {bank, row, col}  ->  addr_re = {row, bank, col}
// Purely combinational, no clock. The field widths are parameters: the
// design's example uses a 24-bit address, 3 bank bits and a 9-bit column
// field, which are the defaults; the model instantiates it with the SRAM
// word address (the column field then lacks its lowest bit, which selects
// SRAM0 or SRAM1). The design says only that the address order is changed
// to match the bus order; the particular permutation is this model's.
module ddr2_addr_reorder #(
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned COL_BITS  = 9
) (
  input  logic [ADDR_W-1:0] sram_addr,
  output logic [ADDR_W-1:0] addr_re
);

  localparam int unsigned ROW_BITS = ADDR_W - BANK_BITS - COL_BITS;

  logic [BANK_BITS-1:0] bank;
  logic [ROW_BITS-1:0]  row;
  logic [COL_BITS-1:0]  col;

  assign {bank, row, col} = sram_addr;
  assign addr_re          = {row, bank, col};

endmodule
