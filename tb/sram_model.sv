// sram_model -- behavioural model of one external SRAM (test benches only).
//
// Synchronous single-port RAM, DQ_BITS wide with one active-low write
// enable per byte lane (a single 4-bit lane for a 4-bit wide part). On a
// rising clock edge with cs_n low it writes the
// enabled bytes when we_n is low, or returns the addressed word on rdata
// (valid after the edge, one clock latency) when we_n is high. Storage is
// sparse (associative array), so the full address range costs nothing;
// words never written read as zero. peek() lets a test bench inspect a word.
// With ASYNC set it behaves as an asynchronous SRAM instead: it writes
// while CS# and WE# are low and its read data follow the address at once.
module sram_model #(
  parameter int unsigned DQ_BITS = 16,
  parameter int unsigned AW      = 22,
  parameter bit          ASYNC   = 1'b0,
  localparam int unsigned LANES  = (DQ_BITS + 7) / 8,
  localparam int unsigned LANE_W = DQ_BITS / LANES
) (
  input  logic               clk,
  input  logic               cs_n,
  input  logic               we_n,
  input  logic [AW-1:0]      addr,
  input  logic [DQ_BITS-1:0] wdata,
  input  logic [LANES-1:0]   be_n,
  output logic [DQ_BITS-1:0] rdata
);

  logic [DQ_BITS-1:0] mem [logic [AW-1:0]];
  int unsigned        n_reads = 0, n_writes = 0;

  initial rdata = '0;

  function automatic logic [DQ_BITS-1:0] peek(logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  // asynchronous part: level-sensitive write while CS# and WE# are low,
  // read data follow the address in the same clock
  always @(cs_n, we_n, addr, wdata, be_n) begin
    if (ASYNC && !cs_n) begin
      if (!we_n) begin
        logic [DQ_BITS-1:0] w;
        w = peek(addr);
        for (int b = 0; b < LANES; b++)
          if (!be_n[b]) w[b*LANE_W +: LANE_W] = wdata[b*LANE_W +: LANE_W];
        mem[addr] = w;
        n_writes++;
      end else begin
        rdata = peek(addr);
        n_reads++;
      end
    end
  end

  always @(posedge clk) begin
    if (!ASYNC && !cs_n) begin
      if (!we_n) begin
        logic [DQ_BITS-1:0] w;
        w = peek(addr);
        for (int b = 0; b < LANES; b++)
          if (!be_n[b]) w[b*LANE_W +: LANE_W] = wdata[b*LANE_W +: LANE_W];
        mem[addr] = w;
        n_writes++;
      end else begin
        rdata <= peek(addr);
        n_reads++;
      end
    end
  end

endmodule
