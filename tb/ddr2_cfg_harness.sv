// ddr2_cfg_harness -- drives one DDR2 model of a given geometry through
// write/read round trips (helper of tb_ddr2_model_cfg).
//
// Instantiates ddr2_model with the given data width, bank, row, column and
// address-pin counts and SRAM read latency, two behavioural SRAMs (of the
// matching synchronous or asynchronous kind), and its own clock. It plays the
// memory controller: for each of ROUNDS rounds it loads a random mode
// (BL4/BL8, sequential/interleaved, CL 3..5, AL 0..2), then activates random
// rows in random banks, writes a burst of random data at a random column
// and another at the same column with the top column bit flipped, and reads
// both back. Expected data come from a reference memory (one beat per
// column) and the JEDEC burst order, written here independently of the
// model. Write data are strobed WL = RL - 1 clocks after the WRITE, read
// data are checked in the clock RL after the READ, beat by beat on both
// clock phases. Any seq_err counts as a failure. checks/failures/done are
// outputs for the enclosing test bench.
module ddr2_cfg_harness #(
  parameter int unsigned DQ_BITS   = 8,
  parameter int unsigned BANK_BITS = 2,
  parameter int unsigned ROW_BITS  = 13,
  parameter int unsigned COL_BITS  = 10,
  parameter int unsigned ADDR_BITS = 13,
  parameter int unsigned ROUNDS    = 4,
  parameter int unsigned SRAM_RD_LAT = 1,
  parameter realtime     HALF      = 5ns
) (
  output int   checks,
  output int   failures,
  output logic done
);
  import ddr2_pkg::*;

  localparam int unsigned DM = (DQ_BITS + 7) / 8;
  localparam int unsigned AW = BANK_BITS + ROW_BITS + COL_BITS - 1;

  logic ck = 0, rst_n = 0;
  logic cke, cs_n, ras_n, cas_n, we_n;
  logic [BANK_BITS-1:0] ba;
  logic [ADDR_BITS-1:0] addr;
  logic [DQ_BITS-1:0]   dq_in, dq_out;
  logic [DM-1:0]        dqs_in, dm_in, dqs_out, dqs_n_out;
  logic dq_oe, dqs_oe, rdqs_out, rdqs_n_out, rdqs_oe;
  logic seq_err;
  ddr2_err_e err_code;
  logic [(1<<BANK_BITS)-1:0] bank_open;
  logic refreshing, power_down, self_refresh;
  logic sram0_cs_n, sram0_we_n, sram1_cs_n, sram1_we_n;
  logic [AW-1:0] sram0_addr, sram1_addr;
  logic [DQ_BITS-1:0] sram0_wdata, sram1_wdata, sram0_rdata, sram1_rdata;
  logic [DM-1:0] sram0_be_n, sram1_be_n;

  ddr2_model #(.DQ_BITS(DQ_BITS), .BANK_BITS(BANK_BITS), .ROW_BITS(ROW_BITS),
               .COL_BITS(COL_BITS), .ADDR_BITS(ADDR_BITS),
               .SRAM_RD_LAT(SRAM_RD_LAT)) dut (.*);

  sram_model #(.DQ_BITS(DQ_BITS), .AW(AW), .ASYNC(SRAM_RD_LAT == 0)) u_sram0 (
    .clk(ck), .cs_n(sram0_cs_n), .we_n(sram0_we_n), .addr(sram0_addr),
    .wdata(sram0_wdata), .be_n(sram0_be_n), .rdata(sram0_rdata));
  sram_model #(.DQ_BITS(DQ_BITS), .AW(AW), .ASYNC(SRAM_RD_LAT == 0)) u_sram1 (
    .clk(ck), .cs_n(sram1_cs_n), .we_n(sram1_we_n), .addr(sram1_addr),
    .wdata(sram1_wdata), .be_n(sram1_be_n), .rdata(sram1_rdata));

  always #HALF ck = ~ck;

  always @(posedge ck) if (rst_n && seq_err) begin
    checks++;
    failures++;
    $display("FAIL x%0d: unexpected seq_err %s at %0t", DQ_BITS, err_code.name(), $time);
  end

  // reference memory: one beat per {bank,row,column}
  logic [DQ_BITS-1:0] refmem [logic [BANK_BITS+ROW_BITS+COL_BITS-1:0]];

  function automatic logic [DQ_BITS-1:0] ref_rd(logic [BANK_BITS-1:0] b,
      logic [ROW_BITS-1:0] r, logic [COL_BITS-1:0] c);
    return refmem.exists({b, r, c}) ? refmem[{b, r, c}] : '0;
  endfunction

  // JEDEC burst order: column of beat i for start column c
  function automatic logic [COL_BITS-1:0] jedec_col(logic [COL_BITS-1:0] c, int i,
                                                    bit bl8, bit il);
    logic [COL_BITS-1:0] r;
    logic [2:0] ii;
    ii = 3'(i);
    r = c;
    if (il) begin
      if (bl8) r[2:0] = c[2:0] ^ ii;
      else     r[1:0] = c[1:0] ^ ii[1:0];
    end else begin
      r[1:0] = c[1:0] + ii[1:0];
      if (bl8) r[2] = c[2] ^ ii[2];
    end
    return r;
  endfunction

  // address pins of a READ/WRITE: A9..A0, A10 = auto precharge (0), A11.. upper
  function automatic logic [ADDR_BITS-1:0] col_pins(logic [COL_BITS-1:0] c);
    logic [ADDR_BITS-1:0] a;
    a = '0;
    for (int i = 0; i < COL_BITS; i++) a[i < 10 ? i : i + 1] = c[i];
    return a;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL x%0d: %s at %0t", DQ_BITS, what, $time);
    end
  endtask

  task automatic pins(logic k, logic cs, logic r, logic c, logic w,
                      logic [BANK_BITS-1:0] b, logic [ADDR_BITS-1:0] a);
    @(negedge ck);
    cke = k; cs_n = cs; ras_n = r; cas_n = c; we_n = w; ba = b; addr = a;
    @(posedge ck);
    #1;
    cs_n = 1'b0; ras_n = 1'b1; cas_n = 1'b1; we_n = 1'b1;
  endtask

  task automatic nop(int n = 1);
    repeat (n) pins(1, 0, 1, 1, 1, '0, '0);
  endtask

  int rl, bl;
  bit bl8, il;

  task automatic write_burst(logic [BANK_BITS-1:0] b, logic [ROW_BITS-1:0] r,
                             logic [COL_BITS-1:0] c);
    logic [DQ_BITS-1:0] beat [8];
    for (int i = 0; i < bl; i++) begin
      beat[i] = DQ_BITS'($urandom);
      refmem[{b, r, jedec_col(c, i, bl8, il)}] = beat[i];
    end
    pins(1, 0, 1, 0, 0, b, col_pins(c));
    repeat (rl - 2) @(posedge ck);          // to the edge that starts clock WL
    for (int k = 0; k < bl / 2; k++) begin
      @(posedge ck);
      dq_in = beat[2*k];
      #1 dqs_in = '1;
      #(HALF - 1ns) dq_in = beat[2*k+1];
      #1 dqs_in = '0;
    end
    nop(4);
  endtask

  task automatic read_burst(logic [BANK_BITS-1:0] b, logic [ROW_BITS-1:0] r,
                            logic [COL_BITS-1:0] c);
    logic [DQ_BITS-1:0] exp;
    pins(1, 0, 1, 0, 1, b, col_pins(c));
    repeat (rl - 1) @(posedge ck);          // clock RL - 1
    #2;
    check(dqs_oe && !dq_oe && dqs_out == '0, "read preamble");
    for (int k = 0; k < bl / 2; k++) begin
      @(posedge ck);
      #2;
      exp = ref_rd(b, r, jedec_col(c, 2*k, bl8, il));
      check(dq_oe && dq_out == exp && dqs_out == '1,
            $sformatf("beat %0d: %h expected %h", 2*k, dq_out, exp));
      @(negedge ck);
      #2;
      exp = ref_rd(b, r, jedec_col(c, 2*k+1, bl8, il));
      check(dq_oe && dq_out == exp && dqs_out == '0,
            $sformatf("beat %0d: %h expected %h", 2*k+1, dq_out, exp));
    end
    nop(3);
  endtask

  initial begin
    logic [BANK_BITS-1:0] b;
    logic [ROW_BITS-1:0]  r;
    logic [COL_BITS-1:0]  c, c2;
    int cl, al;
    checks = 0; failures = 0; done = 0;
    cke = 0; cs_n = 1; ras_n = 1; cas_n = 1; we_n = 1; ba = '0; addr = '0;
    dq_in = '0; dqs_in = '0; dm_in = '0;
    repeat (3) @(posedge ck);
    rst_n = 1;
    pins(1, 1, 1, 1, 1, '0, '0);            // CKE rises
    nop(2);
    for (int round = 0; round < ROUNDS; round++) begin
      cl  = $urandom_range(3, 5);
      al  = $urandom_range(0, 2);
      bl8 = 1'($urandom_range(0, 1));
      il  = 1'($urandom_range(0, 1));
      rl  = al + cl;
      bl  = bl8 ? 8 : 4;
      pins(1, 0, 0, 1, 0, '0, ADDR_BITS'(1 << 10));                    // PREA
      nop(3);
      pins(1, 0, 0, 0, 0, '0, ADDR_BITS'((cl << 4) | (int'(il) << 3) | (bl8 ? 3 : 2)));
      nop(2);
      pins(1, 0, 0, 0, 0, BANK_BITS'(1), ADDR_BITS'(al << 3));          // EMR
      nop(2);
      for (int k = 0; k < 6; k++) begin
        b  = BANK_BITS'($urandom);
        r  = ROW_BITS'($urandom);
        c  = COL_BITS'($urandom);
        c2 = c ^ (COL_BITS'(1) << (COL_BITS - 1));
        pins(1, 0, 0, 1, 1, b, ADDR_BITS'(r));                          // ACT
        nop(3);
        write_burst(b, r, c);
        write_burst(b, r, c2);
        read_burst(b, r, c);
        read_burst(b, r, c2);
        pins(1, 0, 0, 1, 0, b, '0);                                     // PRE
        nop(3);
      end
    end
    done = 1;
  end

endmodule
