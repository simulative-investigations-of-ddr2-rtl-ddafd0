// tb_ddr2_sram_interface -- self-checking test of the SRAM interface block.
//
// Two behavioural SRAMs hang on the block. 200 random write bursts (BL4 or
// BL8, sequential or interleaved, random start column, random byte masks)
// are followed by read bursts of the same places. The expected column of
// every beat comes from the JEDEC burst-order table (BL8 sequential is
// spelled out as a table), so it is independent of the block's formula.
// Checked: every beat lands in SRAM0 for even and SRAM1 for odd columns at
// {bank,row,col/2}, masked bytes are kept, each burst occupies exactly BL/2
// clocks of chip select, read data come back one clock after their pair was
// addressed, in burst order, first beat in the low half.
module tb_ddr2_sram_interface;
  import ddr2_pkg::*;

  localparam int DQ = 16;
  localparam int AW = 3 + 11 + 9 - 1;

  logic clk = 0, rst_n = 0;
  ddr2_mode_t mode;
  logic burst_start, burst_write;
  logic [2:0]  burst_bank;
  logic [10:0] burst_row;
  logic [8:0]  burst_col;
  logic [2*DQ-1:0] wr_data, rd_data;
  logic [3:0]  wr_mask;
  logic        rd_valid;
  logic sram0_cs_n, sram0_we_n, sram1_cs_n, sram1_we_n;
  logic [AW-1:0] sram0_addr, sram1_addr;
  logic [DQ-1:0] sram0_wdata, sram1_wdata, sram0_rdata, sram1_rdata;
  logic [1:0]    sram0_be_n, sram1_be_n;

  int checks = 0, failures = 0;

  ddr2_sram_interface dut (.*);

  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram0 (
    .clk, .cs_n(sram0_cs_n), .we_n(sram0_we_n), .addr(sram0_addr),
    .wdata(sram0_wdata), .be_n(sram0_be_n), .rdata(sram0_rdata));
  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram1 (
    .clk, .cs_n(sram1_cs_n), .we_n(sram1_we_n), .addr(sram1_addr),
    .wdata(sram1_wdata), .be_n(sram1_be_n), .rdata(sram1_rdata));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // JEDEC DDR2 burst order: column offset of beat i for start offset s.
  int seq8 [8][8] = '{'{0,1,2,3,4,5,6,7}, '{1,2,3,0,5,6,7,4}, '{2,3,0,1,6,7,4,5},
                      '{3,0,1,2,7,4,5,6}, '{4,5,6,7,0,1,2,3}, '{5,6,7,4,1,2,3,0},
                      '{6,7,4,5,2,3,0,1}, '{7,4,5,6,3,0,1,2}};
  function automatic logic [8:0] ref_col(logic [8:0] c, int i, bit bl8, bit il);
    if (bl8) return {c[8:3], 3'(il ? (int'(c[2:0]) ^ i) : seq8[c[2:0]][i])};
    return {c[8:2], 2'(il ? (int'(c[1:0]) ^ i) : ((int'(c[1:0]) + i) % 4))};
  endfunction

  // reference contents, one beat per full column address
  logic [DQ-1:0] ref_mem [logic [22:0]];

  function automatic logic [DQ-1:0] ref_peek(logic [22:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  int cs_clocks = 0;
  always @(posedge clk) if (!sram0_cs_n) cs_clocks++;

  typedef struct { logic [2:0] b; logic [10:0] r; logic [8:0] c; bit bl8; bit il; } burst_t;
  burst_t bursts[$];

  initial begin
    int n_pairs, cs_before;
    burst_t bt;
    logic [DQ-1:0] beat [8];
    logic [1:0]    bm   [8];
    mode = MODE_RESET; burst_start = 0; burst_write = 0; burst_bank = 0;
    burst_row = 0; burst_col = 0; wr_data = 0; wr_mask = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------------------------------------------------------- writes
    for (int n = 0; n < 200; n++) begin
      bt.b = 3'($urandom); bt.r = 11'($urandom_range(0, 3)); bt.c = 9'($urandom);
      bt.bl8 = 1'($urandom_range(0, 1)); bt.il = 1'($urandom_range(0, 1));
      bursts.push_back(bt);
      n_pairs = bt.bl8 ? 4 : 2;
      cs_before = cs_clocks;
      for (int i = 0; i < 2 * n_pairs; i++) begin
        beat[i] = DQ'($urandom);
        bm[i]   = ($urandom_range(0, 4) == 0) ? 2'($urandom) : 2'b00;
      end
      for (int k = 0; k < n_pairs; k++) begin
        @(negedge clk);
        burst_start = (k == 0); burst_write = 1;
        burst_bank = bt.b; burst_row = bt.r; burst_col = bt.c;
        mode.bl8 = bt.bl8; mode.interleave = bt.il;
        wr_data = {beat[2*k+1], beat[2*k]};
        wr_mask = {bm[2*k+1], bm[2*k]};
        if (k > 0) begin
          burst_bank = 3'($urandom); burst_col = 9'($urandom);   // ignored
          mode.bl8 = 1'($urandom_range(0, 1)); mode.interleave = 1'($urandom_range(0, 1));
        end
      end
      @(negedge clk);
      burst_start = 0;
      // reference update
      for (int i = 0; i < 2 * n_pairs; i++) begin
        logic [22:0] a;
        logic [DQ-1:0] w;
        a = {bt.b, bt.r, ref_col(bt.c, i, bt.bl8, bt.il)};
        w = ref_peek(a);
        for (int by = 0; by < 2; by++) if (!bm[i][by]) w[by*8 +: 8] = beat[i][by*8 +: 8];
        ref_mem[a] = w;
      end
      check(cs_clocks - cs_before == n_pairs, "write burst length");
      // the SRAMs must hold exactly the reference for these columns
      for (int i = 0; i < 2 * n_pairs; i++) begin
        logic [8:0] c;
        logic [DQ-1:0] got;
        c = ref_col(bt.c, i, bt.bl8, bt.il);
        got = c[0] ? u_sram1.peek({bt.b, bt.r, c[8:1]}) : u_sram0.peek({bt.b, bt.r, c[8:1]});
        check(got == ref_peek({bt.b, bt.r, c}),
              $sformatf("stored beat col %0d: %h vs %h", c, got, ref_peek({bt.b, bt.r, c})));
      end
    end

    // ----------------------------------------------------------------- reads
    foreach (bursts[n]) begin
      bt = bursts[n];
      n_pairs = bt.bl8 ? 4 : 2;
      fork
        begin
          for (int k = 0; k < n_pairs; k++) begin
            @(negedge clk);
            burst_start = (k == 0); burst_write = 0;
            burst_bank = bt.b; burst_row = bt.r; burst_col = bt.c;
            mode.bl8 = bt.bl8; mode.interleave = bt.il;
          end
          @(negedge clk);
          burst_start = 0;
        end
        begin
          @(negedge clk);                 // pair 0 addressed in this clock
          for (int k = 0; k < n_pairs; k++) begin
            @(negedge clk);               // its data is back one clock later
            check(rd_valid, "rd_valid during read data");
            check(rd_data == {ref_peek({bt.b, bt.r, ref_col(bt.c, 2*k+1, bt.bl8, bt.il)}),
                              ref_peek({bt.b, bt.r, ref_col(bt.c, 2*k,   bt.bl8, bt.il)})},
                  $sformatf("read burst %0d pair %0d", n, k));
          end
          @(negedge clk);
          check(!rd_valid, "rd_valid ends with the burst");
        end
      join
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
