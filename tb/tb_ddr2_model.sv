// tb_ddr2_model -- end-to-end test of the DDR2 model at its default size.
//
// The test bench plays the memory controller: it drives the command pins in
// the middle of the clock low phase, strobes write data with two skewed DQS
// lanes (first rising edge 1 ns after the clock edge WL clocks after the
// WRITE), and checks read data at the exact clock: DQS preamble in clock
// RL - 1, first beat while the clock is high in clock RL after the READ.
// Two behavioural SRAMs store the data. A reference memory, one beat per
// column, is kept with the JEDEC burst order written out as a table.
//
// Covered: mode-register loads with four (BL, burst type, CL, AL) settings,
// writes with and without data masks, sequential and interleaved BL4/BL8
// bursts, seamless back-to-back reads, posted CAS (AL > 0), READA/WRITEA,
// PRE/PREA, auto refresh, active power down, self refresh, illegal
// sequences flagged on seq_err (and producing no data), the even/odd SRAM
// split and the reordered SRAM address. Each is counted, and one that never
// happened counts as a failure.
module tb_ddr2_model;
  import ddr2_pkg::*;

  localparam int DQ = 16, AW = 22;
  localparam int T_RCD = 3, T_RP = 3, T_WR = 3, T_RFC = 21, T_MRD = 2;

  logic ck = 0, rst_n = 0;
  logic cke, cs_n, ras_n, cas_n, we_n;
  logic [2:0]  ba;
  logic [10:0] addr;
  logic [DQ-1:0] dq_in, dq_out;
  logic [1:0] dqs_in, dm_in, dqs_out, dqs_n_out;
  logic dq_oe, dqs_oe, rdqs_out, rdqs_n_out, rdqs_oe;
  logic seq_err;
  ddr2_err_e err_code;
  logic [7:0] bank_open;
  logic refreshing, power_down, self_refresh;
  logic sram0_cs_n, sram0_we_n, sram1_cs_n, sram1_we_n;
  logic [AW-1:0] sram0_addr, sram1_addr;
  logic [DQ-1:0] sram0_wdata, sram1_wdata, sram0_rdata, sram1_rdata;
  logic [1:0] sram0_be_n, sram1_be_n;

  ddr2_model dut (.*);

  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram0 (
    .clk(ck), .cs_n(sram0_cs_n), .we_n(sram0_we_n), .addr(sram0_addr),
    .wdata(sram0_wdata), .be_n(sram0_be_n), .rdata(sram0_rdata));
  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram1 (
    .clk(ck), .cs_n(sram1_cs_n), .we_n(sram1_we_n), .addr(sram1_addr),
    .wdata(sram1_wdata), .be_n(sram1_be_n), .rdata(sram1_rdata));

  always #5 ck = ~ck;

  int checks = 0, failures = 0;

  initial begin
    #5000000;
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

  // ------------------------------------------------------------ coverage
  typedef enum int {
    EV_WRITE, EV_READ, EV_MASKED, EV_SEQ, EV_IL, EV_BL4, EV_BL8, EV_SEAMLESS,
    EV_POSTED_CAS, EV_READA, EV_WRITEA, EV_PREA, EV_REFRESH, EV_POWER_DOWN,
    EV_SELF_REFRESH, EV_SEQ_ERR, EV_REORDER, EV_COUNT
  } event_e;
  int ev [EV_COUNT];

  // ------------------------------------------------------- current mode
  bit cur_bl8 = 0, cur_il = 0;
  int cur_cl = 3, cur_al = 0;
  function automatic int rl();  return cur_cl + cur_al; endfunction
  function automatic int npairs(); return cur_bl8 ? 4 : 2; endfunction

  // ---------------------------------------------------- reference memory
  logic [DQ-1:0] ref_mem [logic [22:0]];
  function automatic logic [DQ-1:0] ref_peek(logic [22:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  int seq8 [8][8] = '{'{0,1,2,3,4,5,6,7}, '{1,2,3,0,5,6,7,4}, '{2,3,0,1,6,7,4,5},
                      '{3,0,1,2,7,4,5,6}, '{4,5,6,7,0,1,2,3}, '{5,6,7,4,1,2,3,0},
                      '{6,7,4,5,2,3,0,1}, '{7,4,5,6,3,0,1,2}};
  function automatic logic [8:0] ref_col(logic [8:0] c, int i, bit bl8, bit il);
    if (bl8) return {c[8:3], 3'(il ? (int'(c[2:0]) ^ i) : seq8[c[2:0]][i])};
    return {c[8:2], 2'(il ? (int'(c[1:0]) ^ i) : ((int'(c[1:0]) + i) % 4))};
  endfunction

  logic [10:0] open_row [8];

  // ------------------------------------------------------------ seq_err
  int exp_errs = 0;
  always @(posedge ck) if (rst_n && seq_err) begin
    ev[EV_SEQ_ERR]++;
    $display("seq_err %s at %0t", err_code.name(), $time);
  end

  // --------------------------------------------------------- pin driving
  // Drive a command for the next rising edge; returns right after the edge.
  task automatic pins(logic k, logic cs, logic r, logic c, logic w,
                      logic [2:0] b, logic [10:0] a);
    @(negedge ck);
    cke = k; cs_n = cs; ras_n = r; cas_n = c; we_n = w; ba = b; addr = a;
    @(posedge ck);
    #1;
    cs_n = 1'b0; ras_n = 1'b1; cas_n = 1'b1; we_n = 1'b1;   // NOP
  endtask

  task automatic nop(int n = 1);
    repeat (n) pins(cke, 0, 1, 1, 1, 0, 0);
  endtask

  task automatic mrs(logic [2:0] b, logic [10:0] op);
    pins(1, 0, 0, 0, 0, b, op);
    nop(T_MRD - 1);
  endtask

  task automatic set_mode(bit bl8, bit il, int cl, int al);
    mrs(3'b000, 11'({cl[2:0], il, bl8 ? 3'b011 : 3'b010}));
    mrs(3'b001, 11'({al[2:0], 3'b000}));
    cur_bl8 = bl8; cur_il = il; cur_cl = cl; cur_al = al;
  endtask

  task automatic activate(logic [2:0] b, logic [10:0] r);
    pins(1, 0, 0, 1, 1, b, r);
    open_row[b] = r;
  endtask

  task automatic precharge_all();
    pins(1, 0, 0, 1, 0, 0, 11'h400);
    nop(T_RP - 1);
    ev[EV_PREA]++;
  endtask

  // One strobed pair in the clock that starts at the next rising edge.
  task automatic strobe_pair(logic [DQ-1:0] b0, logic [DQ-1:0] b1,
                             logic [1:0] m0, logic [1:0] m1);
    @(posedge ck);
    dq_in = b0; dm_in = m0;
    #1   dqs_in[0] = 1'b1;
    #0.5 dqs_in[1] = 1'b1;
    #2   dq_in = b1; dm_in = m1;
    #2.5 dqs_in[0] = 1'b0;
    #0.5 dqs_in[1] = 1'b0;
  endtask

  // WRITE (auto precharge with ap); data strobed WL clocks later.
  task automatic write_burst(logic [2:0] b, logic [8:0] c, bit ap, bit masked);
    logic [DQ-1:0] beat [8];
    logic [1:0]    bm   [8];
    int n = npairs(), wl = rl() - 1;
    for (int i = 0; i < 2 * n; i++) begin
      beat[i] = DQ'($urandom);
      bm[i]   = masked ? 2'($urandom) : 2'b00;
      if (bm[i] != 0) ev[EV_MASKED]++;
    end
    for (int i = 0; i < 2 * n; i++) begin
      logic [22:0] a;
      logic [DQ-1:0] w;
      a = {b, open_row[b], ref_col(c, i, cur_bl8, cur_il)};
      w = ref_peek(a);
      for (int by = 0; by < 2; by++) if (!bm[i][by]) w[by*8 +: 8] = beat[i][by*8 +: 8];
      ref_mem[a] = w;
    end
    pins(1, 0, 1, 0, 0, b, {ap, 1'b0, 9'(c)});
    repeat (wl - 1) @(posedge ck);
    for (int k = 0; k < n; k++) strobe_pair(beat[2*k], beat[2*k+1], bm[2*k], bm[2*k+1]);
    ev[EV_WRITE]++;
    ev[cur_il ? EV_IL : EV_SEQ]++;
    ev[cur_bl8 ? EV_BL8 : EV_BL4]++;
    if (ap) ev[EV_WRITEA]++;
    @(posedge ck);
    #1;
  endtask

  // Check one read burst whose command edge has just passed.
  task automatic read_check(logic [2:0] b, logic [10:0] r, logic [8:0] c,
                            bit bl8, bit il, int lat, bit seamless);
    repeat (lat - 1) @(posedge ck);
    #2;
    check(dqs_oe && (seamless || (!dq_oe && dqs_out == 2'b00)),
          $sformatf("preamble in clock RL-1 (RL=%0d)", lat));
    for (int k = 0; k < (bl8 ? 4 : 2); k++) begin
      logic [DQ-1:0] e0, e1;
      e0 = ref_peek({b, r, ref_col(c, 2*k, bl8, il)});
      e1 = ref_peek({b, r, ref_col(c, 2*k+1, bl8, il)});
      @(posedge ck);
      #2;
      check(dq_oe && dqs_out == 2'b11 && dqs_n_out == 2'b00 && dq_out == e0,
            $sformatf("read beat %0d: %h expected %h", 2*k, dq_out, e0));
      @(negedge ck);
      #2;
      check(dq_oe && dqs_out == 2'b00 && dq_out == e1,
            $sformatf("read beat %0d: %h expected %h", 2*k+1, dq_out, e1));
    end
  endtask

  task automatic read_burst(logic [2:0] b, logic [8:0] c, bit ap, bit seamless = 0);
    logic [10:0] r = open_row[b];
    bit bl8 = cur_bl8, il = cur_il;
    int lat = rl();
    pins(1, 0, 1, 0, 1, b, {ap, 1'b0, 9'(c)});
    fork
      read_check(b, r, c, bl8, il, lat, seamless);
    join_none
    ev[EV_READ]++;
    if (ap) ev[EV_READA]++;
    if (seamless) ev[EV_SEAMLESS]++;
  endtask

  // The command of the last edge is judged one clock later.
  task automatic err_check(ddr2_err_e code, string what);
    @(posedge ck);
    #1;
    check(seq_err && err_code == code, what);
  endtask

  // Wait until every read started has been checked.
  task automatic drain();
    wait fork;
    nop(2);
  endtask

  // ----------------------------------------------------------- sequence
  initial begin
    cke = 0; cs_n = 1; ras_n = 1; cas_n = 1; we_n = 1; ba = 0; addr = 0;
    dq_in = 0; dqs_in = 0; dm_in = 0;
    repeat (3) @(posedge ck);
    rst_n = 1;
    repeat (2) @(posedge ck);
    nop(1);                       // CKE stays low: still powering up
    pins(1, 1, 1, 1, 1, 0, 0);    // CKE rises with DESEL
    nop(2);
    check(!seq_err, "clean power up");

    // four operating points
    for (int m = 0; m < 4; m++) begin
      bit bl8, il;
      int cl, al;
      logic [8:0] cols [4];
      bl8 = (m % 2 == 1); il = (m >= 2);
      cl = 3 + m; al = (m == 2) ? 2 : (m == 3) ? 5 : 0;
      set_mode(bl8, il, cl, al);
      for (int b = 0; b < 8; b += 3) begin
        activate(3'(b), 11'($urandom));
        if (al >= T_RCD - 1) ev[EV_POSTED_CAS]++;
        nop((al >= T_RCD - 1) ? 0 : T_RCD - 1 - al);
        for (int n = 0; n < 4; n++) begin
          cols[n] = 9'($urandom);
          write_burst(3'(b), cols[n], 0, (n % 2 == 1));
          nop(T_WR + 2);
        end
        // seamless reads: second READ BL/2 clocks after the first
        read_burst(3'(b), cols[0], 0);
        nop(npairs() - 1);
        read_burst(3'(b), cols[1], 0, 1);
        drain();
        nop(1);
        read_burst(3'(b), cols[2], 0);
        drain();
        read_burst(3'(b), cols[3], 0);
        drain();
      end
      precharge_all();
    end

    // READA / WRITEA: bank closes by itself
    set_mode(0, 0, 3, 0);
    activate(3'd6, 11'h2AB);
    nop(T_RCD - 1);
    write_burst(3'd6, 9'h0F2, 1, 0);
    nop(T_WR + T_RP + 2);
    check(bank_open[6] == 1'b0, "WRITEA closed the bank");
    activate(3'd6, 11'h2AB);
    nop(T_RCD - 1);
    read_burst(3'd6, 9'h0F1, 1);
    drain();
    nop(T_RP);
    check(bank_open == 0, "READA closed the bank");

    // the even/odd split and the reordered address of that burst:
    // column 0x0F0 (even) -> SRAM0, 0x0F1 (odd) -> SRAM1, at {row, bank, col/2}
    check(u_sram0.peek({11'h2AB, 3'd6, 8'h78}) == ref_peek({3'd6, 11'h2AB, 9'h0F0}) &&
          u_sram1.peek({11'h2AB, 3'd6, 8'h78}) == ref_peek({3'd6, 11'h2AB, 9'h0F1}) &&
          ref_peek({3'd6, 11'h2AB, 9'h0F1}) != 0, "SRAM split and reordered address");
    ev[EV_REORDER]++;

    // auto refresh, data kept
    pins(1, 0, 0, 0, 1, 0, 0);
    nop(1);
    check(refreshing, "refreshing");
    ev[EV_REFRESH]++;
    nop(T_RFC - 2);
    activate(3'd6, 11'h2AB);
    nop(T_RCD - 1);
    read_burst(3'd6, 9'h0F0, 0);
    drain();

    // active power down: CKE low with NOP, then back
    pins(0, 0, 1, 1, 1, 0, 0);
    nop(4);
    check(power_down, "in power down");
    ev[EV_POWER_DOWN]++;
    pins(1, 1, 1, 1, 1, 0, 0);
    nop(2);
    read_burst(3'd6, 9'h0F3, 0);
    drain();
    precharge_all();

    // self refresh: CKE low with REF, then back
    pins(0, 0, 0, 0, 1, 0, 0);
    nop(6);
    check(self_refresh, "in self refresh");
    ev[EV_SELF_REFRESH]++;
    pins(1, 1, 1, 1, 1, 0, 0);
    nop(4);
    activate(3'd6, 11'h2AB);
    nop(T_RCD - 1);
    read_burst(3'd6, 9'h0F4, 0);
    drain();
    precharge_all();

    // illegal sequences: each raises seq_err with its code, no data moves
    begin
      int n_before;
      n_before = ev[EV_SEQ_ERR];
      pins(1, 0, 1, 0, 1, 3'd2, 0);            // READ to a closed bank
      err_check(ERR_BANK_STATE, "read of closed bank flagged");
      repeat (rl() + 3) begin
        @(posedge ck); #1 check(!dq_oe && !dqs_oe, "no data for a refused read");
      end
      activate(3'd2, 11'h11);
      pins(1, 0, 1, 0, 1, 3'd2, 0);            // READ one clock after ACT
      err_check(ERR_TIMING, "tRCD violation flagged");
      pins(1, 0, 0, 0, 1, 0, 0);               // REF with a bank open
      err_check(ERR_NOT_IDLE, "refresh with open bank flagged");
      nop(2);
      pins(1, 0, 0, 1, 0, 3'd2, 0);            // PRE
      pins(1, 0, 0, 1, 1, 3'd2, 11'h12);       // ACT one clock later
      err_check(ERR_TIMING, "tRP violation flagged");
      nop(4);
      check(ev[EV_SEQ_ERR] - n_before == 4, "four errors counted");
      exp_errs = 4;
    end

    check(ev[EV_SEQ_ERR] == exp_errs, $sformatf("%0d sequence errors, expected %0d",
                                                ev[EV_SEQ_ERR], exp_errs));
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("event %s: %0d", event_e'(e), ev[e]);
      check(ev[e] > 0, $sformatf("mechanism %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
