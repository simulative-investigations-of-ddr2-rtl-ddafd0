// tb_ddr2_model_rdqs -- end-to-end test of the RDQS mode of the DDR2 model.
//
// The RDQS enable bit sits on address pin A11 of the extended mode register,
// which the default 11 address pins cannot reach, so this test builds the
// model with 12 address pins and 12 row bits. It enables RDQS, writes BL8
// bursts with the DM pins toggling (DM then serves as RDQS and must not mask
// anything), reads them back and checks that RDQS/RDQS# follow DQS/DQS#
// during the read, including the preamble, at RL = CL = 4. It then disables
// RDQS again and checks that DM masks and RDQS stays off.
module tb_ddr2_model_rdqs;
  import ddr2_pkg::*;

  localparam int DQ = 16, AW = 3 + 12 + 8;

  logic ck = 0, rst_n = 0;
  logic cke, cs_n, ras_n, cas_n, we_n;
  logic [2:0]  ba;
  logic [11:0] addr;
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

  ddr2_model #(.ROW_BITS(12), .ADDR_BITS(12)) dut (.*);

  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram0 (
    .clk(ck), .cs_n(sram0_cs_n), .we_n(sram0_we_n), .addr(sram0_addr),
    .wdata(sram0_wdata), .be_n(sram0_be_n), .rdata(sram0_rdata));
  sram_model #(.DQ_BITS(DQ), .AW(AW)) u_sram1 (
    .clk(ck), .cs_n(sram1_cs_n), .we_n(sram1_we_n), .addr(sram1_addr),
    .wdata(sram1_wdata), .be_n(sram1_be_n), .rdata(sram1_rdata));

  always #5 ck = ~ck;

  int checks = 0, failures = 0, rdqs_edges = 0, seq_errs = 0;

  always @(posedge rdqs_out) if (rst_n) rdqs_edges++;
  always @(posedge ck) if (rst_n && seq_err) seq_errs++;

  initial begin
    #200000;
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

  task automatic pins(logic k, logic cs, logic r, logic c, logic w,
                      logic [2:0] b, logic [11:0] a);
    @(negedge ck);
    cke = k; cs_n = cs; ras_n = r; cas_n = c; we_n = w; ba = b; addr = a;
    @(posedge ck);
    #1;
    cs_n = 1'b0; ras_n = 1'b1; cas_n = 1'b1; we_n = 1'b1;
  endtask

  task automatic nop(int n = 1);
    repeat (n) pins(1, 0, 1, 1, 1, 0, 0);
  endtask

  // BL8 sequential from column 0: beat i goes to column i.
  task automatic write8(logic [DQ-1:0] beat [8], logic [1:0] dm);
    pins(1, 0, 1, 0, 0, 3'd1, 12'h000);
    repeat (2) @(posedge ck);               // WL = 3
    for (int k = 0; k < 4; k++) begin
      @(posedge ck);
      dq_in = beat[2*k]; dm_in = dm;
      #1   dqs_in[0] = 1'b1;
      #0.5 dqs_in[1] = 1'b1;
      #2   dq_in = beat[2*k+1]; dm_in = ~dm;
      #2.5 dqs_in[0] = 1'b0;
      #0.5 dqs_in[1] = 1'b0;
    end
    dm_in = 0;
    nop(6);
  endtask

  task automatic read8(logic [DQ-1:0] exp [8], bit rdqs);
    pins(1, 0, 1, 0, 1, 3'd1, 12'h000);
    repeat (3) @(posedge ck);               // clock RL-1 = 3
    #2;
    check(dqs_oe && rdqs_oe == rdqs && !rdqs_out, "RDQS preamble");
    for (int k = 0; k < 4; k++) begin
      @(posedge ck);
      #2;
      check(dq_out == exp[2*k] && dqs_out == 2'b11, "beat on high phase");
      check(rdqs_out == rdqs && rdqs_oe == rdqs && rdqs_n_out == 1'b0, "RDQS high");
      @(negedge ck);
      #2;
      check(dq_out == exp[2*k+1] && dqs_out == 2'b00, "beat on low phase");
      check(!rdqs_out && rdqs_n_out == rdqs, "RDQS low");
    end
    nop(3);
  endtask

  initial begin
    logic [DQ-1:0] beat [8], old [8], exp [8];
    cke = 0; cs_n = 1; ras_n = 1; cas_n = 1; we_n = 1; ba = 0; addr = 0;
    dq_in = 0; dqs_in = 0; dm_in = 0;
    repeat (3) @(posedge ck);
    rst_n = 1;
    pins(1, 1, 1, 1, 1, 0, 0);                    // CKE rises
    nop(2);
    pins(1, 0, 0, 0, 0, 3'b000, 12'b0000_0100_0011); // MR: BL8, seq, CL4
    nop(1);
    pins(1, 0, 0, 0, 0, 3'b001, 12'b1000_0000_0000); // EMR: RDQS on, AL0
    nop(1);
    pins(1, 0, 0, 1, 1, 3'd1, 12'h0A5);           // ACT bank 1
    nop(2);

    // RDQS on: DM ignored
    for (int i = 0; i < 8; i++) beat[i] = DQ'($urandom);
    write8(beat, 2'b11);
    read8(beat, 1);
    check(rdqs_edges == 4, $sformatf("%0d RDQS pulses, expected 4", rdqs_edges));

    // RDQS off: DM masks again (rising-edge beats fully masked here)
    pins(1, 0, 0, 1, 0, 0, 12'h400);              // PREA
    nop(2);
    pins(1, 0, 0, 0, 0, 3'b001, 12'h000);         // EMR: RDQS off
    nop(1);
    pins(1, 0, 0, 1, 1, 3'd1, 12'h0A5);
    nop(2);
    old = beat;
    for (int i = 0; i < 8; i++) beat[i] = DQ'($urandom);
    write8(beat, 2'b11);
    for (int i = 0; i < 8; i++) exp[i] = (i % 2 == 0) ? old[i] : beat[i];
    read8(exp, 0);
    check(rdqs_edges == 4, "no RDQS with RDQS disabled");
    check(seq_errs == 0, "no sequence errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
