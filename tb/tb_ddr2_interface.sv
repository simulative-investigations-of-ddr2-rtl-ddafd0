// tb_ddr2_interface -- self-checking test of the DDR2 pin interface.
//
// Write path: two byte-lane strobes with 0.5 ns skew carry random data and
// masks, one beat per strobe edge; after the next rising clock edge the
// double-width word must hold {falling-edge beat, rising-edge beat}. A
// pulse on only one of the two strobes must capture nothing (AND of the
// strobes). With RDQS enabled the mask must read zero.
// Read path: random pairs are fed on rd_valid; checked are the preamble
// (DQS driven low one clock ahead), the low half on DQ while the clock is
// high and the high half while it is low, DQS = clock during data, DQS#
// its complement, RDQS only when enabled, and output enables afterwards.
module tb_ddr2_interface;
  import ddr2_pkg::*;

  localparam int DQ = 16;

  logic clk = 0, rst_n = 0;
  ddr2_mode_t mode;
  logic [DQ-1:0] dq_in, dq_out;
  logic [1:0]    dqs_in, dm_in, dqs_out, dqs_n_out;
  logic          dq_oe, dqs_oe, rdqs_out, rdqs_n_out, rdqs_oe;
  logic [2*DQ-1:0] wr_data, rd_data;
  logic [3:0]    wr_mask;
  logic          rd_valid;

  int checks = 0, failures = 0;

  ddr2_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  // One strobed pair in the clock that starts at the next rising edge.
  task automatic strobe_pair(logic [DQ-1:0] b0, logic [DQ-1:0] b1,
                             logic [1:0] m0, logic [1:0] m1, logic [1:0] lanes);
    @(posedge clk);
    dq_in = b0; dm_in = m0;
    #1   dqs_in[0] = lanes[0];
    #0.5 dqs_in[1] = lanes[1];
    #2   dq_in = b1; dm_in = m1;
    #2.5 dqs_in[0] = 1'b0;
    #0.5 dqs_in[1] = 1'b0;
  endtask

  initial begin
    logic [DQ-1:0] b0, b1;
    logic [1:0]    m0, m1;
    logic [2*DQ-1:0] pairs [4];
    mode = MODE_RESET; dq_in = 0; dqs_in = 0; dm_in = 0; rd_valid = 0; rd_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // --------------------------------------------------------------- write
    for (int n = 0; n < 200; n++) begin
      b0 = DQ'($urandom); b1 = DQ'($urandom); m0 = 2'($urandom); m1 = 2'($urandom);
      mode.rdqs_en = (n % 10 == 9);
      strobe_pair(b0, b1, m0, m1, 2'b11);
      @(posedge clk);
      #1;
      check(wr_data == {b1, b0}, $sformatf("write pair %h vs %h", wr_data, {b1, b0}));
      check(wr_mask == (mode.rdqs_en ? 4'b0 : {m1, m0}), "write mask");
      // only one strobe toggles: nothing new may be captured
      strobe_pair(~b0, ~b1, ~m0, ~m1, 2'b01);
      @(posedge clk);
      #1;
      check(wr_data == {b1, b0}, "single strobe must not capture");
    end
    mode = MODE_RESET;

    // ---------------------------------------------------------------- read
    for (int n = 0; n < 50; n++) begin
      int np;
      np = (n % 2 != 0) ? 4 : 2;
      mode.rdqs_en = (n % 3 == 0);
      for (int k = 0; k < np; k++) pairs[k] = {DQ'($urandom), DQ'($urandom)};
      @(negedge clk);
      check(!dqs_oe && !dq_oe, "bus released before the read");
      rd_valid = 1; rd_data = pairs[0];
      #1;
      check(dqs_oe && !dq_oe && dqs_out == 2'b00 && dqs_n_out == 2'b11, "preamble");
      check(rdqs_oe == mode.rdqs_en && !rdqs_out, "RDQS preamble");
      for (int k = 0; k < np; k++) begin
        @(posedge clk);
        #2;
        check(dq_oe && dqs_oe && dq_out == pairs[k][DQ-1:0], "beat on high phase");
        check(dqs_out == 2'b11 && dqs_n_out == 2'b00, "DQS high");
        check(rdqs_out == mode.rdqs_en && rdqs_oe == mode.rdqs_en, "RDQS high");
        @(negedge clk);
        rd_valid = (k + 1 < np);
        rd_data  = (k + 1 < np) ? pairs[k+1] : '0;
        #2;
        check(dq_oe && dq_out == pairs[k][2*DQ-1:DQ], "beat on low phase");
        check(dqs_out == 2'b00 && dqs_n_out == 2'b11 && !rdqs_out, "DQS low");
        check(rdqs_n_out == mode.rdqs_en, "RDQS# high");
      end
      @(posedge clk);
      #1;
      check(!dq_oe && !dqs_oe && !rdqs_oe, "bus released after the read");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
