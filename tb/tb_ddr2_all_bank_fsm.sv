// tb_ddr2_all_bank_fsm -- self-checking test of the device-wide state machine.
//
// Directed sequences with tRFC = 21 and tMRD = 2 clocks: MRS and EMRS
// decoding (burst length, burst type, CAS latency with clamping, additive
// latency, RDQS enable), MRS/REF/self refresh refused with open banks, the
// length of the tMRD and tRFC windows and the commands refused inside them,
// active and precharge power down, self refresh entry and exit, and
// commands that are never legal in the normal state.
module tb_ddr2_all_bank_fsm;
  import ddr2_pkg::*;

  logic        clk = 0, rst_n = 0;
  ddr2_cmd_e   cmd;
  logic [2:0]  bank;
  logic [13:0] opcode;
  logic        all_idle, any_open;
  logic        bank_en, refreshing, power_down, self_refresh, err;
  ddr2_mode_t  mode;
  ddr2_err_e   err_code;

  int checks = 0, failures = 0;

  ddr2_all_bank_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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

  task automatic issue(ddr2_cmd_e c, logic [2:0] b, logic [13:0] op, bit exp_err,
                       ddr2_err_e exp_code = ERR_NONE);
    @(negedge clk);
    cmd = c; bank = b; opcode = op;
    #1;
    check(err == exp_err, $sformatf("%s err=%0b expected %0b", c.name(), err, exp_err));
    if (exp_err) check(err_code == exp_code, $sformatf("%s code %s", c.name(), err_code.name()));
    @(posedge clk);
    #1;
    cmd = CMD_NOP;
  endtask

  // Clocks until the device is back in its normal state.
  task automatic clocks_to_normal(int exp, string what);
    int n = 0;
    while (!bank_en && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(n + 1 == exp, $sformatf("%s: normal after %0d clocks, expected %0d", what, n + 1, exp));
  endtask

  initial begin
    cmd = CMD_NOP; bank = 0; opcode = 0; all_idle = 1; any_open = 0;
    repeat (2) @(posedge clk);
    #1;
    check(!bank_en && power_down && mode == MODE_RESET, "reset state");
    rst_n = 1;
    issue(CMD_CKE_EXIT, 0, 0, 0);
    check(bank_en, "running after the first CKE rise");

    // MR: BL8, interleaved, CL5
    issue(CMD_MRS, 3'b000, 14'b000_0000_101_1_011, 0);
    check(mode.bl8 && mode.interleave && mode.cl == 3'd5, "MR decode");
    check(!bank_en, "inside tMRD");
    issue(CMD_ACT, 0, 0, 1, ERR_DEV_STATE);       // k=1 < tMRD
    check(bank_en, "tMRD over at k=2");
    // EMR: AL3, RDQS on
    issue(CMD_MRS, 3'b001, 14'b00_1000_0001_1000, 0);
    check(mode.al == 3'd3 && mode.rdqs_en && mode.cl == 3'd5, "EMR decode");
    clocks_to_normal(2, "tMRD");
    // MR: BL4, sequential, CL7 -> 6; then CL2 -> 3
    issue(CMD_MRS, 3'b000, 14'b000_0000_111_0_010, 0);
    check(!mode.bl8 && !mode.interleave && mode.cl == 3'd6, "CL clamp high");
    clocks_to_normal(2, "tMRD");
    issue(CMD_MRS, 3'b000, 14'b000_0000_010_0_010, 0);
    check(mode.cl == 3'd3 && mode.al == 3'd3, "CL clamp low, AL kept");
    clocks_to_normal(2, "tMRD");

    // banks open: MRS, REF, SREF refused
    all_idle = 0; any_open = 1;
    issue(CMD_MRS, 3'b000, 14'h0, 1, ERR_NOT_IDLE);
    check(mode.cl == 3'd3, "refused MRS changes nothing");
    issue(CMD_REF, 0, 0, 1, ERR_NOT_IDLE);
    issue(CMD_SREF_ENTRY, 0, 0, 1, ERR_NOT_IDLE);
    check(bank_en, "still normal");

    // active power down
    issue(CMD_PD_ENTRY, 0, 0, 0);
    check(power_down && !bank_en, "active power down");
    issue(CMD_NONE, 0, 0, 0);
    issue(CMD_READ, 0, 0, 1, ERR_DEV_STATE);
    issue(CMD_CKE_EXIT, 0, 0, 0);
    check(bank_en && !power_down, "power down exit");

    // refresh with all banks idle: tRFC = 21
    all_idle = 1; any_open = 0;
    issue(CMD_REF, 0, 0, 0);
    check(refreshing, "refreshing");
    issue(CMD_NOP, 0, 0, 0);
    issue(CMD_DESEL, 0, 0, 0);
    issue(CMD_ACT, 0, 0, 1, ERR_DEV_STATE);
    clocks_to_normal(21 - 3, "tRFC");

    // precharge power down
    issue(CMD_PD_ENTRY, 0, 0, 0);
    check(power_down, "precharge power down");
    issue(CMD_CKE_EXIT, 0, 0, 0);

    // self refresh
    issue(CMD_SREF_ENTRY, 0, 0, 0);
    check(self_refresh && !bank_en, "self refresh");
    issue(CMD_NONE, 0, 0, 0);
    issue(CMD_REF, 0, 0, 1, ERR_DEV_STATE);
    issue(CMD_CKE_EXIT, 0, 0, 0);
    check(bank_en && !self_refresh, "self refresh exit");

    // never legal in the normal state
    issue(CMD_CKE_EXIT, 0, 0, 1, ERR_DEV_STATE);
    issue(CMD_ILLEGAL, 0, 0, 1, ERR_ILLEGAL);
    issue(CMD_READ, 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
