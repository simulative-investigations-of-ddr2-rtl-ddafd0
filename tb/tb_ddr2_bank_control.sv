// tb_ddr2_bank_control -- self-checking test of the control path.
//
// Drives decoded commands straight into the bank control and checks:
//  * the clock at which each burst request leaves the schedule: RL - 3
//    clocks after the READ is accepted, RL - 1 after the WRITE, for
//    RL = AL + CL = 3 and, after an MRS/EMRS, RL = 6;
//  * the bank, the open row of that bank and the start column of each
//    request;
//  * seq_err/err_code one clock after an illegal command (read to a closed
//    bank, refresh with open banks, overlapping bursts), with nothing
//    scheduled for a refused command;
//  * the bank_open, refreshing and power_down outputs.
module tb_ddr2_bank_control;
  import ddr2_pkg::*;

  logic        clk = 0, rst_n = 0;
  ddr2_cmd_e   cmd;
  logic [2:0]  bank;
  logic [10:0] row_addr;
  logic [8:0]  col_addr;
  logic [13:0] opcode;
  ddr2_mode_t  mode;
  logic        burst_start, burst_write;
  logic [2:0]  burst_bank;
  logic [10:0] burst_row;
  logic [8:0]  burst_col;
  logic        seq_err;
  ddr2_err_e   err_code;
  logic [7:0]  bank_open;
  logic        refreshing, power_down, self_refresh;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    int         at;
    bit         write;
    logic [2:0] bank;
    logic [10:0] row;
    logic [8:0] col;
  } req_t;
  req_t expq[$];

  ddr2_bank_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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

  // Compare every request leaving the schedule with the expected one.
  always @(negedge clk) begin
    req_t e;
    if (rst_n && burst_start) begin
      if (expq.size() == 0) check(0, "unexpected burst request");
      else begin
        e = expq.pop_front();
        check(cycle == e.at, $sformatf("request at cycle %0d expected %0d", cycle, e.at));
        check(burst_write == e.write && burst_bank == e.bank && burst_row == e.row &&
              burst_col == e.col, "request contents");
      end
    end
  end

  // Present a command; it is accepted on the next edge.
  task automatic issue(ddr2_cmd_e c, logic [2:0] b, logic [10:0] r, logic [8:0] col,
                       bit exp_err = 0, ddr2_err_e exp_code = ERR_NONE);
    @(negedge clk);
    cmd = c; bank = b; row_addr = r; col_addr = col; opcode = 14'(r);
    @(posedge clk);
    #1;
    cmd = CMD_NOP;
    check(seq_err == exp_err, $sformatf("%s seq_err=%0b", c.name(), seq_err));
    if (exp_err) check(err_code == exp_code, $sformatf("%s code %s", c.name(), err_code.name()));
  endtask

  task automatic nops(int n);
    repeat (n) issue(CMD_NOP, 0, 0, 0);
  endtask

  // Expect a burst request for an access accepted at the edge ending cycle
  // 'acc' (the request is seen in the cycle after it leaves the schedule).
  task automatic expect_burst(int acc, bit wr, int rl, logic [2:0] b,
                              logic [10:0] r, logic [8:0] c);
    req_t e;
    e.at = acc + 1 + (wr ? rl - 1 : rl - 3);
    e.write = wr; e.bank = b; e.row = r; e.col = c;
    expq.push_back(e);
  endtask

  initial begin
    int acc;
    cmd = CMD_NOP; bank = 0; row_addr = 0; col_addr = 0; opcode = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    issue(CMD_CKE_EXIT, 0, 0, 0);

    issue(CMD_READ, 3'd2, 0, 9'h10, 1, ERR_BANK_STATE);   // closed bank
    issue(CMD_ACT, 3'd2, 11'h2AA, 0);
    check(bank_open == 8'b0000_0100, "bank 2 open");
    issue(CMD_ACT, 3'd5, 11'h155, 0);
    nops(1);
    // RL = 3
    acc = cycle; issue(CMD_READ, 3'd2, 11'h7FF, 9'h1A4);
    expect_burst(acc, 0, 3, 3'd2, 11'h2AA, 9'h1A4);
    acc = cycle; issue(CMD_WRITE, 3'd5, 0, 9'h003);
    expect_burst(acc, 1, 3, 3'd5, 11'h155, 9'h003);
    nops(4);
    issue(CMD_REF, 0, 0, 0, 1, ERR_NOT_IDLE);              // banks open
    check(!refreshing, "refresh refused");
    // overlapping requests: WRITE then READ two clocks later, same slot
    acc = cycle; issue(CMD_WRITE, 3'd2, 0, 9'h008);
    expect_burst(acc, 1, 3, 3'd2, 11'h2AA, 9'h008);
    nops(1);
    issue(CMD_READ, 3'd2, 0, 9'h00C, 1, ERR_BURST);
    nops(4);
    issue(CMD_PREA, 0, 11'h400, 0);
    nops(3);
    check(bank_open == 0, "all closed");

    // MR CL4, EMR AL2 -> RL 6
    issue(CMD_MRS, 3'd0, 11'b000_0100_0010, 0);
    nops(1);
    issue(CMD_MRS, 3'd1, 11'b000_0001_0000, 0);
    nops(1);
    check(mode.cl == 3'd4 && mode.al == 3'd2, "mode loaded");
    issue(CMD_ACT, 3'd7, 11'h0F0, 0);
    // posted CAS: READ one clock after ACT is legal with AL=2, tRCD=3
    acc = cycle; issue(CMD_READ, 3'd7, 0, 9'h1F3);
    expect_burst(acc, 0, 6, 3'd7, 11'h0F0, 9'h1F3);
    nops(3);
    acc = cycle; issue(CMD_WRITE, 3'd7, 0, 9'h044);
    expect_burst(acc, 1, 6, 3'd7, 11'h0F0, 9'h044);
    nops(12);
    issue(CMD_PD_ENTRY, 0, 0, 0);
    check(power_down, "active power down");
    issue(CMD_NONE, 0, 0, 0);
    issue(CMD_CKE_EXIT, 0, 0, 0);
    issue(CMD_PRE, 3'd7, 0, 0);
    nops(3);
    issue(CMD_REF, 0, 0, 0);
    check(refreshing, "refreshing");
    nops(3);

    check(expq.size() == 0, $sformatf("%0d requests missing", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
