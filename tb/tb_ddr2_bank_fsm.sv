// tb_ddr2_bank_fsm -- self-checking test of the single-bank state machine.
//
// Directed sequences with tRCD = tRP = tWR = 3 clocks: command to a closed
// bank, tRCD and tRP violations, ACTIVATE to an open bank, the exact clock
// at which READ becomes legal (with AL = 0 and with AL = 2), plain and
// all-bank precharge, READA/WRITEA auto precharge (the bank must be idle
// exactly AL + BL/2 + tRP, resp. WL + BL/2 + tWR + tRP clocks after the
// command), commands to another bank and commands while disabled.
//
// Then three random phases (random AL, CL, BL) of 400 clocks each drive
// random commands and compare err, err_code, idle, row_open, open_row and
// rw_ok every clock with a reference that keeps the bank as time stamps:
// the clock from which READ/WRITE is legal (ACT + max(1, tRCD - AL)) and
// the clock from which ACTIVATE is legal again (PRE + tRP, READA + AL +
// BL/2 + tRP, WRITEA + WL + BL/2 + tWR + tRP).
module tb_ddr2_bank_fsm;
  import ddr2_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        en;
  ddr2_cmd_e   cmd;
  logic        sel;
  logic [10:0] row_in;
  ddr2_mode_t  mode;
  logic        idle, row_open, rw_ok, err;
  logic [10:0] open_row;
  ddr2_err_e   err_code;

  int checks = 0, failures = 0;

  localparam int unsigned T_RCD = 3, T_RP = 3, T_WR = 3;   // the module's defaults

  ddr2_bank_fsm dut (.*);

  always #5 clk = ~clk;

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

  // Present a command in the low phase, check the error flag, take the edge.
  task automatic issue(ddr2_cmd_e c, logic s, logic [10:0] r, bit exp_err,
                       ddr2_err_e exp_code = ERR_NONE);
    @(negedge clk);
    cmd = c; sel = s; row_in = r;
    #1;
    check(err == exp_err, $sformatf("%s err=%0b expected %0b", c.name(), err, exp_err));
    if (exp_err) check(err_code == exp_code, $sformatf("%s code %s", c.name(), err_code.name()));
    @(posedge clk);
    #1;
    cmd = CMD_NOP;
  endtask

  task automatic nops(int n);
    repeat (n) begin
      @(negedge clk);
      cmd = CMD_NOP;
      @(posedge clk);
      #1;
    end
  endtask

  // Clocks from the last command until the bank is idle again.
  task automatic clocks_to_idle(int exp, string what);
    int n = 0;
    while (!idle && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(n + 1 == exp, $sformatf("%s: idle after %0d clocks, expected %0d", what, n + 1, exp));
  endtask

  initial begin
    en = 1; cmd = CMD_NOP; sel = 1; row_in = 0; mode = MODE_RESET;
    repeat (2) @(posedge clk);
    #1;
    check(idle && !row_open && !rw_ok, "reset state");
    rst_n = 1;

    issue(CMD_READ, 1, 0, 1, ERR_BANK_STATE);
    issue(CMD_WRITE, 1, 0, 1, ERR_BANK_STATE);
    issue(CMD_PRE, 1, 0, 0);                      // precharge of idle bank: no-op
    check(idle, "still idle");

    // ACT, then READ one clock later violates tRCD
    issue(CMD_ACT, 1, 11'h123, 0);
    check(row_open && open_row == 11'h123 && !idle, "row opened");
    check(!rw_ok, "no read at k=1");
    issue(CMD_READ, 1, 0, 1, ERR_TIMING);         // k=1
    check(!rw_ok, "no read at k=2");
    issue(CMD_ACT, 1, 11'h3, 1, ERR_BANK_STATE);  // k=2: bank already open
    check(rw_ok, "read legal at k=3");
    check(open_row == 11'h123, "row kept");
    issue(CMD_READ, 1, 0, 0);
    issue(CMD_WRITE, 1, 0, 0);
    issue(CMD_READ, 0, 0, 0);                     // other bank: ignored here

    // PRE, then ACT one clock later violates tRP
    issue(CMD_PRE, 1, 0, 0);
    check(!row_open && !idle, "precharging");
    issue(CMD_ACT, 1, 11'h55, 1, ERR_TIMING);     // k=1
    nops(1);                                      // k=2
    issue(CMD_ACT, 1, 11'h55, 0);                 // k=3: legal
    check(open_row == 11'h55, "new row");

    // PREA from ACTIVATING
    issue(CMD_PREA, 0, 0, 0);
    clocks_to_idle(3, "PREA");

    // posted CAS: AL = 2 lets READ follow ACT after one clock
    mode.al = 3'd2;
    issue(CMD_ACT, 1, 11'h7, 0);
    check(rw_ok, "AL=2: read legal one clock after ACT");
    issue(CMD_READ, 1, 0, 0);                     // k=1: cnt 2 <= AL 2
    issue(CMD_PRE, 1, 0, 0);
    nops(3);
    mode.al = 3'd0;

    // READA, BL4, AL 0: idle after 2 + 3 = 5 clocks
    issue(CMD_ACT, 1, 11'h9, 0);
    nops(2);
    issue(CMD_READA, 1, 0, 0);
    check(!row_open, "auto precharge pending");
    issue(CMD_READ, 1, 0, 1, ERR_BANK_STATE);     // k=1: bank is closing
    clocks_to_idle(4, "READA BL4");               // 1 clock used by the check above

    // WRITEA, BL8, CL 4: idle after (4-1) + 4 + 3 + 3 = 13 clocks
    mode.bl8 = 1; mode.cl = 3'd4;
    issue(CMD_ACT, 1, 11'h9, 0);
    nops(2);
    issue(CMD_WRITEA, 1, 0, 0);
    clocks_to_idle(13, "WRITEA BL8");
    mode = MODE_RESET;

    // disabled: nothing happens, nothing flagged
    en = 0;
    issue(CMD_READ, 1, 0, 0);
    issue(CMD_ACT, 1, 11'h1, 0);
    check(idle, "disabled: no activation");
    en = 1;

    random_phases();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- random comparison
  task automatic random_phases();
    int unsigned n, rw_from, act_from;
    bit          open;
    logic [10:0] r_row;
    bit          exp_err;
    ddr2_err_e   exp_code;
    ddr2_cmd_e   c;
    ddr2_cmd_e   pool [9];
    int          bl2, wl;
    pool = '{CMD_NOP, CMD_ACT, CMD_ACT, CMD_READ, CMD_WRITE, CMD_READA,
             CMD_WRITEA, CMD_PRE, CMD_PREA};
    for (int ph = 0; ph < 3; ph++) begin
      // bring the bank back to idle under the old mode, then change it
      issue(CMD_PREA, 1, 0, 0);
      nops(40);
      check(idle, "idle before a random phase");
      mode.al  = 3'($urandom_range(0, 3));
      mode.cl  = 3'($urandom_range(3, 5));
      mode.bl8 = 1'($urandom_range(0, 1));
      bl2 = mode.bl8 ? 4 : 2;
      wl  = int'(mode.al) + int'(mode.cl) - 1;
      open = 0; r_row = 0; rw_from = 0; act_from = 0;
      for (n = 0; n < 400; n++) begin
        @(negedge clk);
        c = pool[$urandom_range(0, 8)];
        if ($urandom_range(0, 2) == 0) c = CMD_NOP;
        cmd = c;
        sel = ($urandom_range(0, 5) != 0);
        en  = ($urandom_range(0, 15) != 0);
        row_in = 11'($urandom);
        #1;
        // the bank as it stands in this clock
        check(idle == (!open && n >= act_from), $sformatf("idle=%0b at step %0d", idle, n));
        check(row_open == open, $sformatf("row_open=%0b at step %0d", row_open, n));
        check(rw_ok == (open && n >= rw_from), $sformatf("rw_ok=%0b at step %0d", rw_ok, n));
        if (open) check(open_row == r_row, "open_row");
        // the reference verdict on this command
        exp_err = 0; exp_code = ERR_NONE;
        if (en && sel && c == CMD_ACT) begin
          if (open || n < act_from) begin
            exp_err  = 1;
            // refused in the tRP window itself, else a state error
            exp_code = (!open && in_precharge(n, act_from)) ? ERR_TIMING : ERR_BANK_STATE;
          end
        end else if (en && sel && c inside {CMD_READ, CMD_WRITE, CMD_READA, CMD_WRITEA}) begin
          if (!(open && n >= rw_from)) begin
            exp_err  = 1;
            exp_code = open ? ERR_TIMING : ERR_BANK_STATE;
          end
        end
        check(err == exp_err, $sformatf("%s err=%0b expected %0b at step %0d",
                                        c.name(), err, exp_err, n));
        if (exp_err && err)
          check(err_code == exp_code, $sformatf("%s code %s expected %s at step %0d",
                                                c.name(), err_code.name(), exp_code.name(), n));
        // the reference takes the edge
        if (en && !exp_err) begin
          if (sel && c == CMD_ACT) begin
            open = 1; r_row = row_in;
            rw_from = n + ((T_RCD > int'(mode.al) + 1) ? T_RCD - int'(mode.al) : 1);
          end else if (sel && c == CMD_READA && open) begin
            open = 0; act_from = n + int'(mode.al) + bl2 + T_RP;
            pre_at = n + int'(mode.al) + bl2;
          end else if (sel && c == CMD_WRITEA && open) begin
            open = 0; act_from = n + wl + bl2 + T_WR + T_RP;
            pre_at = n + wl + bl2 + T_WR;
          end else if (((sel && c == CMD_PRE) || c == CMD_PREA) && open) begin
            open = 0; act_from = n + T_RP;
            pre_at = n;
          end
        end
        @(posedge clk);
        #1;
      end
    end
    en = 1; sel = 1; cmd = CMD_NOP;
  endtask

  // Clock at which the last precharge began, and whether step n lies in
  // its tRP window (an ACTIVATE there is a timing error; before it, while
  // an auto precharge still waits for its burst, a bank-state error).
  int unsigned pre_at = 0;

  function automatic bit in_precharge(int unsigned n, int unsigned act_from);
    return n > pre_at && n < act_from;
  endfunction

endmodule
