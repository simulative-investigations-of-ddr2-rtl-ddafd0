// tb_ddr2_instr_decoder -- self-checking test of the DDR2 command decoder.
//
// Checks the reset values (DESEL, zero addresses) and the operating point
// shown in the design's decoder waveform (CKE low with all command pins low
// decodes to "no command", bank 7, address split into row and column), then
// drives 2000 random
// pin combinations (CKE, CS#, RAS#, CAS#, WE#, bank, address) and compares
// the registered outputs, one clock later, with a reference decode written
// as a lookup over the JEDEC command truth table. Counts how many times
// each command was seen and fails if one never occurred.
module tb_ddr2_instr_decoder;
  import ddr2_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cke, cs_n, ras_n, cas_n, we_n;
  logic [2:0]  bank_in;
  logic [10:0] addr;
  ddr2_cmd_e   cmd;
  logic [2:0]  bank;
  logic [10:0] row_addr;
  logic [8:0]  col_addr;
  logic [13:0] opcode;

  int checks = 0, failures = 0;
  int seen [16];

  ddr2_instr_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ddr2_cmd_e ref_cmd(logic kp, logic k, logic cs, logic r,
                                        logic c, logic w, logic a10);
    string key;
    if (kp && k) begin
      if (cs) return CMD_DESEL;
      case ({r, c, w})
        3'b111: return CMD_NOP;
        3'b011: return CMD_ACT;
        3'b101: return a10 ? CMD_READA : CMD_READ;
        3'b100: return a10 ? CMD_WRITEA : CMD_WRITE;
        3'b010: return a10 ? CMD_PREA : CMD_PRE;
        3'b001: return CMD_REF;
        3'b000: return CMD_MRS;
        default: return CMD_ILLEGAL;
      endcase
    end
    if (kp && !k) begin
      if (cs || {r, c, w} == 3'b111) return CMD_PD_ENTRY;
      if ({r, c, w} == 3'b001) return CMD_SREF_ENTRY;
      return CMD_ILLEGAL;
    end
    if (!kp && k) return (cs || {r, c, w} == 3'b111) ? CMD_CKE_EXIT : CMD_ILLEGAL;
    return CMD_NONE;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic kp;
    logic [10:0] a_q;
    logic [2:0]  b_q;
    ddr2_cmd_e   exp;
    cke = 0; cs_n = 1; ras_n = 1; cas_n = 1; we_n = 1; bank_in = 3'b111; addr = 11'h548;
    repeat (3) @(posedge clk);
    #1;
    check(cmd == CMD_DESEL && bank == 0 && row_addr == 0 && col_addr == 0 && opcode == 0,
          "reset values");
    rst_n = 1;
    // the operating point of the design's decoder waveform: CKE low, all
    // command pins low, bank 3'b111, address 11'b101_0100_1000
    cs_n = 0; ras_n = 0; cas_n = 0; we_n = 0;
    @(posedge clk);
    #1;
    check(cmd == CMD_NONE && bank == 3'b111 && row_addr == 11'h548 &&
          col_addr == 9'h148 && opcode == 14'h0548, "waveform operating point");
    kp = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cke = ($urandom_range(0, 3) != 0);
      if (i < 4) cke = 0;
      {cs_n, ras_n, cas_n, we_n} = 4'($urandom);
      if ($urandom_range(0, 2) == 0) cs_n = 0;
      bank_in = 3'($urandom);
      addr    = 11'($urandom);
      exp = ref_cmd(kp, cke, cs_n, ras_n, cas_n, we_n, addr[10]);
      a_q = addr; b_q = bank_in;
      @(posedge clk);
      #1;
      check(cmd == exp, $sformatf("cmd %s expected %s", cmd.name(), exp.name()));
      check(bank == b_q && row_addr == a_q && col_addr == a_q[8:0] &&
            opcode == {3'b000, a_q}, "address outputs");
      seen[int'(exp)]++;
      kp = cke;
    end
    for (int c = 0; c < 16; c++) begin
      check(seen[c] > 0, $sformatf("command %0d never produced", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
