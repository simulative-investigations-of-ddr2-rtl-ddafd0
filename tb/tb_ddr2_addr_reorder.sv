// tb_ddr2_addr_reorder -- self-checking test of the address reorder block.
//
// Applies 1000 random 24-bit addresses plus single-bit walking patterns and
// builds the expected result bit by bit: column bits stay, the bank field
// moves from the top to just above the column, the row field moves up by
// the bank width. Combinational block: results are checked 1 ns after the
// input changes.
module tb_ddr2_addr_reorder;

  localparam int AW = 24, BB = 3, CB = 9, RB = AW - BB - CB;

  logic [AW-1:0] sram_addr, addr_re;
  int checks = 0, failures = 0;

  ddr2_addr_reorder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] expected(logic [AW-1:0] a);
    logic [AW-1:0] e = '0;
    for (int i = 0; i < CB; i++) e[i] = a[i];
    for (int j = 0; j < BB; j++) e[CB + j] = a[CB + RB + j];
    for (int j = 0; j < RB; j++) e[CB + BB + j] = a[CB + j];
    return e;
  endfunction

  task automatic try(logic [AW-1:0] a);
    sram_addr = a;
    #1;
    checks++;
    if (addr_re !== expected(a)) begin
      failures++;
      $display("FAIL %h -> %h, expected %h", a, addr_re, expected(a));
    end
  endtask

  initial begin
    for (int i = 0; i < AW; i++) try(AW'(1) << i);
    for (int n = 0; n < 1000; n++) try(AW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
