// tb_ddr2_model_cfg -- end-to-end test of the DDR2 model in device
// geometries other than the default.
//
// Runs three ddr2_cfg_harness instances side by side, each with its own clock:
//   * x8 part, 4 banks, 13 row bits, 10 column bits (A9..A0), 13 address pins;
//   * x4 part, 8 banks, 14 row bits, 11 column bits (the top one on A11),
//     14 address pins, one DQS/DM lane of four bits;
//   * the default geometry on asynchronous SRAMs (SRAM_RD_LAT = 0), whose
//     read data come back in the clock they are addressed.
// Each loads random modes and does write/read round trips at a random
// column and at the same column with the top column bit flipped, so the
// column bits above A10 and the narrow data lanes are exercised. The test
// passes when all three harnesses finish with no failed check.
module tb_ddr2_model_cfg;

  int   checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  logic done_a, done_b, done_c;
  int   checks, failures;

  ddr2_cfg_harness #(.DQ_BITS(8), .BANK_BITS(2), .ROW_BITS(13), .COL_BITS(10),
                     .ADDR_BITS(13), .HALF(5ns))
    u_x8 (.checks(checks_a), .failures(failures_a), .done(done_a));

  ddr2_cfg_harness #(.DQ_BITS(4), .BANK_BITS(3), .ROW_BITS(14), .COL_BITS(11),
                     .ADDR_BITS(14), .HALF(4ns))
    u_x4 (.checks(checks_b), .failures(failures_b), .done(done_b));

  ddr2_cfg_harness #(.DQ_BITS(16), .BANK_BITS(3), .ROW_BITS(11), .COL_BITS(9),
                     .ADDR_BITS(11), .SRAM_RD_LAT(0), .HALF(5ns))
    u_async (.checks(checks_c), .failures(failures_c), .done(done_c));

  initial begin
    #2ms;
    checks   = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    checks   = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c;
    if (checks_a < 100 || checks_b < 100 || checks_c < 100) failures++;
    $display("x8: %0d checks, %0d failures; x4: %0d checks, %0d failures",
             checks_a, failures_a, checks_b, failures_b);
    $display("asynchronous SRAM: %0d checks, %0d failures", checks_c, failures_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
