// ddr2_bank_control -- control path of the DDR2 model: sequence checking and
// burst scheduling.
//
// Groups the all-bank FSM (power down, refresh, mode registers) and one
// single-bank FSM per bank. Every decoded command is checked by them; a
// command that breaks the DDR2 command rules raises seq_err for one clock
// (with err_code) one clock after it reaches this block, and is ignored.
//
// An accepted READ/WRITE is turned into a burst request for the data path.
// The request waits in a short schedule (a shift register of MAX_RL slots)
// so that the read data leaves the model exactly RL = AL + CL clocks after
// the READ was on the pins, and write data is taken at WL = RL - 1:
//   * the decoder registers the command on edge E0 and this block accepts
//     it on E1;
//   * a read request leaves the schedule on E(RL-2), the SRAMs are read on
//     E(RL-1) and the DDR2 interface starts driving the data on E(RL)
//     (with SRAM_RD_LAT = 0, an asynchronous SRAM, the request leaves on
//     E(RL-1) and the SRAMs are read during the clock before E(RL));
//   * a write request leaves the schedule on E(RL); by then the first data
//     pair, strobed in during clock WL, has been registered on E(WL+1).
// Two requests that would leave in the same slot raise ERR_BURST.
//
// Outputs: burst_start/burst_write with the burst's bank, open row and start
// column, and the mode registers. The grouping of the FSMs follows the
// design; the schedule and its timing are this model's own. RL must be at
// least 3, which the CAS latency range 3..6 guarantees.
module ddr2_bank_control
  import ddr2_pkg::*;
#(
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned ROW_BITS  = 11,
  parameter int unsigned COL_BITS  = 9,
  parameter int unsigned T_RCD     = 3,
  parameter int unsigned T_RP      = 3,
  parameter int unsigned T_WR      = 3,
  parameter int unsigned T_RFC     = 21,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned SRAM_RD_LAT = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ddr2_cmd_e              cmd,
  input  logic [BANK_BITS-1:0]   bank,
  input  logic [ROW_BITS-1:0]    row_addr,
  input  logic [COL_BITS-1:0]    col_addr,
  input  logic [OPCODE_BITS-1:0] opcode,
  output ddr2_mode_t             mode,
  output logic                   burst_start,
  output logic                   burst_write,
  output logic [BANK_BITS-1:0]   burst_bank,
  output logic [ROW_BITS-1:0]    burst_row,
  output logic [COL_BITS-1:0]    burst_col,
  output logic                   seq_err,
  output ddr2_err_e              err_code,
  output logic [(1<<BANK_BITS)-1:0] bank_open,
  output logic                   refreshing,
  output logic                   power_down,
  output logic                   self_refresh
);

  localparam int unsigned NB = 1 << BANK_BITS;

  // ---------------------------------------------------------------- FSMs
  logic                bank_en;
  logic [NB-1:0]       b_idle, b_open, b_rw_ok, b_err;
  ddr2_err_e           b_code [NB];
  logic [ROW_BITS-1:0] b_row  [NB];
  logic                ab_err;
  ddr2_err_e           ab_code;

  ddr2_all_bank_fsm #(
    .BANK_BITS(BANK_BITS), .T_RFC(T_RFC), .T_MRD(T_MRD)
  ) u_all_bank (
    .clk, .rst_n, .cmd, .bank, .opcode,
    .all_idle(&b_idle), .any_open(|b_open),
    .bank_en, .mode, .refreshing, .power_down, .self_refresh,
    .err(ab_err), .err_code(ab_code)
  );

  for (genvar b = 0; b < NB; b++) begin : g_bank
    ddr2_bank_fsm #(
      .ROW_BITS(ROW_BITS), .T_RCD(T_RCD), .T_RP(T_RP), .T_WR(T_WR)
    ) u_bank (
      .clk, .rst_n, .en(bank_en), .cmd,
      .sel(bank == BANK_BITS'(b)), .row_in(row_addr), .mode,
      .idle(b_idle[b]), .row_open(b_open[b]), .open_row(b_row[b]),
      .rw_ok(b_rw_ok[b]), .err(b_err[b]), .err_code(b_code[b])
    );
  end

  assign bank_open = b_open;

  // ------------------------------------------------------------ schedule
  typedef struct packed {
    logic                 valid;
    logic                 write;
    logic [BANK_BITS-1:0] bank;
    logic [ROW_BITS-1:0]  row;
    logic [COL_BITS-1:0]  col;
  } slot_t;

  slot_t sched [MAX_RL];

  logic       is_rd, is_wr, accept;
  logic [3:0] rl, delay;
  slot_t      new_slot;
  logic       collide;

  assign is_rd  = cmd inside {CMD_READ, CMD_READA};
  assign is_wr  = cmd inside {CMD_WRITE, CMD_WRITEA};
  assign accept = bank_en && (is_rd || is_wr) && b_rw_ok[bank];
  assign rl     = 4'(mode.al) + 4'(mode.cl);
  assign delay  = is_wr ? rl - 4'd1 : rl - 4'd2 - 4'(SRAM_RD_LAT);

  always_comb begin
    new_slot.valid = 1'b1;
    new_slot.write = is_wr;
    new_slot.bank  = bank;
    new_slot.row   = b_row[bank];
    new_slot.col   = col_addr;
  end

  // The slot that will hold the new request after this edge's shift.
  always_comb begin
    collide = 1'b0;
    if (accept && delay < 4'(MAX_RL - 1)) collide = sched[delay + 4'd1].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_RL; i++) sched[i] <= '0;
    end else begin
      for (int i = 0; i < MAX_RL - 1; i++) sched[i] <= sched[i+1];
      sched[MAX_RL-1] <= '0;
      if (accept && !collide) sched[delay] <= new_slot;
    end
  end

  assign burst_start = sched[0].valid;
  assign burst_write = sched[0].write;
  assign burst_bank  = sched[0].bank;
  assign burst_row   = sched[0].row;
  assign burst_col   = sched[0].col;

  // -------------------------------------------------------------- errors
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_err  <= 1'b0;
      err_code <= ERR_NONE;
    end else begin
      seq_err  <= 1'b0;
      err_code <= ERR_NONE;
      if (ab_err) begin
        seq_err  <= 1'b1;
        err_code <= ab_code;
      end else if (bank_en && b_err[bank]) begin
        seq_err  <= 1'b1;
        err_code <= b_code[bank];
      end else if (collide) begin
        seq_err  <= 1'b1;
        err_code <= ERR_BURST;
      end
    end
  end

endmodule
