// ddr2_bank_fsm -- state machine of one DDR2 bank ("single bank FSM").
//
// Follows the bank through IDLE -> ACTIVATING (tRCD) -> ACTIVE and back
// through PRECHARGING (tRP), with an AUTOPRE_WAIT state for READ/WRITE with
// auto precharge, where the precharge starts once the burst (and, for a
// write, the write recovery time tWR) is over. Each command aimed at the
// bank is checked against the state: a READ/WRITE to a closed bank, an
// ACTIVATE to an open bank, or an ACTIVATE before tRP has elapsed is
// reported on err/err_code in the same cycle and not executed.
// With additive latency AL a READ/WRITE is accepted AL clocks before tRCD
// has elapsed (posted CAS).
//
// Interface: cmd/sel come from the bank control one clock after the pins;
// sel marks that the command's bank address is this bank. en is low while
// the device is not in its normal operating state; the bank then ignores
// everything. rw_ok says whether a READ/WRITE would be accepted now.
//
// The design names this FSM and the commands it handles (read, write,
// active, precharge); the states, the timing checks and the default
// timings (DDR2-400 numbers in clocks) are this model's own.
module ddr2_bank_fsm
  import ddr2_pkg::*;
#(
  parameter int unsigned ROW_BITS = 11,
  parameter int unsigned T_RCD    = 3,
  parameter int unsigned T_RP     = 3,
  parameter int unsigned T_WR     = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  ddr2_cmd_e           cmd,
  input  logic                sel,
  input  logic [ROW_BITS-1:0] row_in,
  input  ddr2_mode_t          mode,
  output logic                idle,      // precharged and tRP met
  output logic                row_open,  // ACTIVATING or ACTIVE
  output logic [ROW_BITS-1:0] open_row,
  output logic                rw_ok,
  output logic                err,
  output ddr2_err_e           err_code
);

  typedef enum logic [2:0] {
    SB_IDLE, SB_ACTIVATING, SB_ACTIVE, SB_AUTOPRE_WAIT, SB_PRECHARGING
  } sb_state_e;

  sb_state_e  state, state_d;
  logic [4:0] cnt, cnt_d;
  logic [ROW_BITS-1:0] row_d;
  logic [4:0] burst_pairs, rd_ap_wait, wr_ap_wait;

  assign burst_pairs = mode.bl8 ? 5'd4 : 5'd2;
  // Clocks from the READA/WRITEA until the internal precharge starts:
  // AL + BL/2 for a read, WL + BL/2 + tWR for a write.
  assign rd_ap_wait  = 5'(mode.al) + burst_pairs;
  assign wr_ap_wait  = 5'(mode.al) + 5'(mode.cl) - 5'd1 + burst_pairs + 5'(T_WR);

  assign idle     = (state == SB_IDLE) || (state == SB_PRECHARGING && cnt == 0);
  assign row_open = (state == SB_ACTIVATING) || (state == SB_ACTIVE);
  assign rw_ok    = (state == SB_ACTIVE) ||
                    (state == SB_ACTIVATING && cnt <= 5'(mode.al));

  logic is_rw, is_auto;
  assign is_rw   = cmd inside {CMD_READ, CMD_READA, CMD_WRITE, CMD_WRITEA};
  assign is_auto = cmd inside {CMD_READA, CMD_WRITEA};

  always_comb begin
    state_d  = state;
    cnt_d    = (cnt != 0) ? cnt - 5'd1 : 5'd0;
    row_d    = open_row;
    err      = 1'b0;
    err_code = ERR_NONE;

    // time-driven moves
    unique case (state)
      SB_ACTIVATING:   if (cnt == 0) state_d = SB_ACTIVE;
      SB_AUTOPRE_WAIT: if (cnt == 0) begin
                         state_d = SB_PRECHARGING;
                         cnt_d   = 5'(T_RP - 1);
                       end
      SB_PRECHARGING:  if (cnt == 0) state_d = SB_IDLE;
      default: ;
    endcase

    if (en && sel) begin
      if (cmd == CMD_ACT) begin
        if (state == SB_IDLE || (state == SB_PRECHARGING && cnt == 0)) begin
          row_d = row_in;
          if (T_RCD > 1) begin
            state_d = SB_ACTIVATING;
            cnt_d   = 5'(T_RCD - 1);
          end else begin
            state_d = SB_ACTIVE;
          end
        end else begin
          err      = 1'b1;
          err_code = (state == SB_PRECHARGING) ? ERR_TIMING : ERR_BANK_STATE;
        end
      end else if (is_rw) begin
        if (rw_ok) begin
          if (is_auto) begin
            state_d = SB_AUTOPRE_WAIT;
            cnt_d   = ((cmd == CMD_READA) ? rd_ap_wait : wr_ap_wait) - 5'd1;
          end
        end else begin
          err      = 1'b1;
          err_code = (state == SB_ACTIVATING) ? ERR_TIMING : ERR_BANK_STATE;
        end
      end else if (cmd == CMD_PRE) begin
        if (row_open) begin
          state_d = SB_PRECHARGING;
          cnt_d   = 5'(T_RP - 1);
        end
      end
    end
    if (en && cmd == CMD_PREA && row_open) begin
      state_d = SB_PRECHARGING;
      cnt_d   = 5'(T_RP - 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SB_IDLE;
      cnt      <= '0;
      open_row <= '0;
    end else begin
      state    <= state_d;
      cnt      <= cnt_d;
      open_row <= row_d;
    end
  end

endmodule
