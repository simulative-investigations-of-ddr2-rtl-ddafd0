// ddr2_all_bank_fsm -- device-wide state machine of the DDR2 model ("all bank FSM").
//
// Handles the commands that concern the whole device: load mode register
// (MRS/EMRS), auto refresh, self refresh, and active / precharge power down.
// It also holds the mode registers and presents them as a ddr2_mode_t.
//
//   AB_NORMAL     bank commands are passed to the bank FSMs (bank_en = 1)
//   AB_MRS        tMRD after a mode-register load; only NOP/DESEL allowed
//   AB_REFRESH    tRFC after an auto refresh;       only NOP/DESEL allowed
//   AB_PD_PRE     precharge power down (CKE low, all banks idle)
//   AB_PD_ACT     active power down    (CKE low, a row open)
//   AB_SELF_REF   self refresh         (CKE low)
// REF, MRS and self-refresh entry need all banks idle (all_idle); a
// power-down entry picks the active or precharge variant from any_open.
// A command that is not allowed is reported on err/err_code in the same
// cycle and not executed. After reset the device is in AB_PD_PRE, as a
// DDR2 device powers up with CKE low; the first CKE rise starts operation.
//
// Mode registers (JEDEC layout): MR (BA1:0 = 00) A2:A0 burst length
// (3'b011 = 8, otherwise 4), A3 burst type, A6:A4 CAS latency;
// EMR (BA1:0 = 01) A5:A3 additive latency, A11 RDQS enable. CAS latency
// values outside 3..6 and additive latency above 5 are clamped.
// The design assigns power down, refresh and load mode register to this
// FSM; the states, the register layout and tRFC/tMRD are this model's.
module ddr2_all_bank_fsm
  import ddr2_pkg::*;
#(
  parameter int unsigned BANK_BITS = 3,
  parameter int unsigned T_RFC     = 21,
  parameter int unsigned T_MRD     = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ddr2_cmd_e              cmd,
  input  logic [BANK_BITS-1:0]   bank,
  input  logic [OPCODE_BITS-1:0] opcode,
  input  logic                   all_idle,
  input  logic                   any_open,
  output logic                   bank_en,
  output ddr2_mode_t             mode,
  output logic                   refreshing,
  output logic                   power_down,
  output logic                   self_refresh,
  output logic                   err,
  output ddr2_err_e              err_code
);

  typedef enum logic [2:0] {
    AB_NORMAL, AB_MRS, AB_REFRESH, AB_PD_PRE, AB_PD_ACT, AB_SELF_REF
  } ab_state_e;

  ab_state_e  state, state_d;
  logic [5:0] cnt, cnt_d;
  ddr2_mode_t mode_d;

  assign bank_en      = (state == AB_NORMAL);
  assign refreshing   = (state == AB_REFRESH);
  assign power_down   = (state == AB_PD_PRE) || (state == AB_PD_ACT);
  assign self_refresh = (state == AB_SELF_REF);

  logic is_quiet;
  assign is_quiet = cmd inside {CMD_NOP, CMD_DESEL};

  always_comb begin
    state_d  = state;
    cnt_d    = (cnt != 0) ? cnt - 6'd1 : 6'd0;
    mode_d   = mode;
    err      = 1'b0;
    err_code = ERR_NONE;

    unique case (state)
      AB_NORMAL: begin
        unique case (cmd)
          CMD_MRS: begin
            if (!all_idle) begin
              err = 1'b1; err_code = ERR_NOT_IDLE;
            end else begin
              if (bank[1:0] == 2'b00) begin
                mode_d.bl8        = (opcode[2:0] == 3'b011);
                mode_d.interleave = opcode[3];
                mode_d.cl         = (opcode[6:4] < 3'd3) ? 3'd3 :
                                    (opcode[6:4] > 3'd6) ? 3'd6 : opcode[6:4];
              end else if (bank[1:0] == 2'b01) begin
                mode_d.al         = (opcode[5:3] > 3'd5) ? 3'd5 : opcode[5:3];
                mode_d.rdqs_en    = opcode[11];
              end
              if (T_MRD > 1) begin
                state_d = AB_MRS;
                cnt_d   = 6'(T_MRD - 2);
              end
            end
          end
          CMD_REF: begin
            if (!all_idle) begin
              err = 1'b1; err_code = ERR_NOT_IDLE;
            end else begin
              state_d = AB_REFRESH;
              cnt_d   = 6'(T_RFC - 2);
            end
          end
          CMD_SREF_ENTRY: begin
            if (!all_idle) begin
              err = 1'b1; err_code = ERR_NOT_IDLE;
            end else state_d = AB_SELF_REF;
          end
          CMD_PD_ENTRY: state_d = any_open ? AB_PD_ACT : AB_PD_PRE;
          CMD_CKE_EXIT, CMD_NONE: begin
            err = 1'b1; err_code = ERR_DEV_STATE;
          end
          CMD_ILLEGAL: begin
            err = 1'b1; err_code = ERR_ILLEGAL;
          end
          default: ;  // bank commands, NOP, DESEL
        endcase
      end
      AB_MRS, AB_REFRESH: begin
        if (!is_quiet) begin
          err = 1'b1; err_code = ERR_DEV_STATE;
        end
        if (cnt == 0) state_d = AB_NORMAL;
      end
      AB_PD_PRE, AB_PD_ACT, AB_SELF_REF: begin
        // DESEL is what the decoder shows while it is held in reset
        if (cmd == CMD_CKE_EXIT) state_d = AB_NORMAL;
        else if (!(cmd inside {CMD_NONE, CMD_DESEL})) begin
          err = 1'b1; err_code = ERR_DEV_STATE;
        end
      end
      default: state_d = AB_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= AB_PD_PRE;         // powers up with CKE low
      cnt   <= '0;
      mode  <= MODE_RESET;
    end else begin
      state <= state_d;
      cnt   <= cnt_d;
      mode  <= mode_d;
    end
  end

endmodule
