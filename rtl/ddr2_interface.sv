// ddr2_interface -- double-data-rate pin side of the DDR2 model.
//
// Write path: DQ and DM are captured on both edges of the data strobe. When
// the device has several strobes (one per byte lane; a 4-bit wide part has
// one strobe and one mask bit) they are combined by
// an AND into one capture strobe. The beat taken on the strobe's rising
// edge is held and, together with the beat taken on the following falling
// edge, forms a double-width pair (first beat in the low half). The pair is
// handed to the clock domain on the next rising clock edge (wr_data,
// wr_mask) for the SRAM interface. With RDQS enabled the DM pin serves as
// the RDQS output, so write data is then never masked.
//
// Read path: when rd_valid brings a pair from the SRAM interface, it is
// registered on the next rising clock edge; the low half is driven on DQ
// while the clock is high and the high half while it is low, so two beats
// leave per clock. DQS toggles with the clock during the data (edge
// aligned), is driven low one clock before it (preamble), and DQS# is its
// complement. RDQS/RDQS# copy DQS/DQS# when RDQS is enabled.
//
// Bidirectional pins are split into _in, _out and output-enable signals.
// The double-width pair, the strobe-edge capture, the AND of several
// strobes and the DQS generation on reads follow the design; the split
// pins, the preamble and the exact handover edges are this model's.
module ddr2_interface
  import ddr2_pkg::*;
#(
  parameter int unsigned DQ_BITS = 16,
  localparam int unsigned DM_BITS  = (DQ_BITS + 7) / 8,
  localparam int unsigned DQS_BITS = (DQ_BITS + 7) / 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ddr2_mode_t           mode,
  // pins, write direction
  input  logic [DQ_BITS-1:0]   dq_in,
  input  logic [DQS_BITS-1:0]  dqs_in,
  input  logic [DM_BITS-1:0]   dm_in,
  // pins, read direction
  output logic [DQ_BITS-1:0]   dq_out,
  output logic                 dq_oe,
  output logic [DQS_BITS-1:0]  dqs_out,
  output logic [DQS_BITS-1:0]  dqs_n_out,
  output logic                 dqs_oe,
  output logic                 rdqs_out,
  output logic                 rdqs_n_out,
  output logic                 rdqs_oe,
  // towards the SRAM interface
  output logic [2*DQ_BITS-1:0] wr_data,
  output logic [2*DM_BITS-1:0] wr_mask,
  input  logic                 rd_valid,
  input  logic [2*DQ_BITS-1:0] rd_data
);

  // ------------------------------------------------------------- write
  logic                 dqs_w;
  logic [DQ_BITS-1:0]   rise_dq;
  logic [DM_BITS-1:0]   rise_dm;
  logic [2*DQ_BITS-1:0] pair_dq;
  logic [2*DM_BITS-1:0] pair_dm;

  assign dqs_w = &dqs_in;

  always_ff @(posedge dqs_w) begin
    rise_dq <= dq_in;
    rise_dm <= dm_in;
  end

  always_ff @(negedge dqs_w) begin
    pair_dq <= {dq_in, rise_dq};
    pair_dm <= {dm_in, rise_dm};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_data <= '0;
      wr_mask <= '0;
    end else begin
      wr_data <= pair_dq;
      wr_mask <= mode.rdqs_en ? '0 : pair_dm;
    end
  end

  // -------------------------------------------------------------- read
  logic                 rd_act_q;
  logic [2*DQ_BITS-1:0] rd_pair_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_act_q  <= 1'b0;
      rd_pair_q <= '0;
    end else begin
      rd_act_q  <= rd_valid;
      if (rd_valid) rd_pair_q <= rd_data;
    end
  end

  // The strobe is the clock gated by an enable that changes only while the
  // clock is low (taken on the falling edge from rd_valid, which announces
  // the pair for the next rising edge), so DQS/RDQS carry no glitches.
  logic strobe_en, strobe;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) strobe_en <= 1'b0;
    else        strobe_en <= rd_valid;
  end

  assign strobe     = strobe_en && clk;
  assign dq_out     = clk ? rd_pair_q[DQ_BITS-1:0] : rd_pair_q[2*DQ_BITS-1:DQ_BITS];
  assign dq_oe      = rd_act_q;
  assign dqs_oe     = rd_act_q || rd_valid;
  assign dqs_out    = {DQS_BITS{strobe}};
  assign dqs_n_out  = {DQS_BITS{!strobe}};
  assign rdqs_oe    = dqs_oe && mode.rdqs_en;
  assign rdqs_out   = strobe && mode.rdqs_en;
  assign rdqs_n_out = !strobe && mode.rdqs_en;

endmodule
