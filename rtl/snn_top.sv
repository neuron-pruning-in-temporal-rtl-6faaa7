// snn_top: spiking neural network processor with neuron pruning in the
// temporal domain (NPTD).
//
// The processor runs a rate-coded convolutional SNN, 48c5-AP2-96c5-AP2-96c5-
// AP2-10, on 32x32 images. The first convolution (48c5) is computed off chip;
// its spikes enter through the in_* port every timestep. On chip are conv2
// (96 channels, 16x16), conv3 (96 channels, 8x8) and the 10-neuron fully
// connected layer; the 2x2 average pools are folded into the fan-out address
// generation (their 1/4 factor is expected to be folded into the weights).
//
// Structure: a global controller (global_ctrl), the output spike buffer
// (spike_buffer), LANES = 48 identical sub-blocks (sub_block), each holding
// one SFC unit, one MVU unit, two membrane banks, a bias memory, a weight
// memory and eight pruned flag banks, and the output spike counters
// (class_argmax). A neuron whose membrane voltage falls below its layer's
// pruning threshold is flagged; it is neither updated nor checked again in
// the frame, and runs of rows flagged in all lanes are skipped by the scan.
//
// Use: fill the weight and bias memories through ld_* (lane ld_lane_i, address
// ld_addr_i), set cfg_i, pulse start_i with num_steps_i. For every timestep
// send the records of the first layer's spikes (group, y, x on the 32x32 grid,
// one bit per channel of the group) with a valid/ready handshake and in_last_i
// on the last record. done_o pulses when the frame is over; class_o is the
// class whose output neuron fired most, cls_count_o the spike counts.
// Memory layouts are given in global_ctrl.
// The lanes' prune outputs, the buffer fill level and the largest class count
// are not used at this level; they stay as observation points for a testbench.
// The block structure and sizes follow the design description; the interfaces
// are this design's choice.
module snn_top
  import snn_pkg::*;
#(
  parameter int LANES     = 48,
  parameter int IMG       = 32,
  parameter int C1        = 48,
  parameter int C2        = 96,
  parameter int C3        = 96,
  parameter int NCLS      = 10,
  parameter int BUF_DEPTH = 16,
  parameter int YW        = $clog2(IMG),
  parameter int GW        = 4,
  parameter int KS        = 5,
  parameter int N0 = (IMG / 2) * (IMG / 2) * (C2 / LANES) / 2,
  parameter int N1 = (IMG / 4) * (IMG / 4) * (C3 / LANES) / 2,
  parameter int ROWS   = N0 + N1 + 1,
  parameter int WDEPTH = (C2 / LANES) * C1 * KS * KS + (C3 / LANES) * C2 * KS * KS
                         + C3 * (IMG / 8) * (IMG / 8),
  parameter int ROW_W  = $clog2(ROWS + FLAG_BANKS),
  parameter int WA_W   = $clog2(WDEPTH),
  parameter int REC_W  = 2 + GW + 2 * YW + LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  // frame control
  input  logic             start_i,
  input  logic [15:0]      num_steps_i,
  input  layer_cfg_t       cfg_i [NLAYERS],
  output logic             busy_o,
  output logic             done_o,
  output logic [15:0]      step_o,
  // first-layer spikes
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  logic             in_last_i,
  input  logic [GW-1:0]    in_g_i,
  input  logic [YW-1:0]    in_y_i,
  input  logic [YW-1:0]    in_x_i,
  input  logic [LANES-1:0] in_mask_i,
  // memory load
  input  logic             ld_w_i,
  input  logic             ld_b_i,
  input  logic [$clog2(LANES)-1:0] ld_lane_i,
  input  logic [WA_W-1:0]  ld_addr_i,
  input  logic [WGT_W-1:0] ld_data_i,
  // result
  output logic [$clog2(NCLS)-1:0]   class_o,
  output logic [NCLS-1:0][15:0]     cls_count_o
);

  lane_op_e         op;
  logic             bank, flag_clr, win_bank;
  logic [ROW_W-1:0] row, win_row;
  logic [WA_W-1:0]  waddr;
  logic [1:0]       layer;
  logic [LANES-1:0] lane_en, spike, prune;
  logic [FLAG_BANKS-1:0] win [LANES];
  logic [FLAG_BANKS-1:0] win_all;

  logic             buf_push, buf_pop, buf_empty, buf_full;
  logic [REC_W-1:0] buf_wdata, buf_head;

  logic             cls_clr, cls_inc;
  logic [NCLS-1:0]  cls_spike;
  logic [15:0]      cls_max;

  global_ctrl #(
    .LANES(LANES), .IMG(IMG), .C1(C1), .C2(C2), .C3(C3), .NCLS(NCLS), .KS(KS),
    .YW(YW), .GW(GW)
  ) u_ctrl (
    .clk, .rst_n,
    .start_i, .num_steps_i, .busy_o, .done_o, .step_o,
    .in_valid_i, .in_ready_o, .in_last_i, .in_g_i, .in_y_i, .in_x_i, .in_mask_i,
    .buf_push_o (buf_push),
    .buf_data_o (buf_wdata),
    .buf_pop_o  (buf_pop),
    .buf_head_i (buf_head),
    .buf_empty_i(buf_empty),
    .buf_full_i (buf_full),
    .op_o       (op),
    .bank_o     (bank),
    .row_o      (row),
    .waddr_o    (waddr),
    .layer_o    (layer),
    .lane_en_o  (lane_en),
    .flag_clr_o (flag_clr),
    .win_bank_o (win_bank),
    .win_row_o  (win_row),
    .win_all_i  (win_all),
    .spike_i    (spike),
    .cls_clr_o  (cls_clr),
    .cls_inc_o  (cls_inc),
    .cls_spike_o(cls_spike)
  );

  spike_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(REC_W)) u_buf (
    .clk, .rst_n,
    .push_i (buf_push),
    .data_i (buf_wdata),
    .pop_i  (buf_pop),
    .data_o (buf_head),
    .empty_o(buf_empty),
    .full_o (buf_full),
    .count_o()
  );

  for (genvar m = 0; m < LANES; m++) begin : g_lane
    sub_block #(.ROWS(ROWS), .WDEPTH(WDEPTH), .ROW_W(ROW_W), .WA_W(WA_W)) u_sb (
      .clk, .rst_n,
      .op_i       (op),
      .bank_i     (bank),
      .row_i      (row),
      .waddr_i    (waddr),
      .layer_i    (layer),
      .lane_en_i  (lane_en[m]),
      .cfg_i      (cfg_i),
      .flag_clr_i (flag_clr),
      .win_bank_i (win_bank),
      .win_row_i  (win_row),
      .flag_win_o (win[m]),
      .spike_o    (spike[m]),
      .prune_o    (prune[m]),
      .ld_w_i     (ld_w_i && ld_lane_i == $clog2(LANES)'(m)),
      .ld_b_i     (ld_b_i && ld_lane_i == $clog2(LANES)'(m)),
      .ld_addr_i  (ld_addr_i),
      .ld_data_i  (ld_data_i)
    );
  end

  // a row can be skipped only if it is pruned in every lane that holds it
  always_comb begin
    win_all = '1;
    for (int m = 0; m < LANES; m++)
      if (lane_en[m]) win_all &= win[m];
  end

  class_argmax #(.NCLS(NCLS), .CNT_W(16)) u_cls (
    .clk, .rst_n,
    .clr_i   (cls_clr),
    .inc_i   (cls_inc),
    .spike_i (cls_spike),
    .count_o (cls_count_o),
    .class_o (class_o),
    .max_o   (cls_max)
  );

endmodule
