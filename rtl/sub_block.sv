// sub_block: one of the 48 processing lanes.
//
// A lane holds the neurons of the channels mapped to it (channel c lives in
// lane c mod LANES) and everything needed to update them: two membrane voltage
// banks (even and odd neurons), a bias memory, a weight memory, the pruned
// flag memory, one spike firing check (SFC) unit and one membrane voltage
// update (MVU) unit. All lanes receive the same command from the global
// controller each cycle and work in lock step.
//
// Pipeline (two stages):
//   issue cycle  : op_i/bank_i/row_i select a membrane row; the bank is read,
//                  and the bias (OP_SFC) or the weight at waddr_i (OP_MVU).
//                  OP_INIT instead writes zero to the row of both banks.
//   next cycle   : the SFC or MVU unit computes the new word, which is written
//                  back to the same bank; spike_o and the pruned flag update
//                  appear in this cycle.
// A bank is busy in both cycles, so the controller never issues to the bank
// that is being written back (the ping-pong use of the two banks).
// lane_en_i low makes the lane ignore the command (lanes beyond the number of
// output classes in the fully connected layer).
// The memory set and the two units follow the design description; the
// two-stage timing and the load port (ld_*) used to fill the weight and bias
// memories before a frame are this design's choice.
module sub_block
  import snn_pkg::*;
#(
  parameter int ROWS   = 321,    // rows per membrane bank
  parameter int WDEPTH = 8736,   // weights per lane
  parameter int ROW_W  = $clog2(ROWS + FLAG_BANKS),
  parameter int WA_W   = $clog2(WDEPTH),
  parameter int BA_W   = ROW_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  lane_op_e         op_i,
  input  logic             bank_i,
  input  logic [ROW_W-1:0] row_i,
  input  logic [WA_W-1:0]  waddr_i,
  input  logic [1:0]       layer_i,
  input  logic             lane_en_i,
  input  layer_cfg_t       cfg_i [NLAYERS],
  input  logic             flag_clr_i,
  // flag window for the flag count
  input  logic             win_bank_i,
  input  logic [ROW_W-1:0] win_row_i,
  output logic [FLAG_BANKS-1:0] flag_win_o,
  // results (second stage)
  output logic             spike_o,
  output logic             prune_o,
  // memory load port
  input  logic             ld_w_i,
  input  logic             ld_b_i,
  input  logic [WA_W-1:0]  ld_addr_i,
  input  logic [WGT_W-1:0] ld_data_i
);

  // ---------------- stage registers ----------------
  lane_op_e         s2_op_q;
  logic             s2_bank_q;
  logic [ROW_W-1:0] s2_row_q;
  logic [1:0]       s2_layer_q;
  logic             s2_en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_op_q    <= OP_NONE;
      s2_bank_q  <= 1'b0;
      s2_row_q   <= '0;
      s2_layer_q <= '0;
      s2_en_q    <= 1'b0;
    end else begin
      s2_op_q    <= (op_i == OP_INIT) ? OP_NONE : op_i;
      s2_bank_q  <= bank_i;
      s2_row_q   <= row_i;
      s2_layer_q <= layer_i;
      s2_en_q    <= lane_en_i;
    end
  end

  // ---------------- memories ----------------
  vmem_t             vm_rdata [2];
  vmem_t             vm_wdata [2];
  logic              vm_en [2], vm_we [2];
  logic [ROW_W-1:0]  vm_addr [2];
  logic [BIAS_W-1:0] bias_rdata;
  logic [WGT_W-1:0]  wgt_rdata;
  logic              pruned;

  // second-stage results
  vmem_t sfc_v, mvu_v;
  logic  sfc_we, mvu_we, sfc_spike, sfc_prune;
  logic  wb_en;
  vmem_t wb_data;

  layer_cfg_t cfg_s2;
  assign cfg_s2 = cfg_i[s2_layer_q];

  sfc_unit u_sfc (
    .valid_i  (s2_op_q == OP_SFC && s2_en_q),
    .pruned_i (pruned),
    .vmem_i   (vm_rdata[s2_bank_q]),
    .bias_i   (bias_t'(bias_rdata)),
    .cfg_i    (cfg_s2),
    .vmem_o   (sfc_v),
    .write_o  (sfc_we),
    .spike_o  (sfc_spike),
    .prune_o  (sfc_prune)
  );

  mvu_unit u_mvu (
    .valid_i  (s2_op_q == OP_MVU && s2_en_q),
    .pruned_i (pruned),
    .vmem_i   (vm_rdata[s2_bank_q]),
    .weight_i (wgt_t'(wgt_rdata)),
    .shift_i  (cfg_s2.shift),
    .vmem_o   (mvu_v),
    .write_o  (mvu_we)
  );

  assign wb_en   = sfc_we || mvu_we;
  assign wb_data = (s2_op_q == OP_SFC) ? sfc_v : mvu_v;
  assign spike_o = sfc_spike;
  assign prune_o = sfc_prune;

  // membrane bank port arbitration: write-back has the port in its cycle
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      vm_en[b]    = 1'b0;
      vm_we[b]    = 1'b0;
      vm_addr[b]  = row_i;
      vm_wdata[b] = '0;
      if (op_i == OP_INIT) begin
        vm_en[b] = 1'b1;
        vm_we[b] = 1'b1;
      end else if (wb_en && s2_bank_q == 1'(b)) begin
        vm_en[b]    = 1'b1;
        vm_we[b]    = 1'b1;
        vm_addr[b]  = s2_row_q;
        vm_wdata[b] = wb_data;
      end else if ((op_i == OP_SFC || op_i == OP_MVU) && bank_i == 1'(b) && lane_en_i) begin
        vm_en[b] = 1'b1;
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_vbank
    sp_ram #(.DEPTH(ROWS), .WIDTH(VMEM_W), .ADDR_W(ROW_W)) u_vmem (
      .clk   (clk),
      .en    (vm_en[b]),
      .we    (vm_we[b]),
      .addr  (vm_addr[b]),
      .wdata (vm_wdata[b]),
      .rdata (vm_rdata[b])
    );
  end

  // bias: one word per neuron, address {row, bank}
  sp_ram #(.DEPTH(2 * ROWS), .WIDTH(BIAS_W), .ADDR_W(BA_W)) u_bias (
    .clk   (clk),
    .en    (ld_b_i || (op_i == OP_SFC && lane_en_i)),
    .we    (ld_b_i),
    .addr  (ld_b_i ? BA_W'(ld_addr_i) : {row_i, bank_i}),
    .wdata (ld_data_i),
    .rdata (bias_rdata)
  );

  sp_ram #(.DEPTH(WDEPTH), .WIDTH(WGT_W), .ADDR_W(WA_W)) u_wgt (
    .clk   (clk),
    .en    (ld_w_i || (op_i == OP_MVU && lane_en_i)),
    .we    (ld_w_i),
    .addr  (ld_w_i ? ld_addr_i : waddr_i),
    .wdata (ld_data_i),
    .rdata (wgt_rdata)
  );

  pruned_flag_mem #(.ROWS(ROWS), .ROW_W(ROW_W)) u_flags (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr_i      (flag_clr_i),
    .set_i      (sfc_prune),
    .set_bank_i (s2_bank_q),
    .set_row_i  (s2_row_q),
    .rd_bank_i  (s2_bank_q),
    .rd_row_i   (s2_row_q),
    .rd_flag_o  (pruned),
    .win_bank_i (win_bank_i),
    .win_row_i  (win_row_i),
    .win_o      (flag_win_o)
  );

  // the controller must not read a bank while it is being written back
  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_en && (op_i == OP_SFC || op_i == OP_MVU) && lane_en_i) |-> (bank_i != s2_bank_q));

endmodule
