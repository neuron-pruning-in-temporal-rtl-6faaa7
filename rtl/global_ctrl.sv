// global_ctrl: the global controller of the NPTD SNN processor.
//
// It runs one frame of NUM_STEPS timesteps. Each timestep has three phases:
//   1. INPUT : spike records of the off-chip first convolution layer arrive on
//              the in_* port and go into the output spike buffer; the MVU
//              sequencer drains the buffer meanwhile.
//   2. SFC   : for each on-chip layer in turn (conv2, conv3, fc) the spike
//              firing check loops over its neurons. Two streams interleave,
//              one per membrane bank: the even stream issues on even cycles,
//              the odd stream on odd cycles, so each bank is read in one cycle
//              and written back in the next. Before issuing, a stream reads
//              the pruned flags of its next eight rows (AND over all lanes);
//              the leading-one count of that window (the flag count) says how
//              many rows are pruned in every lane and are jumped over at once.
//              Spikes found are pushed into the spike buffer as one record per
//              row (a lane mask), and the scan pauses until the MVU sequencer
//              has drained the buffer. Output-layer spikes go to the class
//              counters instead.
//   3. The layer's spikes are fully applied before the next layer is scanned.
// MVU sequencer: pops a record and, for every lane bit set in it (one source
// channel each), walks the fan-out of that source neuron: for a convolution
// target, the 2x2 average pool maps the source position to the pooled
// position, then all KS*KS kernel taps are visited for every group of LANES
// output channels (one cycle per tap, all lanes in parallel, taps that fall in
// the zero padding do nothing); for the fully connected target one cycle per
// source channel. A tap whose membrane bank is being written back in the same
// cycle waits one cycle (bank conflict stall).
// Neuron placement: channel c of a layer lives in lane c mod LANES, group
// g = c div LANES. Neuron (g, y, x) of an HxH layer has linear index
// i = (g*H + y)*H + x, lives in bank (x + y) mod 2 at row base + i div 2.
// The phases, the two interleaved streams with their flag counts and the
// stalling of the scan while the MVU array is busy follow the design
// description; the neuron placement, record layout, the way the pooling is
// folded into the address generation and the handshakes are this design's
// choices.
module global_ctrl
  import snn_pkg::*;
#(
  parameter int LANES     = 48,
  parameter int IMG       = 32,   // input image side
  parameter int C1        = 48,   // channels of the off-chip conv1
  parameter int C2        = 96,   // channels of conv2
  parameter int C3        = 96,   // channels of conv3
  parameter int NCLS      = 10,   // output classes
  parameter int KS        = 5,    // kernel side
  parameter int YW        = $clog2(IMG),
  parameter int GW        = 4,
  // derived geometry
  parameter int H0 = IMG / 2,  parameter int G0 = C2 / LANES,
  parameter int H1 = IMG / 4,  parameter int G1 = C3 / LANES,
  parameter int H2 = IMG / 8,
  parameter int N0 = H0 * H0 * G0 / 2,
  parameter int N1 = H1 * H1 * G1 / 2,
  parameter int MB0 = 0, parameter int MB1 = N0, parameter int MB2 = N0 + N1,
  parameter int ROWS = N0 + N1 + 1,
  parameter int KK = KS * KS,
  parameter int WB0 = 0,
  parameter int WB1 = G0 * C1 * KK,
  parameter int WB2 = WB1 + G1 * C2 * KK,
  parameter int WDEPTH = WB2 + C3 * H2 * H2,
  parameter int ROW_W = $clog2(ROWS + FLAG_BANKS),
  parameter int WA_W  = $clog2(WDEPTH),
  parameter int REC_W = 2 + GW + 2 * YW + LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  // frame control
  input  logic             start_i,
  input  logic [15:0]      num_steps_i,
  output logic             busy_o,
  output logic             done_o,
  output logic [15:0]      step_o,
  // input spikes of the off-chip layer
  input  logic             in_valid_i,
  output logic             in_ready_o,
  input  logic             in_last_i,
  input  logic [GW-1:0]    in_g_i,
  input  logic [YW-1:0]    in_y_i,
  input  logic [YW-1:0]    in_x_i,
  input  logic [LANES-1:0] in_mask_i,
  // spike buffer
  output logic             buf_push_o,
  output logic [REC_W-1:0] buf_data_o,
  output logic             buf_pop_o,
  input  logic [REC_W-1:0] buf_head_i,
  input  logic             buf_empty_i,
  input  logic             buf_full_i,
  // lane command
  output lane_op_e         op_o,
  output logic             bank_o,
  output logic [ROW_W-1:0] row_o,
  output logic [WA_W-1:0]  waddr_o,
  output logic [1:0]       layer_o,
  output logic [LANES-1:0] lane_en_o,
  output logic             flag_clr_o,
  output logic             win_bank_o,
  output logic [ROW_W-1:0] win_row_o,
  input  logic [FLAG_BANKS-1:0] win_all_i,  // AND of the lanes' flag windows
  input  logic [LANES-1:0] spike_i,         // second-stage spikes of the lanes
  // class counters
  output logic             cls_clr_o,
  output logic             cls_inc_o,
  output logic [NCLS-1:0]  cls_spike_o
);

  typedef struct packed {
    logic [1:0]       src;   // 0: conv1 (off-chip), 1: conv2, 2: conv3
    logic [GW-1:0]    g;
    logic [YW-1:0]    y;
    logic [YW-1:0]    x;
    logic [LANES-1:0] mask;
  } rec_t;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_INPUT, S_DRAIN, S_SFC} state_e;

  localparam int LW = $clog2(LANES + 1);
  localparam int KW = $clog2(KS);

  state_e           state_q;
  logic [15:0]      step_q, nsteps_q;
  logic [1:0]       layer_q;
  logic [ROW_W-1:0] init_row_q;
  logic             slot_q;
  logic [ROW_W-1:0] ptr_q [2];

  // second stage tracking
  logic             s2_valid_q, s2_sfc_q, s2_bank_q;
  logic [ROW_W-1:0] s2_row_q;
  logic [1:0]       s2_layer_q;

  // MVU sequencer
  logic             mv_busy_q;
  rec_t             rec_q;
  logic [LANES-1:0] rem_q;
  logic [LW-1:0]    j_q;
  logic [GW-1:0]    go_q;
  logic [KW-1:0]    ky_q, kx_q;

  // statistics, for observation
  logic [31:0] stat_skip_q, stat_stall_q, stat_rec_q, stat_sfc_q, stat_mvu_q, stat_pause_q;

  // ------------------------------------------------------------------
  // SFC stream: window and flag count
  // ------------------------------------------------------------------
  logic [ROW_W-1:0]      end_r [2];
  logic [FLAG_BANKS-1:0] win_m;
  logic [FCNT_W-1:0]     fcnt;
  logic                  stream_act, sfc_ok, sfc_issue, sfc_jump;
  logic                  scan_done;

  always_comb begin
    case (layer_q)
      2'd0:    begin end_r[0] = ROW_W'(MB0 + N0); end_r[1] = ROW_W'(MB0 + N0); end
      2'd1:    begin end_r[0] = ROW_W'(MB1 + N1); end_r[1] = ROW_W'(MB1 + N1); end
      default: begin end_r[0] = ROW_W'(MB2 + 1);  end_r[1] = ROW_W'(MB2);     end
    endcase
  end

  assign win_bank_o = slot_q;
  assign win_row_o  = ptr_q[slot_q];

  always_comb begin
    for (int i = 0; i < FLAG_BANKS; i++)
      win_m[i] = win_all_i[i] || (int'(ptr_q[slot_q]) + i >= int'(end_r[slot_q]));
  end

  lead_one_cnt #(.W(FLAG_BANKS), .CNT_W(FCNT_W)) u_fcnt (.bits_i(win_m), .count_o(fcnt));

  assign stream_act = ptr_q[slot_q] < end_r[slot_q];
  assign sfc_ok     = (state_q == S_SFC) && !mv_busy_q && buf_empty_i &&
                      !(s2_valid_q && s2_bank_q == slot_q);
  assign sfc_issue  = sfc_ok && stream_act && (int'(fcnt) < FLAG_BANKS);
  assign sfc_jump   = sfc_ok && stream_act && (int'(fcnt) == FLAG_BANKS);
  assign scan_done  = (ptr_q[0] >= end_r[0]) && (ptr_q[1] >= end_r[1]) &&
                      !s2_valid_q && !mv_busy_q && buf_empty_i;

  // ------------------------------------------------------------------
  // second stage of an SFC op: spike record from the row address
  // ------------------------------------------------------------------
  rec_t sfc_rec;

  always_comb begin
    int r, q, yy, xh;
    sfc_rec = '0;
    // row -> (group, y, x): q = g*H + y, and x = 2*(r mod H/2) + checkerboard bit
    if (s2_layer_q == 2'd0) begin
      r  = int'(s2_row_q) - MB0;
      q  = r / (H0 / 2);
      xh = r % (H0 / 2);
      yy = q % H0;
      sfc_rec.g = GW'(q / H0);
    end else begin
      r  = int'(s2_row_q) - MB1;
      q  = r / (H1 / 2);
      xh = r % (H1 / 2);
      yy = q % H1;
      sfc_rec.g = GW'(q / H1);
    end
    sfc_rec.src  = s2_layer_q + 2'd1;
    sfc_rec.y    = YW'(yy);
    sfc_rec.x    = YW'(2 * xh + (int'(s2_bank_q) ^ (yy % 2)));
    sfc_rec.mask = spike_i;
  end

  // ------------------------------------------------------------------
  // MVU tap generation
  // ------------------------------------------------------------------
  logic             tap_valid, tap_last, tap_bank, mvu_stall, mvu_issue;
  logic [ROW_W-1:0] tap_row;
  logic [WA_W-1:0]  tap_waddr;
  logic [1:0]       tap_layer;
  logic [LW-1:0]    first_j, next_j;
  rec_t             head;

  assign head = rec_t'(buf_head_i);

  lead_one_cnt #(.W(LANES), .CNT_W(LW)) u_first (.bits_i(~head.mask), .count_o(first_j));
  lead_one_cnt #(.W(LANES), .CNT_W(LW)) u_next  (.bits_i(~rem_q),     .count_o(next_j));

  always_comb begin
    int py, px, ty, tx, ht, cin, cin_ch, gout, idx, mb, wb;
    ht = H0; cin_ch = C1; gout = G0; mb = MB0; wb = WB0; ty = 0; tx = 0; idx = 0;
    py  = int'(rec_q.y) / 2;
    px  = int'(rec_q.x) / 2;
    cin = int'(rec_q.g) * LANES + int'(j_q);
    tap_layer = rec_q.src;
    tap_valid = 1'b0;
    tap_last  = 1'b1;
    tap_bank  = 1'b0;
    tap_row   = ROW_W'(MB2);
    tap_waddr = WA_W'(WB2 + cin * H2 * H2 + py * H2 + px);
    if (rec_q.src != 2'd2) begin
      if (rec_q.src == 2'd0) begin
        ht = H0; cin_ch = C1; gout = G0; mb = MB0; wb = WB0;
      end else begin
        ht = H1; cin_ch = C2; gout = G1; mb = MB1; wb = WB1;
      end
      ty  = py - int'(ky_q) + KS / 2;
      tx  = px - int'(kx_q) + KS / 2;
      idx = (int'(go_q) * ht + ty) * ht + tx;
      tap_valid = (ty >= 0) && (ty < ht) && (tx >= 0) && (tx < ht);
      tap_bank  = 1'((tx + ty) % 2);
      tap_row   = ROW_W'(mb + idx / 2);
      tap_waddr = WA_W'(wb + (int'(go_q) * cin_ch + cin) * KK + int'(ky_q) * KS + int'(kx_q));
      tap_last  = (int'(kx_q) == KS - 1) && (int'(ky_q) == KS - 1) && (int'(go_q) == gout - 1);
    end else begin
      tap_valid = 1'b1;
    end
  end

  assign mvu_stall = mv_busy_q && tap_valid && s2_valid_q && (s2_bank_q == tap_bank);
  assign mvu_issue = mv_busy_q && tap_valid && !mvu_stall;

  logic mv_load;
  assign mv_load   = !mv_busy_q && !buf_empty_i && (state_q != S_IDLE) && (state_q != S_INIT);
  assign buf_pop_o = mv_load;

  // ------------------------------------------------------------------
  // lane command
  // ------------------------------------------------------------------
  always_comb begin
    op_o    = OP_NONE;
    bank_o  = 1'b0;
    row_o   = '0;
    waddr_o = tap_waddr;
    layer_o = layer_q;
    if (state_q == S_INIT) begin
      op_o  = OP_INIT;
      row_o = init_row_q;
    end else if (mvu_issue) begin
      op_o    = OP_MVU;
      bank_o  = tap_bank;
      row_o   = tap_row;
      layer_o = tap_layer;
    end else if (sfc_issue) begin
      op_o   = OP_SFC;
      bank_o = slot_q;
      row_o  = ptr_q[slot_q] + ROW_W'(fcnt);
    end
    for (int m = 0; m < LANES; m++)
      lane_en_o[m] = (layer_o != 2'd2) || (m < NCLS);
  end

  // ------------------------------------------------------------------
  // buffer pushes and class counting
  // ------------------------------------------------------------------
  logic in_acc;
  assign in_ready_o = (state_q == S_INPUT) && !buf_full_i;
  assign in_acc     = in_valid_i && in_ready_o;

  always_comb begin
    rec_t r;
    r      = '0;
    r.src  = 2'd0;
    r.g    = in_g_i;
    r.y    = in_y_i;
    r.x    = in_x_i;
    r.mask = in_mask_i;
    buf_push_o = 1'b0;
    buf_data_o = r;
    if (in_acc) begin
      buf_push_o = 1'b1;
    end else if (s2_sfc_q && s2_layer_q != 2'd2 && |spike_i) begin
      buf_push_o = 1'b1;
      buf_data_o = sfc_rec;
    end
  end

  assign cls_inc_o   = s2_sfc_q && (s2_layer_q == 2'd2);
  assign cls_spike_o = spike_i[NCLS-1:0];
  assign cls_clr_o   = (state_q == S_IDLE) && start_i;
  assign flag_clr_o  = (state_q == S_IDLE) && start_i;
  assign busy_o      = (state_q != S_IDLE);
  assign step_o      = step_q;

  // ------------------------------------------------------------------
  // state
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      step_q     <= '0;
      nsteps_q   <= '0;
      layer_q    <= '0;
      init_row_q <= '0;
      slot_q     <= 1'b0;
      ptr_q[0]   <= '0;
      ptr_q[1]   <= '0;
      s2_valid_q <= 1'b0;
      s2_sfc_q   <= 1'b0;
      s2_bank_q  <= 1'b0;
      s2_row_q   <= '0;
      s2_layer_q <= '0;
      mv_busy_q  <= 1'b0;
      rec_q      <= '0;
      rem_q      <= '0;
      j_q        <= '0;
      go_q       <= '0;
      ky_q       <= '0;
      kx_q       <= '0;
      done_o     <= 1'b0;
      stat_skip_q  <= '0;
      stat_stall_q <= '0;
      stat_rec_q   <= '0;
      stat_sfc_q   <= '0;
      stat_mvu_q   <= '0;
      stat_pause_q <= '0;
    end else begin
      done_o     <= 1'b0;
      slot_q     <= !slot_q;
      s2_valid_q <= (op_o == OP_SFC) || (op_o == OP_MVU);
      s2_sfc_q   <= (op_o == OP_SFC);
      s2_bank_q  <= bank_o;
      s2_row_q   <= row_o;
      s2_layer_q <= layer_o;

      // ---- frame / phase sequencing ----
      case (state_q)
        S_IDLE: if (start_i) begin
          state_q    <= S_INIT;
          init_row_q <= '0;
          step_q     <= '0;
          nsteps_q   <= num_steps_i;
          stat_skip_q  <= '0;
          stat_stall_q <= '0;
          stat_rec_q   <= '0;
          stat_sfc_q   <= '0;
          stat_mvu_q   <= '0;
          stat_pause_q <= '0;
        end
        S_INIT: begin
          init_row_q <= init_row_q + 1'b1;
          if (int'(init_row_q) == ROWS - 1) state_q <= S_INPUT;
        end
        S_INPUT: if (in_acc && in_last_i) state_q <= S_DRAIN;
        S_DRAIN: if (!mv_busy_q && buf_empty_i && !s2_valid_q) begin
          state_q  <= S_SFC;
          layer_q  <= 2'd0;
          ptr_q[0] <= ROW_W'(MB0);
          ptr_q[1] <= ROW_W'(MB0);
        end
        S_SFC: begin
          if (sfc_issue) begin
            ptr_q[slot_q] <= ptr_q[slot_q] + ROW_W'(fcnt) + 1'b1;
            stat_skip_q   <= stat_skip_q + 32'(fcnt);
            stat_sfc_q    <= stat_sfc_q + 1;
          end else if (sfc_jump) begin
            ptr_q[slot_q] <= ptr_q[slot_q] + ROW_W'(FLAG_BANKS);
            stat_skip_q   <= stat_skip_q + FLAG_BANKS;
          end else if (stream_act && !sfc_ok) begin
            stat_pause_q  <= stat_pause_q + 1;
          end
          if (scan_done) begin
            if (layer_q == 2'd2) begin
              if (step_q + 1'b1 == nsteps_q) begin
                state_q <= S_IDLE;
                done_o  <= 1'b1;
              end else begin
                state_q <= S_INPUT;
              end
              step_q  <= step_q + 1'b1;
              layer_q <= 2'd0;
            end else begin
              layer_q  <= layer_q + 2'd1;
              ptr_q[0] <= (layer_q == 2'd0) ? ROW_W'(MB1) : ROW_W'(MB2);
              ptr_q[1] <= (layer_q == 2'd0) ? ROW_W'(MB1) : ROW_W'(MB2);
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase

      if (buf_push_o && !in_acc) stat_rec_q <= stat_rec_q + 1;

      // ---- MVU sequencer ----
      if (mv_load) begin
        rec_q <= head;
        j_q   <= first_j;
        rem_q <= head.mask & ~(LANES'(1) << first_j);
        go_q  <= '0;
        ky_q  <= '0;
        kx_q  <= '0;
        mv_busy_q <= |head.mask;
      end else if (mv_busy_q) begin
        if (mvu_stall) begin
          stat_stall_q <= stat_stall_q + 1;
        end else begin
          if (mvu_issue) stat_mvu_q <= stat_mvu_q + 1;
          if (tap_last) begin
            go_q <= '0;
            ky_q <= '0;
            kx_q <= '0;
            if (rem_q == '0) begin
              mv_busy_q <= 1'b0;
            end else begin
              j_q   <= next_j;
              rem_q <= rem_q & ~(LANES'(1) << next_j);
            end
          end else if (int'(kx_q) != KS - 1) begin
            kx_q <= kx_q + 1'b1;
          end else begin
            kx_q <= '0;
            if (int'(ky_q) != KS - 1) begin
              ky_q <= ky_q + 1'b1;
            end else begin
              ky_q <= '0;
              go_q <= go_q + 1'b1;
            end
          end
        end
      end
    end
  end

  // SFC and MVU never drive the lanes in the same cycle
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(sfc_issue && mv_busy_q));
  // no issue to a bank that is being written back
  a_bank: assert property (@(posedge clk) disable iff (!rst_n)
    ((op_o == OP_SFC || op_o == OP_MVU) && s2_valid_q) |-> (bank_o != s2_bank_q));

endmodule
