// tb_global_ctrl: the global controller with the spike buffer, and the lanes
// replaced by a testbench model.
//
// The model lanes fire according to a hash of (timestep, layer, bank, row,
// lane) and report a fixed table of rows that are pruned in every lane. The
// testbench works out independently:
//  - which rows the spike firing check must visit in every layer and
//    timestep (every row not pruned, each once, in increasing order per bank);
//  - the source neuron of every spike record, from its own search over the
//    neuron placement;
//  - the exact sequence of membrane updates (bank, row, weight address, layer)
//    that the fan-out of every record must produce, in record order;
//  - the number of output-layer spikes per class.
// It also checks the rates: one SFC neuron per cycle when nothing is pruned or
// fires, and one fan-out tap per cycle in the MVU sequencer apart from bank
// conflict stalls.
module tb_global_ctrl;
  import snn_pkg::*;

  localparam int LANES = 4, IMG = 16, C1 = 4, C2 = 8, C3 = 8, NCLS = 3, KS = 5, KK = 25;
  localparam int H0 = IMG / 2, H1 = IMG / 4, H2 = IMG / 8;
  localparam int G0 = C2 / LANES, G1 = C3 / LANES, GI0 = C1 / LANES;
  localparam int N0 = H0 * H0 * G0 / 2, N1 = H1 * H1 * G1 / 2;
  localparam int MB0 = 0, MB1 = N0, MB2 = N0 + N1, ROWS = N0 + N1 + 1;
  localparam int WB0 = 0, WB1 = G0 * C1 * KK, WB2 = WB1 + G1 * C2 * KK;
  localparam int WDEPTH = WB2 + C3 * H2 * H2;
  localparam int YW = $clog2(IMG), GW = 4;
  localparam int ROW_W = $clog2(ROWS + 8), WA_W = $clog2(WDEPTH);
  localparam int REC_W = 2 + GW + 2 * YW + LANES;
  localparam int STEPS = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, in_valid = 0, in_ready, in_last = 0;
  logic [15:0] nsteps = 0, step;
  logic [GW-1:0] in_g = 0;
  logic [YW-1:0] in_y = 0, in_x = 0;
  logic [LANES-1:0] in_mask = 0;
  logic buf_push, buf_pop, buf_empty, buf_full;
  logic [REC_W-1:0] buf_wdata, buf_head;
  lane_op_e op;
  logic bank, flag_clr, win_bank, cls_clr, cls_inc;
  logic [ROW_W-1:0] row, win_row;
  logic [WA_W-1:0] waddr;
  logic [1:0] layer;
  logic [LANES-1:0] lane_en, spike;
  logic [7:0] win_all;
  logic [NCLS-1:0] cls_spike;

  global_ctrl #(.LANES(LANES), .IMG(IMG), .C1(C1), .C2(C2), .C3(C3), .NCLS(NCLS)) dut (
    .clk, .rst_n, .start_i(start), .num_steps_i(nsteps), .busy_o(busy), .done_o(done), .step_o(step),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_last_i(in_last), .in_g_i(in_g),
    .in_y_i(in_y), .in_x_i(in_x), .in_mask_i(in_mask),
    .buf_push_o(buf_push), .buf_data_o(buf_wdata), .buf_pop_o(buf_pop), .buf_head_i(buf_head),
    .buf_empty_i(buf_empty), .buf_full_i(buf_full),
    .op_o(op), .bank_o(bank), .row_o(row), .waddr_o(waddr), .layer_o(layer), .lane_en_o(lane_en),
    .flag_clr_o(flag_clr), .win_bank_o(win_bank), .win_row_o(win_row), .win_all_i(win_all),
    .spike_i(spike), .cls_clr_o(cls_clr), .cls_inc_o(cls_inc), .cls_spike_o(cls_spike));

  spike_buffer #(.DEPTH(8), .WIDTH(REC_W)) u_buf (
    .clk, .rst_n, .push_i(buf_push), .data_i(buf_wdata), .pop_i(buf_pop), .data_o(buf_head),
    .empty_o(buf_empty), .full_o(buf_full), .count_o());

  always #5 clk = ~clk;

  // ---------------- lane model ----------------
  bit allp [2][ROWS + 8];   // rows pruned in every lane
  int rate = 0;             // firing probability in percent
  lane_op_e s2_op;
  logic s2_bank;
  logic [ROW_W-1:0] s2_row;
  logic [1:0] s2_layer;
  logic [LANES-1:0] s2_en;

  function automatic bit fires(int t, int l, int b, int r, int m, int pct);
    int unsigned h;
    h = 32'(t * 7919 + l * 104729 + b * 1299709 + r * 15485863 + m * 32452843);
    h = h ^ (h >> 13); h = h * 32'd2654435761; h = h ^ (h >> 16);
    return int'(h % 100) < pct;
  endfunction

  always_ff @(posedge clk) begin
    s2_op <= op; s2_bank <= bank; s2_row <= row; s2_layer <= layer; s2_en <= lane_en;
  end

  always_comb begin
    for (int m = 0; m < LANES; m++)
      spike[m] = (s2_op == OP_SFC) && s2_en[m] &&
                 fires(int'(step), int'(s2_layer), int'(s2_bank), int'(s2_row), m, rate);
    for (int i = 0; i < 8; i++) win_all[i] = allp[win_bank][int'(win_row) + i];
  end

  // ---------------- expectations ----------------
  typedef struct { int bank; int row; int waddr; int layer; } tap_t;
  tap_t exp_taps [$];
  int sfc_rows [2][$];        // rows visited per bank in the current layer scan
  int cls_model [NCLS];
  int dut_cls [NCLS];
  int n_mvu = 0, n_taps = 0, n_sfc = 0, n_busy = 0, n_stall = 0, n_rec = 0, n_fc = 0;

  function automatic int lbase(int l);
    return (l == 0) ? MB0 : ((l == 1) ? MB1 : MB2);
  endfunction

  // fan-out of one record, appended to the expected tap list
  task automatic expand(int src, int g, int y, int x, logic [LANES-1:0] mask);
    int py = y / 2, px = x / 2;
    for (int j = 0; j < LANES; j++) if (mask[j]) begin
      int cin = g * LANES + j;
      if (src == 2) begin
        exp_taps.push_back('{0, MB2, WB2 + cin * H2 * H2 + py * H2 + px, 2});
        n_taps++;
      end else begin
        int ht = (src == 0) ? H0 : H1, gout = (src == 0) ? G0 : G1, cch = (src == 0) ? C1 : C2;
        int mb = (src == 0) ? MB0 : MB1, wb = (src == 0) ? WB0 : WB1;
        for (int go = 0; go < gout; go++) for (int ky = 0; ky < KS; ky++) for (int kx = 0; kx < KS; kx++) begin
          int ty = py - ky + 2, tx = px - kx + 2;
          n_taps++;
          if (ty >= 0 && ty < ht && tx >= 0 && tx < ht)
            exp_taps.push_back('{(tx + ty) % 2, mb + ((go * ht + ty) * ht + tx) / 2,
                                 wb + (go * cch + cin) * KK + ky * KS + kx, src});
        end
      end
    end
  endtask

  // observe the controller
  always @(posedge clk) if (rst_n) begin
    if (dut.mv_busy_q) n_busy++;
    if (cls_inc) for (int m = 0; m < NCLS; m++) dut_cls[m] += cls_spike[m];
    if (dut.mvu_stall) n_stall++;
    if (op == OP_MVU) begin
      tap_t e;
      n_mvu++;
      checks++;
      if (exp_taps.size() == 0) begin
        failures++; $display("FAIL unexpected MVU op row %0d", row);
      end else begin
        e = exp_taps.pop_front();
        if (e.bank != int'(bank) || e.row != int'(row) || e.waddr != int'(waddr) || e.layer != int'(layer)) begin
          failures++;
          if (failures < 10) $display("FAIL MVU op b%0d r%0d w%0d l%0d exp b%0d r%0d w%0d l%0d",
                                      bank, row, waddr, layer, e.bank, e.row, e.waddr, e.layer);
        end
      end
    end
    if (op == OP_SFC) begin
      n_sfc++;
      sfc_rows[bank].push_back(int'(row));
      checks++;
      if (allp[bank][row]) begin failures++; $display("FAIL SFC visited pruned row %0d", row); end
    end
    // records from the SFC: work out the source neuron independently
    if (s2_op == OP_SFC && |spike) begin
      if (s2_layer == 2) begin
        for (int m = 0; m < NCLS; m++) cls_model[m] += spike[m];
        n_fc++;
      end else begin
        automatic int h = (s2_layer == 0) ? H0 : H1, gn = (s2_layer == 0) ? G0 : G1;
        automatic bit found = 0;
        for (int g = 0; g < gn; g++) for (int y = 0; y < h; y++) for (int x = 0; x < h; x++)
          if ((x + y) % 2 == int'(s2_bank) &&
              lbase(s2_layer) + ((g * h + y) * h + x) / 2 == int'(s2_row)) begin
            expand(int'(s2_layer) + 1, g, y, x, spike);
            found = 1;
          end
        n_rec++;
        checks++;
        if (!found) begin failures++; $display("FAIL no neuron at row %0d", s2_row); end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check the rows visited by a finished layer scan
  task automatic check_scan(int l);
    for (int b = 0; b < 2; b++) begin
      int lo = lbase(l);
      int hi = (l == 0) ? MB0 + N0 : ((l == 1) ? MB1 + N1 : MB2 + 1 - b);
      int k = 0;
      bit ok = 1;
      for (int r = lo; r < hi; r++) if (!allp[b][r]) begin
        if (k >= sfc_rows[b].size() || sfc_rows[b][k] != r) ok = 0;
        k++;
      end
      if (k != sfc_rows[b].size()) ok = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL scan layer %0d bank %0d visited %p", l, b, sfc_rows[b]); end
      sfc_rows[b].delete();
    end
  endtask

  initial begin
    int cyc0;
    foreach (allp[b, r]) allp[b][r] = (r >= ROWS);
    foreach (cls_model[i]) begin cls_model[i] = 0; dut_cls[i] = 0; end
    #22 rst_n = 1;

    // ---- rate check: nothing pruned, nothing fires ----
    rate = 0;
    @(negedge clk); nsteps = 1; start = 1; @(negedge clk); start = 0;
    while (dut.state_q != 3'd2) @(negedge clk);
    @(negedge clk); in_valid = 1; in_last = 1; in_mask = 0;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0; in_last = 0;
    while (dut.state_q != 3'd4) @(negedge clk);
    cyc0 = 0;
    while (dut.layer_q == 0 && busy) begin cyc0++; @(negedge clk); end
    checks++;
    if (cyc0 < 2 * N0 || cyc0 > 2 * N0 + 3) begin failures++; $display("FAIL conv2 scan took %0d cycles for %0d neurons", cyc0, 2 * N0); end
    $display("scan of %0d rows took %0d cycles", 2 * N0, cyc0);
    while (busy) @(negedge clk);
    for (int b = 0; b < 2; b++) sfc_rows[b].delete();

    // ---- pruned rows: runs of every length, and firing ----
    foreach (allp[b, r]) if (r < ROWS) allp[b][r] = 0;
    for (int r = 3; r < 15; r++) allp[0][r] = 1;      // a run of 12 in bank 0
    for (int r = 20; r < 23; r++) allp[1][r] = 1;     // a run of 3 in bank 1
    allp[1][5] = 1; allp[0][40] = 1; allp[1][41] = 1;
    for (int r = MB1; r < MB1 + 9; r++) allp[1][r] = 1;
    rate = 30;
    @(negedge clk); nsteps = 16'(STEPS); start = 1; @(negedge clk); start = 0;
    for (int t = 0; t < STEPS; t++) begin
      while (dut.state_q != 3'd2) @(negedge clk);
      // input records
      for (int i = 0; i < 6; i++) begin
        logic [LANES-1:0] m;
        int g, y, x;
        m = LANES'($urandom_range((1 << LANES) - 1)); g = $urandom_range(GI0 - 1);
        y = $urandom_range(IMG - 1); x = $urandom_range(IMG - 1);
        if (i == 0) begin y = 0; x = IMG - 1; end
        @(negedge clk); in_valid = 1; in_g = GW'(g); in_y = YW'(y); in_x = YW'(x); in_mask = m; in_last = (i == 5);
        expand(0, g, y, x, m);
        @(posedge clk); while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0; in_last = 0;
      for (int l = 0; l < 3; l++) begin
        while (dut.state_q != 3'd4 || int'(dut.layer_q) != l) @(negedge clk);
        while (busy && dut.state_q == 3'd4 && int'(dut.layer_q) == l) @(negedge clk);
        check_scan(l);
      end
    end
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (exp_taps.size() != 0) begin failures++; $display("FAIL %0d expected MVU ops missing", exp_taps.size()); end
    for (int m = 0; m < NCLS; m++) begin
      checks++;
      if (dut_cls[m] != cls_model[m]) begin failures++; $display("FAIL class %0d spikes %0d exp %0d", m, dut_cls[m], cls_model[m]); end
    end
    // one tap per cycle apart from stalls
    checks++;
    if (n_busy != n_taps + n_stall) begin failures++; $display("FAIL MVU busy %0d cycles for %0d taps and %0d stalls", n_busy, n_taps, n_stall); end
    checks++;
    if (n_rec == 0 || n_fc == 0 || n_stall == 0 || dut.stat_skip_q == 0) begin
      failures++; $display("FAIL coverage rec=%0d fc=%0d stall=%0d skip=%0d", n_rec, n_fc, n_stall, dut.stat_skip_q);
    end
    $display("records=%0d fc=%0d mvu=%0d taps=%0d stalls=%0d skip=%0d sfc=%0d", n_rec, n_fc, n_mvu, n_taps, n_stall, dut.stat_skip_q, n_sfc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
