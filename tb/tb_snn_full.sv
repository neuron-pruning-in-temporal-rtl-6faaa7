// tb_snn_full: one complete frame (128 timesteps) on the processor at its
// full size (48 lanes, 32x32 input, 48/96/96 channels, 10 classes), compared
// with the reference model. Otherwise the same bench as tb_snn_top, with a
// sparser stimulus (about 1% input spike density, zero-mean convolution
// weights) so that the 128 timesteps finish in a few million cycles. It reports
// how often the flag-count skip, the eight-row jump and the bank stall occurred.
//
// The testbench generates random weights, biases and first-layer spike trains,
// loads them through the load port, runs frames and compares the result with a
// reference model of the network written here from the algorithm (integrate,
// fire with reset to zero, prune below the pruning threshold, skip pruned
// neurons), not from the RTL. Compared per frame: the number of spikes and of
// prunings of every layer, and the spike count of every class.
// Shift 0 is used so that the result does not depend on the order of the
// membrane updates.
module tb_snn_full;
  import snn_pkg::*;

  localparam int LANES = 48, IMG = 32, C1 = 48, C2 = 96, C3 = 96, NCLS = 10;
  localparam int STEPS = 128;
  localparam int MAXCYC = 20000000;

  localparam int KS = 5, KK = 25;
  localparam int H0 = IMG / 2, H1 = IMG / 4, H2 = IMG / 8;
  localparam int G0 = C2 / LANES, G1 = C3 / LANES, GI0 = C1 / LANES;
  localparam int N0 = H0 * H0 * G0 / 2, N1 = H1 * H1 * G1 / 2;
  localparam int MB0 = 0, MB1 = N0, MB2 = N0 + N1;
  localparam int WB0 = 0, WB1 = G0 * C1 * KK, WB2 = WB1 + G1 * C2 * KK;
  localparam int YW = $clog2(IMG);
  localparam int WDEPTH = WB2 + C3 * H2 * H2;
  localparam int WA_W = $clog2(WDEPTH);

  int checks = 0, failures = 0;
  // loop bounds held in variables so that the reference loops stay loops
  int rC1, rC2, rC3, rKS, rH0, rH1, rH2, rNCLS, rLANES, rIMG, rGI0;
  initial begin
    rC1 = C1; rC2 = C2; rC3 = C3; rKS = KS; rH0 = H0; rH1 = H1; rH2 = H2;
    rNCLS = NCLS; rLANES = LANES; rIMG = IMG; rGI0 = GI0;
  end

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [15:0] nsteps, step;
  layer_cfg_t cfg [NLAYERS];
  logic in_valid = 0, in_ready, in_last = 0;
  logic [3:0] in_g = 0;
  logic [YW-1:0] in_y = 0, in_x = 0;
  logic [LANES-1:0] in_mask = 0;
  logic ld_w = 0, ld_b = 0;
  logic [$clog2(LANES)-1:0] ld_lane = 0;
  logic [WA_W-1:0] ld_addr = 0;
  logic [7:0] ld_data = 0;
  logic [$clog2(NCLS)-1:0] cls;
  logic [NCLS-1:0][15:0] cls_cnt;

  snn_top dut (
    .clk, .rst_n, .start_i(start), .num_steps_i(nsteps), .cfg_i(cfg), .busy_o(busy),
    .done_o(done), .step_o(step), .in_valid_i(in_valid), .in_ready_o(in_ready),
    .in_last_i(in_last), .in_g_i(in_g), .in_y_i(in_y), .in_x_i(in_x), .in_mask_i(in_mask),
    .ld_w_i(ld_w), .ld_b_i(ld_b), .ld_lane_i(ld_lane), .ld_addr_i(ld_addr), .ld_data_i(ld_data),
    .class_o(cls), .cls_count_o(cls_cnt));

  always #5 clk = ~clk;

  // ---------------- network parameters (reference copies) ----------------
  int w0 [C2][C1][KS][KS];
  int w1 [C3][C2][KS][KS];
  int wf [NCLS][C3][H2][H2];
  int b0 [C2][H0][H0];
  int b1 [C3][H1][H1];
  int bf [NCLS];
  // reference state
  int v0 [C2][H0][H0];  bit p0 [C2][H0][H0];
  int v1 [C3][H1][H1];  bit p1 [C3][H1][H1];
  int vf [NCLS];        bit pf [NCLS];
  bit s0 [C2][H0][H0];
  bit s1 [C3][H1][H1];
  int ref_cls [NCLS];
  int ref_spk [3], ref_prn [3], dut_spk [3], dut_prn [3];
  bit sat_seen;

  // ---------------- mechanism counters ----------------
  int n_jump = 0, n_bp = 0, n_neg_shift = 0, n_cyc = 0;

  function automatic int clampv(int v);
    return (v > 1023) ? 1023 : ((v < -1024) ? -1024 : v);
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // placement: row and bank of a neuron of an HxH layer
  function automatic int prow(int mb, int h, int c, int y, int x);
    return mb + (((c / LANES) * h + y) * h + x) / 2;
  endfunction
  function automatic int pbank(int y, int x);
    return (x + y) % 2;
  endfunction

  task automatic load(bit is_w, int lane, int addr, int data);
    @(negedge clk);
    ld_w = is_w; ld_b = !is_w; ld_lane = $clog2(LANES)'(lane);
    ld_addr = WA_W'(addr); ld_data = 8'(data);
    @(negedge clk);
    ld_w = 0; ld_b = 0;
  endtask

  task automatic gen_and_load();
    for (int co = 0; co < rC2; co++) for (int ci = 0; ci < rC1; ci++)
      for (int ky = 0; ky < rKS; ky++) for (int kx = 0; kx < rKS; kx++) begin
        w0[co][ci][ky][kx] = rnd(-3, 3);
        load(1, co % LANES, WB0 + ((co / LANES) * C1 + ci) * KK + ky * KS + kx, w0[co][ci][ky][kx]);
      end
    for (int co = 0; co < rC3; co++) for (int ci = 0; ci < rC2; ci++)
      for (int ky = 0; ky < rKS; ky++) for (int kx = 0; kx < rKS; kx++) begin
        w1[co][ci][ky][kx] = rnd(-3, 3);
        load(1, co % LANES, WB1 + ((co / LANES) * C2 + ci) * KK + ky * KS + kx, w1[co][ci][ky][kx]);
      end
    for (int o = 0; o < rNCLS; o++) for (int ci = 0; ci < rC3; ci++)
      for (int py = 0; py < rH2; py++) for (int px = 0; px < rH2; px++) begin
        wf[o][ci][py][px] = rnd(-4, 5);
        load(1, o, WB2 + ci * H2 * H2 + py * H2 + px, wf[o][ci][py][px]);
      end
    // biases: the whole first channel group of conv2 is strongly negative so
    // that long runs of rows are pruned in every lane; elsewhere a mix
    for (int c = 0; c < rC2; c++) for (int y = 0; y < rH0; y++) for (int x = 0; x < rH0; x++) begin
      b0[c][y][x] = (c < LANES) ? rnd(-60, -45) : (((x + y) % 3 == 0) ? rnd(-60, -30) : rnd(-2, 3));
      load(0, c % LANES, 2 * prow(MB0, H0, c, y, x) + pbank(y, x), b0[c][y][x]);
    end
    for (int c = 0; c < rC3; c++) for (int y = 0; y < rH1; y++) for (int x = 0; x < rH1; x++) begin
      b1[c][y][x] = (y == 0) ? rnd(-60, -40) : rnd(-4, 10);
      load(0, c % LANES, 2 * prow(MB1, H1, c, y, x) + pbank(y, x), b1[c][y][x]);
    end
    for (int o = 0; o < rNCLS; o++) begin
      bf[o] = rnd(-2, 6);
      load(0, o, 2 * MB2, bf[o]);
    end
  endtask

  // ---------------- reference model ----------------
  task automatic ref_reset();
    for (int c = 0; c < rC2; c++) for (int y = 0; y < rH0; y++) for (int x = 0; x < rH0; x++) begin v0[c][y][x] = 0; p0[c][y][x] = 0; end
    for (int c = 0; c < rC3; c++) for (int y = 0; y < rH1; y++) for (int x = 0; x < rH1; x++) begin v1[c][y][x] = 0; p1[c][y][x] = 0; end
    for (int o = 0; o < rNCLS; o++) begin vf[o] = 0; pf[o] = 0; ref_cls[o] = 0; end
    for (int l = 0; l < 3; l++) begin ref_spk[l] = 0; ref_prn[l] = 0; dut_spk[l] = 0; dut_prn[l] = 0; end
    sat_seen = 0;
  endtask

  function automatic int addv(int v, int d);
    int r = v + d;
    if (r != clampv(r)) sat_seen = 1;
    return clampv(r);
  endfunction

  // spike of a conv1 neuron (ci at y,x of the IMG grid) into conv2
  task automatic ref_in_spike(int ci, int y, int x);
    int py = y / 2, px = x / 2;
    for (int co = 0; co < rC2; co++) for (int ky = 0; ky < rKS; ky++) for (int kx = 0; kx < rKS; kx++) begin
      int ty = py - ky + 2, tx = px - kx + 2;
      if (ty >= 0 && ty < H0 && tx >= 0 && tx < H0 && !p0[co][ty][tx])
        v0[co][ty][tx] = addv(v0[co][ty][tx], w0[co][ci][ky][kx]);
    end
  endtask

  task automatic ref_layers();
    int vth0 = cfg[0].vth, vth1 = cfg[1].vth, vthf = cfg[2].vth;
    int pth0 = cfg[0].pth, pth1 = cfg[1].pth, pthf = cfg[2].pth;
    // conv2 check
    for (int c = 0; c < rC2; c++) for (int y = 0; y < rH0; y++) for (int x = 0; x < rH0; x++) begin
      s0[c][y][x] = 0;
      if (!p0[c][y][x]) begin
        int v = v0[c][y][x] + b0[c][y][x];
        if (v >= vth0) begin s0[c][y][x] = 1; v = 0; ref_spk[0]++; end
        else if (v < pth0) begin p0[c][y][x] = 1; ref_prn[0]++; end
        v0[c][y][x] = clampv(v);
      end
    end
    for (int c = 0; c < rC2; c++) for (int y = 0; y < rH0; y++) for (int x = 0; x < rH0; x++) if (s0[c][y][x]) begin
      int py = y / 2, px = x / 2;
      for (int co = 0; co < rC3; co++) for (int ky = 0; ky < rKS; ky++) for (int kx = 0; kx < rKS; kx++) begin
        int ty = py - ky + 2, tx = px - kx + 2;
        if (ty >= 0 && ty < H1 && tx >= 0 && tx < H1 && !p1[co][ty][tx])
          v1[co][ty][tx] = addv(v1[co][ty][tx], w1[co][c][ky][kx]);
      end
    end
    // conv3 check
    for (int c = 0; c < rC3; c++) for (int y = 0; y < rH1; y++) for (int x = 0; x < rH1; x++) begin
      s1[c][y][x] = 0;
      if (!p1[c][y][x]) begin
        int v = v1[c][y][x] + b1[c][y][x];
        if (v >= vth1) begin s1[c][y][x] = 1; v = 0; ref_spk[1]++; end
        else if (v < pth1) begin p1[c][y][x] = 1; ref_prn[1]++; end
        v1[c][y][x] = clampv(v);
      end
    end
    for (int c = 0; c < rC3; c++) for (int y = 0; y < rH1; y++) for (int x = 0; x < rH1; x++) if (s1[c][y][x])
      for (int o = 0; o < rNCLS; o++)
        if (!pf[o]) vf[o] = addv(vf[o], wf[o][c][y / 2][x / 2]);
    // output layer
    for (int o = 0; o < rNCLS; o++) if (!pf[o]) begin
      int v = vf[o] + bf[o];
      if (v >= vthf) begin ref_cls[o]++; v = 0; ref_spk[2]++; end
      else if (v < pthf) begin pf[o] = 1; ref_prn[2]++; end
      vf[o] = clampv(v);
    end
  endtask

  // ---------------- DUT observation ----------------
  always @(posedge clk) if (rst_n) begin
    n_cyc++;
    if (dut.u_ctrl.s2_sfc_q) begin
      dut_spk[dut.u_ctrl.s2_layer_q] += $countones(dut.spike);
      dut_prn[dut.u_ctrl.s2_layer_q] += $countones(dut.prune);
    end
    if (dut.u_ctrl.sfc_jump) n_jump++;
    if (in_valid && !in_ready && dut.u_ctrl.state_q == 3'd2) n_bp++;
    if (dut.g_lane[0].u_sb.mvu_we && dut.g_lane[0].u_sb.cfg_s2.shift != 0 &&
        dut.g_lane[0].u_sb.mvu_v < 0) n_neg_shift++;
  end

  // send one timestep of first-layer spikes and apply them to the reference
  task automatic send_step(int rate);
    int nrec = 0;
    for (int g = 0; g < rGI0; g++) for (int y = 0; y < rIMG; y++) for (int x = 0; x < rIMG; x++) begin
      logic [LANES-1:0] m;
      for (int j = 0; j < rLANES; j++) m[j] = (int'($urandom_range(99)) < rate);
      if (m != 0) begin
        for (int j = 0; j < rLANES; j++) if (m[j]) ref_in_spike(g * LANES + j, y, x);
        @(negedge clk);
        in_valid = 1; in_g = 4'(g); in_y = YW'(y); in_x = YW'(x); in_mask = m; in_last = 0;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        nrec++;
      end
    end
    // closing record (empty mask)
    @(negedge clk);
    in_valid = 1; in_g = 0; in_y = 0; in_x = 0; in_mask = 0; in_last = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  task automatic run_frame(int shift, int rate, bit compare);
    for (int l = 0; l < 3; l++) begin
      cfg[l].vth   = 10'((l == 2) ? 40 : 30);
      cfg[l].pth   = vwide_t'((shift == 0) ? -35 : -300);
      cfg[l].shift = 3'(shift);
    end
    ref_reset();
    @(negedge clk);
    nsteps = 16'(STEPS);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int t = 0; t < STEPS; t++) begin
      while (!(dut.u_ctrl.state_q == 3'd2)) @(negedge clk);
      send_step(rate);
      ref_layers();
      while (busy && int'(step) == t) @(negedge clk);
    end
    while (busy) @(negedge clk);
    if (compare) begin
      if (sat_seen) $display("note: reference saturated; order-dependent result possible");
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (dut_spk[l] != ref_spk[l]) begin failures++; $display("FAIL layer %0d spikes %0d exp %0d", l, dut_spk[l], ref_spk[l]); end
        checks++;
        if (dut_prn[l] != ref_prn[l]) begin failures++; $display("FAIL layer %0d prunes %0d exp %0d", l, dut_prn[l], ref_prn[l]); end
      end
      for (int o = 0; o < rNCLS; o++) begin
        checks++;
        if (int'(cls_cnt[o]) != ref_cls[o]) begin failures++; $display("FAIL class %0d count %0d exp %0d", o, cls_cnt[o], ref_cls[o]); end
      end
    end
    $display("frame shift=%0d: spikes %0d/%0d/%0d prunes %0d/%0d/%0d class=%0d counts=%p",
             shift, dut_spk[0], dut_spk[1], dut_spk[2], dut_prn[0], dut_prn[1], dut_prn[2], cls, ref_cls);
  endtask

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) cfg[l] = '0;
    #1;
    nsteps = 0;
    #22 rst_n = 1;
    gen_and_load();
    run_frame(0, 1, 1);
    $display("skip=%0d jump=%0d stall=%0d records=%0d sfc=%0d mvu=%0d cycles=%0d",
             dut.u_ctrl.stat_skip_q, n_jump, dut.u_ctrl.stat_stall_q, dut.u_ctrl.stat_rec_q,
             dut.u_ctrl.stat_sfc_q, dut.u_ctrl.stat_mvu_q, n_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
