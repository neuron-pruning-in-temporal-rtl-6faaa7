// tb_sub_block: one lane driven with random SFC, MVU and INIT commands.
//
// A model of the lane's memories (two membrane banks, biases, weights, pruned
// flags) kept in the testbench predicts the spike and prune outputs of every
// SFC command, the flag windows and, at the end, the contents of both
// membrane banks. The dynamic fixed-point arithmetic is modelled here
// independently of the RTL. Commands never address the bank that is being
// written back, as the controller guarantees.
module tb_sub_block;
  import snn_pkg::*;
  localparam int ROWS = 20, WDEPTH = 64, ROW_W = 5, WA_W = 6;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  lane_op_e op;
  logic bank, lane_en, flag_clr, win_bank, spike, prune, ld_w, ld_b;
  logic [ROW_W-1:0] row, win_row;
  logic [WA_W-1:0] waddr, ld_addr;
  logic [1:0] layer;
  layer_cfg_t cfg [NLAYERS];
  logic [7:0] win, ld_data;

  sub_block #(.ROWS(ROWS), .WDEPTH(WDEPTH), .ROW_W(ROW_W), .WA_W(WA_W)) dut (
    .clk, .rst_n, .op_i(op), .bank_i(bank), .row_i(row), .waddr_i(waddr), .layer_i(layer),
    .lane_en_i(lane_en), .cfg_i(cfg), .flag_clr_i(flag_clr), .win_bank_i(win_bank),
    .win_row_i(win_row), .flag_win_o(win), .spike_o(spike), .prune_o(prune),
    .ld_w_i(ld_w), .ld_b_i(ld_b), .ld_addr_i(ld_addr), .ld_data_i(ld_data));

  always #5 clk = ~clk;

  int vm [2][ROWS];
  int bs [2 * ROWS];
  int wg [WDEPTH];
  bit fl [2][ROWS];
  int nspk = 0, nprn = 0, nmvu = 0;

  function automatic int dec(int w, int s);
    return (w < 0) ? w * (1 << s) : w;
  endfunction
  function automatic int enc(int v, int s);
    int t;
    if (v >= 0) return (v > 1023) ? 1023 : v;
    t = v / (1 << s);
    if (t * (1 << s) != v) t = t - 1;
    return (t < -1024) ? -1024 : t;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NONE; bank = 0; row = 0; waddr = 0; layer = 0; lane_en = 1; flag_clr = 0;
    win_bank = 0; win_row = 0; ld_w = 0; ld_b = 0; ld_addr = 0; ld_data = 0;
    for (int l = 0; l < NLAYERS; l++) begin
      cfg[l].vth = 10'(40 + 10 * l); cfg[l].pth = vwide_t'(-200 - 100 * l); cfg[l].shift = 3'(l + 1);
    end
    #22 rst_n = 1;
    for (int a = 0; a < WDEPTH; a++) begin
      @(negedge clk); ld_w = 1; ld_addr = WA_W'(a); wg[a] = int'($urandom_range(255)) - 128; ld_data = 8'(wg[a]);
    end
    for (int a = 0; a < 2 * ROWS; a++) begin
      @(negedge clk); ld_w = 0; ld_b = 1; ld_addr = WA_W'(a); bs[a] = int'($urandom_range(60)) - 40; ld_data = 8'(bs[a]);
    end
    @(negedge clk); ld_b = 0;
    for (int rep = 0; rep < 3; rep++) begin
      // frame start: clear flags, zero the membranes
      flag_clr = 1;
      @(negedge clk); flag_clr = 0;
      for (int r = 0; r < ROWS; r++) begin
        op = OP_INIT; row = ROW_W'(r);
        @(negedge clk);
      end
      op = OP_NONE;
      for (int b = 0; b < 2; b++) for (int r = 0; r < ROWS; r++) begin vm[b][r] = 0; fl[b][r] = 0; end
      @(negedge clk);
      begin
        automatic lane_op_e pop_q = OP_NONE;
        automatic int pb = 0, pr = 0, pl = 0, pw = 0;
        automatic bit pen = 0;
        for (int i = 0; i < 3000; i++) begin
          // drive a new command, avoiding the bank written back this cycle
          automatic int k = $urandom_range(9);
          automatic lane_op_e nop = (k < 4) ? OP_MVU : ((k < 8) ? OP_SFC : OP_NONE);
          automatic int nb = $urandom_range(1);
          if (pop_q != OP_NONE && pen) nb = 1 - pb;
          op = nop; bank = 1'(nb); row = ROW_W'($urandom_range(ROWS - 1));
          waddr = WA_W'($urandom_range(WDEPTH - 1)); layer = 2'($urandom_range(2));
          lane_en = ($urandom_range(15) != 0);
          win_bank = 1'($urandom); win_row = ROW_W'($urandom_range(ROWS - 1));
          #1;
          // flag window
          begin
            logic [7:0] ew;
            for (int j = 0; j < 8; j++) ew[j] = (int'(win_row) + j >= ROWS) ? 1'b1 : fl[win_bank][int'(win_row) + j];
            checks++;
            if (win !== ew) begin failures++; if (failures < 10) $display("FAIL window %b exp %b", win, ew); end
          end
          // second stage of the previous command
          begin
            automatic int es = 0, ep = 0;
            if (pop_q == OP_SFC && pen && !fl[pb][pr]) begin
              automatic int v = dec(vm[pb][pr], cfg[pl].shift) + bs[2 * pr + pb];
              if (v >= int'(cfg[pl].vth)) begin es = 1; v = 0; end
              else if (v < int'(cfg[pl].pth)) ep = 1;
              vm[pb][pr] = enc(v, cfg[pl].shift);
              if (ep) fl[pb][pr] = 1;
            end else if (pop_q == OP_MVU && pen && !fl[pb][pr]) begin
              vm[pb][pr] = enc(dec(vm[pb][pr], cfg[pl].shift) + wg[pw], cfg[pl].shift);
              nmvu++;
            end
            nspk += es; nprn += ep;
            checks++;
            if (spike !== 1'(es) || prune !== 1'(ep)) begin
              failures++;
              if (failures < 10) $display("FAIL i=%0d spike=%b exp %0d prune=%b exp %0d", i, spike, es, prune, ep);
            end
          end
          pop_q = nop; pb = nb; pr = row; pl = layer; pw = waddr; pen = lane_en;
          @(negedge clk);
          // a pruned flag set by the previous SFC is visible from now on
        end
        op = OP_NONE;
        #1;
        if (pop_q == OP_SFC && pen && !fl[pb][pr]) begin
          automatic int v = dec(vm[pb][pr], cfg[pl].shift) + bs[2 * pr + pb];
          if (v >= int'(cfg[pl].vth)) v = 0;
          else if (v < int'(cfg[pl].pth)) fl[pb][pr] = 1;
          vm[pb][pr] = enc(v, cfg[pl].shift);
        end else if (pop_q == OP_MVU && pen && !fl[pb][pr]) begin
          vm[pb][pr] = enc(dec(vm[pb][pr], cfg[pl].shift) + wg[pw], cfg[pl].shift);
        end
        @(negedge clk);
        for (int r = 0; r < ROWS; r++) begin
          checks += 2;
          if (int'(dut.g_vbank[0].u_vmem.mem[r]) - ((dut.g_vbank[0].u_vmem.mem[r][10]) ? 2048 : 0) != vm[0][r]) begin
            failures++; $display("FAIL bank0 row %0d = %0d exp %0d", r, $signed(dut.g_vbank[0].u_vmem.mem[r]), vm[0][r]);
          end
          if (int'(dut.g_vbank[1].u_vmem.mem[r]) - ((dut.g_vbank[1].u_vmem.mem[r][10]) ? 2048 : 0) != vm[1][r]) begin
            failures++; $display("FAIL bank1 row %0d = %0d exp %0d", r, $signed(dut.g_vbank[1].u_vmem.mem[r]), vm[1][r]);
          end
        end
      end
    end
    checks++;
    if (nspk == 0 || nprn == 0 || nmvu == 0) begin failures++; $display("FAIL coverage spk=%0d prn=%0d mvu=%0d", nspk, nprn, nmvu); end
    $display("spikes=%0d prunes=%0d mvu=%0d", nspk, nprn, nmvu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
