// tb_class_argmax: random output spikes against per-class counters kept in the
// testbench; checks the counts, the arg-max with lowest-index tie break and
// the clear.
module tb_class_argmax;
  localparam int NCLS = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr, inc;
  logic [NCLS-1:0] spk;
  logic [NCLS-1:0][15:0] cnt;
  logic [3:0] cls;
  logic [15:0] mx;
  int model [NCLS];

  class_argmax #(.NCLS(NCLS), .CNT_W(16)) dut (
    .clk, .rst_n, .clr_i(clr), .inc_i(inc), .spike_i(spk), .count_o(cnt), .class_o(cls), .max_o(mx));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; inc = 0; spk = 0;
    foreach (model[i]) model[i] = 0;
    #12 rst_n = 1;
    for (int frame = 0; frame < 20; frame++) begin
      automatic int bias = $urandom_range(NCLS - 1);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      foreach (model[i]) model[i] = 0;
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        inc = ($urandom_range(3) != 0);
        for (int i = 0; i < NCLS; i++) spk[i] = ($urandom_range(9) < ((i == bias) ? 4 : 2));
        if (inc) for (int i = 0; i < NCLS; i++) model[i] += spk[i];
      end
      @(negedge clk); inc = 0;
      #1;
      begin
        automatic int best = 0;
        for (int i = 1; i < NCLS; i++) if (model[i] > model[best]) best = i;
        for (int i = 0; i < NCLS; i++) begin
          checks++;
          if (int'(cnt[i]) != model[i]) begin failures++; $display("FAIL cnt[%0d]=%0d exp %0d", i, cnt[i], model[i]); end
        end
        checks++;
        if (int'(cls) != best || int'(mx) != model[best]) begin failures++; $display("FAIL class %0d exp %0d", cls, best); end
      end
    end
    // ties: equal counts in every class, then in classes 3 and 7 only
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int t = 0; t < 5; t++) begin @(negedge clk); inc = 1; spk = '1; end
    @(negedge clk); inc = 0; #1;
    checks++;
    if (cls != 0 || mx != 5) begin failures++; $display("FAIL all-tie class %0d", cls); end
    for (int t = 0; t < 3; t++) begin @(negedge clk); inc = 1; spk = 10'b0010001000; end
    @(negedge clk); inc = 0; #1;
    checks++;
    if (cls != 3 || mx != 8) begin failures++; $display("FAIL tie 3/7 class %0d", cls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
