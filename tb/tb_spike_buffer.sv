// tb_spike_buffer: random pushes and pops against a queue model; checks the
// empty and full flags and the order of the records.
module tb_spike_buffer;
  localparam int DEPTH = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push, pop, empty, full;
  logic [19:0] din, dout;
  logic [2:0] count;
  logic [19:0] q [$];
  int nfull = 0;

  spike_buffer #(.DEPTH(DEPTH), .WIDTH(20)) dut (
    .clk, .rst_n, .push_i(push), .data_i(din), .pop_i(pop), .data_o(dout),
    .empty_o(empty), .full_o(full), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || int'(count) != q.size()) begin
        failures++; $display("FAIL flags size=%0d empty=%b full=%b", q.size(), empty, full);
      end
      if (full) nfull++;
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL head %h exp %h", dout, q[0]); end
      end
      pop  = !empty && ($urandom_range(2) == 0);
      push = (!full || pop) && ($urandom_range(1) == 0) ^ (i % 400 < 200);
      din  = 20'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
