// lead_one_cnt: leading-one counter.
//
// Counts how many consecutive bits are 1, starting at bit 0 (the bit that is
// processed first) and stopping at the first 0. The result is W when every bit
// is 1. The processor uses it in two places: on a window of pruned flags it
// gives the flag count, the number of pruned neurons that can be skipped at
// once; on an inverted spike mask it gives the position of the next spike.
// The counter itself follows the design description; the bit order is this
// design's choice. Purely combinational.
module lead_one_cnt #(
  parameter int W   = 8,
  parameter int CNT_W = $clog2(W + 1)
) (
  input  logic [W-1:0]     bits_i,
  output logic [CNT_W-1:0] count_o
);

  always_comb begin
    logic run;
    run     = 1'b1;
    count_o = '0;
    for (int i = 0; i < W; i++) begin
      run = run & bits_i[i];
      if (run) count_o = CNT_W'(i + 1);
    end
  end

endmodule
