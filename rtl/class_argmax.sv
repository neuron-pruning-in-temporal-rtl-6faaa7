// class_argmax: output spike counters and class decision.
//
// The output layer has one neuron per class. Over the timesteps of a frame the
// spikes of each output neuron are counted; the class whose neuron fired most
// is the classification result (the lowest index wins a tie). Counting the
// output spikes and taking the maximum follows the design description; the
// counter width and the tie rule are this design's choice. clr_i zeroes the
// counters at the start of a frame; spike_i adds one to every class whose bit
// is set. class_o and max_o are combinational on the counters.
module class_argmax #(
  parameter int NCLS  = 10,
  parameter int CNT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr_i,
  input  logic                    inc_i,
  input  logic [NCLS-1:0]         spike_i,
  output logic [NCLS-1:0][CNT_W-1:0] count_o,
  output logic [$clog2(NCLS)-1:0] class_o,
  output logic [CNT_W-1:0]        max_o
);

  logic [NCLS-1:0][CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else if (clr_i) begin
      cnt_q <= '0;
    end else if (inc_i) begin
      for (int i = 0; i < NCLS; i++)
        if (spike_i[i] && cnt_q[i] != '1) cnt_q[i] <= cnt_q[i] + 1'b1;
    end
  end

  always_comb begin
    class_o = '0;
    max_o   = cnt_q[0];
    for (int i = 1; i < NCLS; i++) begin
      if (cnt_q[i] > max_o) begin
        max_o   = cnt_q[i];
        class_o = $clog2(NCLS)'(i);
      end
    end
  end

  assign count_o = cnt_q;

endmodule
