// spike_buffer: the output spike buffer.
//
// A first-in first-out queue of spike records waiting for the MVU array. A
// record names a source neuron position and carries a mask of the lanes
// (channels) that fired there. Records are pushed by the input port (spikes of
// the off-chip first layer) or by the spike firing check, and popped by the
// MVU sequencer when the array is free. The buffer and its role follow the
// design description; the depth (DEPTH) and the record layout are this
// design's choice. Push and pop may happen in the same cycle; a push when full
// or a pop when empty is a protocol error (checked by assertions).
// Timing: a pushed record is visible at the head one cycle later.
module spike_buffer #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] data_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] data_o,
  output logic             empty_o,
  output logic             full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wr_q, rd_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign empty_o = (cnt_q == 0);
  assign full_o  = (int'(cnt_q) == DEPTH);
  assign count_o = cnt_q;
  assign data_o  = mem[rd_q];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push_i) wr_q <= inc(wr_q);
      if (pop_i)  rd_q <= inc(rd_q);
      case ({push_i, pop_i})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_q] <= data_i;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i  |-> !empty_o);

endmodule
