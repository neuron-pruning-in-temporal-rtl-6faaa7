// sp_ram: single-port synchronous memory bank.
//
// One access per cycle: with en high, a write stores wdata at addr, a read
// returns the word at addr on rdata after the next clock edge (rdata holds its
// value otherwise). It stands for the SRAM macros of the processor and is used
// for the two membrane voltage banks, the bias memory and the weight memory of
// each lane. The single port per bank follows the description (two membrane
// banks so that one can be read while the other is written); the synchronous
// read timing is this design's choice. No reset: contents are written before
// use.
module sp_ram #(
  parameter int DEPTH  = 1024,
  parameter int WIDTH  = 11,
  parameter int ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
