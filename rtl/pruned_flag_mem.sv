// pruned_flag_mem: the pruned flags of one lane, one bit per neuron.
//
// Neurons live in two membrane banks (even/odd) of ROWS rows each. Their flags
// are spread over FLAG_BANKS = 8 one-bit banks so that the flags of eight
// consecutive rows of one membrane bank sit in eight different flag banks:
// the flag of (membrane bank b, row r) is in flag bank r mod 8, at flag row
// 2*(r div 8) + b. A window read therefore returns the flags of rows
// r .. r+7 in one cycle, which is what the flag count is computed from
// (bit 0 = row r). Rows past the end read as pruned.
// Eight banks per lane follow the design description; the interleaving is this
// design's choice. The banks are flip-flops: reads are combinational, set and
// clear take effect at the clock edge. clr_i empties every flag at the start
// of a frame.
module pruned_flag_mem
  import snn_pkg::*;
#(
  parameter int ROWS  = 321,
  parameter int ROW_W = $clog2(ROWS + FLAG_BANKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr_i,
  // set one flag
  input  logic             set_i,
  input  logic             set_bank_i,
  input  logic [ROW_W-1:0] set_row_i,
  // point read
  input  logic             rd_bank_i,
  input  logic [ROW_W-1:0] rd_row_i,
  output logic             rd_flag_o,
  // window read: rows win_row_i .. win_row_i+7 of bank win_bank_i
  input  logic             win_bank_i,
  input  logic [ROW_W-1:0] win_row_i,
  output logic [FLAG_BANKS-1:0] win_o
);

  localparam int FROWS = 2 * ((ROWS + FLAG_BANKS - 1) / FLAG_BANKS);
  localparam int FB_W  = $clog2(FLAG_BANKS);

  logic [FROWS-1:0] bank_q [FLAG_BANKS];

  function automatic logic get_flag(logic [FROWS-1:0] banks [FLAG_BANKS],
                                    logic b, logic [ROW_W-1:0] r);
    int unsigned fr;
    if (int'(r) >= ROWS) return 1'b1;
    fr = 2 * (int'(r) / FLAG_BANKS) + int'(b);
    return banks[r[FB_W-1:0]][fr];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FLAG_BANKS; i++) bank_q[i] <= '0;
    end else if (clr_i) begin
      for (int i = 0; i < FLAG_BANKS; i++) bank_q[i] <= '0;
    end else if (set_i && int'(set_row_i) < ROWS) begin
      bank_q[set_row_i[FB_W-1:0]][2 * (int'(set_row_i) / FLAG_BANKS) + int'(set_bank_i)] <= 1'b1;
    end
  end

  always_comb begin
    rd_flag_o = get_flag(bank_q, rd_bank_i, rd_row_i);
    for (int i = 0; i < FLAG_BANKS; i++)
      win_o[i] = get_flag(bank_q, win_bank_i, win_row_i + ROW_W'(i));
  end

endmodule
