// tb_pruned_flag_mem: random flag sets, point reads and 8-row window reads
// against a flat model indexed by (membrane bank, row); checks the clear.
module tb_pruned_flag_mem;
  localparam int ROWS = 37;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr, set, set_bank, rd_bank, win_bank, rd_flag;
  logic [5:0] set_row, rd_row, win_row;
  logic [7:0] win;
  logic model [2][ROWS];

  pruned_flag_mem #(.ROWS(ROWS), .ROW_W(6)) dut (
    .clk, .rst_n, .clr_i(clr), .set_i(set), .set_bank_i(set_bank), .set_row_i(set_row),
    .rd_bank_i(rd_bank), .rd_row_i(rd_row), .rd_flag_o(rd_flag),
    .win_bank_i(win_bank), .win_row_i(win_row), .win_o(win));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < ROWS; r++) begin
        logic [7:0] exp;
        rd_bank = 1'(b); rd_row = 6'(r); win_bank = 1'(b); win_row = 6'(r);
        for (int i = 0; i < 8; i++) exp[i] = (r + i >= ROWS) ? 1'b1 : model[b][r + i];
        #1;
        checks++;
        if (rd_flag !== model[b][r] || win !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL b=%0d r=%0d flag=%b exp %b win=%b exp %b", b, r, rd_flag, model[b][r], win, exp);
        end
      end
  endtask

  initial begin
    clr = 0; set = 0; set_bank = 0; set_row = 0; rd_bank = 0; rd_row = 0; win_bank = 0; win_row = 0;
    for (int b = 0; b < 2; b++) for (int r = 0; r < ROWS; r++) model[b][r] = 0;
    #12 rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        set = 1; set_bank = 1'($urandom); set_row = 6'($urandom_range(ROWS - 1));
        model[set_bank][set_row] = 1;
        @(negedge clk); set = 0;
        if (i % 8 == 0) check_all();
      end
      check_all();
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int b = 0; b < 2; b++) for (int r = 0; r < ROWS; r++) model[b][r] = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
