// tb_sp_ram: random reads and writes of a single-port memory bank against an
// array model; also checks the one-cycle read latency and that rdata holds.
module tb_sp_ram;
  int checks = 0, failures = 0;
  logic clk = 0, en, we;
  logic [8:0] addr;
  logic [10:0] wdata, rdata;
  logic [10:0] model [300];

  sp_ram #(.DEPTH(300), .WIDTH(11)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 9'(i); wdata = 11'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      automatic int a = $urandom_range(299);
      logic [10:0] held;
      @(negedge clk);
      en = 1; addr = 9'(a);
      we = ($urandom_range(2) == 0);
      wdata = 11'($urandom);
      if (!we) begin
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]); end
        held = rdata;
        en = 0; addr = 9'($urandom_range(299));
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL rdata did not hold"); end
      end else begin
        model[a] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
