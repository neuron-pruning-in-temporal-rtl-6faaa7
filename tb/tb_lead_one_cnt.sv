// tb_lead_one_cnt: exhaustive check of the 8-bit leading-one counter and a
// random check of a 48-bit one, against a reference that scans the bits.
module tb_lead_one_cnt;
  int checks = 0, failures = 0;
  logic [7:0]  b8;
  logic [3:0]  c8;
  logic [47:0] b48;
  logic [5:0]  c48;

  lead_one_cnt #(.W(8),  .CNT_W(4)) dut8  (.bits_i(b8),  .count_o(c8));
  lead_one_cnt #(.W(48), .CNT_W(6)) dut48 (.bits_i(b48), .count_o(c48));

  function automatic int ref_cnt(logic [47:0] v, int w);
    int n = 0;
    while (n < w && v[n]) n++;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      b8 = 8'(i);
      #1;
      checks++;
      if (int'(c8) != ref_cnt(48'(b8), 8)) begin
        failures++;
        $display("FAIL w8 bits=%b got %0d", b8, c8);
      end
    end
    for (int i = 0; i < 500; i++) begin
      automatic int k = $urandom_range(48);
      b48 = (k == 48) ? '1 : ((48'(1) << k) - 1);
      b48 = b48 | (({$urandom, $urandom} << (k + 1)) & ((k >= 47) ? '0 : '1));
      #1;
      checks++;
      if (int'(c48) != ref_cnt(b48, 48)) begin
        failures++;
        $display("FAIL w48 bits=%h got %0d", b48, c48);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
