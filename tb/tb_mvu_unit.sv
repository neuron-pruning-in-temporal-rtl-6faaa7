// tb_mvu_unit: random check of the membrane voltage update (weight addition,
// pruned gating, dynamic fixed-point shifter) against an independent model.
module tb_mvu_unit;
  import snn_pkg::*;
  int checks = 0, failures = 0;
  logic valid, pruned, we;
  vmem_t vin, vout;
  wgt_t wgt;
  logic [2:0] sh;

  mvu_unit dut (.valid_i(valid), .pruned_i(pruned), .vmem_i(vin), .weight_i(wgt),
                .shift_i(sh), .vmem_o(vout), .write_o(we));

  function automatic int dec(int w, int s);
    return (w < 0) ? w * (1 << s) : w;
  endfunction
  function automatic int enc(int v, int s);
    int t;
    if (v >= 0) return (v > 1023) ? 1023 : v;
    t = v / (1 << s);
    if (t * (1 << s) != v) t = t - 1;
    return (t < -1024) ? -1024 : t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: -1 stored with shift 3 means -8; adding +3 gives -5 -> stored -1
    valid = 1; pruned = 0; vin = -11'sd1; wgt = 8'sd3; sh = 3'd3;
    #1; checks++;
    if (vout != -11'sd1 || !we) begin failures++; $display("FAIL directed 1: %0d", vout); end
    // -2 stored with shift 3 (-16) plus 20 -> +4 stored as 4
    vin = -11'sd2; wgt = 8'sd20; #1; checks++;
    if (vout != 11'sd4) begin failures++; $display("FAIL directed 2: %0d", vout); end
    for (int i = 0; i < 5000; i++) begin
      int w, s, g, ev;
      w = int'($urandom_range(2047)) - 1024;
      s = $urandom_range(7);
      g = int'($urandom_range(255)) - 128;
      valid  = ($urandom_range(7) != 0);
      pruned = ($urandom_range(7) == 0);
      vin = vmem_t'(w); wgt = wgt_t'(g); sh = 3'(s);
      #1;
      ev = enc(dec(w, s) + g, s);
      checks++;
      if (we !== 1'(valid && !pruned) || int'(vout) != ev) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d s=%0d g=%0d got %0d exp %0d", w, s, g, vout, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
