// tb_sfc_unit: random check of the spike firing check against an independent
// model of the dynamic fixed-point format, firing with reset to zero and
// pruning.
module tb_sfc_unit;
  import snn_pkg::*;
  int checks = 0, failures = 0;
  logic valid, pruned, we, spike, prune;
  vmem_t vin, vout;
  bias_t bias;
  layer_cfg_t cfg;

  sfc_unit dut (.valid_i(valid), .pruned_i(pruned), .vmem_i(vin), .bias_i(bias),
                .cfg_i(cfg), .vmem_o(vout), .write_o(we), .spike_o(spike), .prune_o(prune));

  function automatic int dec(int w, int sh);
    return (w < 0) ? w * (1 << sh) : w;
  endfunction
  function automatic int enc(int v, int sh);
    int t;
    if (v >= 0) return (v > 1023) ? 1023 : v;
    t = v / (1 << sh);
    if (t * (1 << sh) != v) t = t - 1;  // floor
    return (t < -1024) ? -1024 : t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nspk = 0, nprn = 0;
    for (int i = 0; i < 5000; i++) begin
      int w, sh, b, th, pt, v, ev, es, ep, ewe;
      w  = int'($urandom_range(2047)) - 1024;
      sh = $urandom_range(7);
      b  = int'($urandom_range(255)) - 128;
      th = $urandom_range(1023);
      pt = -int'($urandom_range(3000));
      valid  = ($urandom_range(9) != 0);
      pruned = ($urandom_range(9) == 0);
      vin = vmem_t'(w); bias = bias_t'(b);
      cfg.vth = 10'(th); cfg.pth = vwide_t'(pt); cfg.shift = 3'(sh);
      #1;
      v = dec(w, sh) + b;
      ewe = valid && !pruned;
      es = 0; ep = 0; ev = enc(v, sh);
      if (ewe) begin
        if (v >= th) begin es = 1; ev = 0; end
        else if (v < pt) ep = 1;
      end
      nspk += es; nprn += ep;
      checks++;
      if (we !== 1'(ewe) || spike !== 1'(es) || prune !== 1'(ep) || (ewe && int'(vout) != ev)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d sh=%0d b=%0d th=%0d pt=%0d: got v=%0d s=%b p=%b we=%b exp v=%0d s=%0d p=%0d",
                                    w, sh, b, th, pt, vout, spike, prune, we, ev, es, ep);
      end
    end
    checks++;
    if (nspk == 0 || nprn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
