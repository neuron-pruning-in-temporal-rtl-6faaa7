// sfc_unit: spike firing check of one neuron.
//
// Once per timestep every live neuron of a layer passes through this unit: the
// bias is added to the decoded membrane voltage, the sum is compared with the
// firing threshold Vth and with the layer's pruning threshold Pth. A neuron
// whose voltage reaches Vth fires and is reset to zero; a neuron whose voltage
// falls below Pth is marked pruned and is skipped for the rest of the frame.
// The adder and the two comparators follow the design description; reset to
// zero (rather than subtraction of Vth) follows its wording "its V_mem resets".
// Firing is checked before pruning. A pruned neuron is left untouched
// (write_o low). Purely combinational; the caller supplies the stored word
// read from the membrane bank and writes vmem_o back one cycle later.
module sfc_unit
  import snn_pkg::*;
(
  input  logic       valid_i,    // a neuron is presented
  input  logic       pruned_i,   // its pruned flag
  input  vmem_t      vmem_i,     // stored membrane word
  input  bias_t      bias_i,
  input  layer_cfg_t cfg_i,
  output vmem_t      vmem_o,     // stored word to write back
  output logic       write_o,    // write vmem_o back
  output logic       spike_o,    // neuron fired
  output logic       prune_o     // neuron becomes pruned
);

  vwide_t v;

  always_comb begin
    v       = dfp_decode(vmem_i, cfg_i.shift) + vwide_t'(bias_i);
    spike_o = 1'b0;
    prune_o = 1'b0;
    write_o = valid_i && !pruned_i;
    vmem_o  = dfp_encode(v, cfg_i.shift);
    if (valid_i && !pruned_i) begin
      if (v >= vwide_t'(cfg_i.vth)) begin
        spike_o = 1'b1;
        vmem_o  = '0;
      end else if (v < cfg_i.pth) begin
        prune_o = 1'b1;
      end
    end
  end

endmodule
