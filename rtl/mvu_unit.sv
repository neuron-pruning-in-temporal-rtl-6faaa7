// mvu_unit: membrane voltage update of one fan-out neuron.
//
// When a neuron of the previous layer fires, each fan-out neuron receives the
// synaptic weight: the stored membrane word is decoded, the weight is added and
// the shifter re-encodes the sum in the dynamic fixed-point format of the
// layer (negative values shifted right by cfg shift). A pruned neuron is not
// updated, which is where the energy of pruned neurons is saved. The adder,
// the pruned-flag gating and the shifter follow the design description; the
// rounding and saturation are this design's choice (see snn_pkg).
// Purely combinational.
module mvu_unit
  import snn_pkg::*;
(
  input  logic              valid_i,
  input  logic              pruned_i,
  input  vmem_t             vmem_i,
  input  wgt_t              weight_i,
  input  logic [SHIFT_W-1:0] shift_i,
  output vmem_t             vmem_o,
  output logic              write_o
);

  vwide_t sum;

  always_comb begin
    sum     = dfp_decode(vmem_i, shift_i) + vwide_t'(weight_i);
    vmem_o  = dfp_encode(sum, shift_i);
    write_o = valid_i && !pruned_i;
  end

endmodule
