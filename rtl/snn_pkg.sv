// snn_pkg: types, widths and arithmetic shared by the NPTD SNN processor.
//
// Membrane voltages are stored in 11 bits using a dynamic fixed-point format:
// a non-negative stored word is the voltage itself, a negative stored word is
// the voltage shifted right by a per-layer amount SHIFT. This lets negative
// membrane voltages reach the (large, negative) pruning threshold without
// widening the memories. The 11-bit width and the idea of shifting only the
// negative values come from the design description; the rounding (floor, by an
// arithmetic right shift) and saturation at both ends are this design's choice.
// Inside the datapath voltages are handled in a wider two's complement form
// (vwide_t).
package snn_pkg;

  localparam int VMEM_W     = 11;  // stored membrane voltage width
  localparam int VWIDE_W    = 20;  // decoded membrane voltage width
  localparam int WGT_W      = 8;   // synaptic weight width
  localparam int BIAS_W     = 8;   // bias width
  localparam int SHIFT_W    = 3;   // dynamic fixed-point shift, 0..7
  localparam int FLAG_BANKS = 8;   // pruned flag banks per lane = flag window
  localparam int FCNT_W     = 4;   // flag count, 0..FLAG_BANKS
  localparam int NLAYERS    = 3;   // on-chip layers: conv2, conv3, fc

  typedef logic signed [VMEM_W-1:0]  vmem_t;
  typedef logic signed [VWIDE_W-1:0] vwide_t;
  typedef logic signed [WGT_W-1:0]   wgt_t;
  typedef logic signed [BIAS_W-1:0]  bias_t;

  // Per-layer neuron configuration.
  typedef struct packed {
    logic [VMEM_W-2:0]    vth;    // firing threshold (positive)
    vwide_t               pth;    // pruning threshold (decoded units)
    logic [SHIFT_W-1:0]   shift;  // right shift applied to negative voltages
  } layer_cfg_t;

  // Operation a lane performs on the row addressed this cycle.
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,
    OP_SFC  = 2'd1,   // spike firing check (bias, fire, prune)
    OP_MVU  = 2'd2,   // membrane voltage update (add weight)
    OP_INIT = 2'd3    // clear the row in both membrane banks
  } lane_op_e;

  // Stored word -> voltage.
  function automatic vwide_t dfp_decode(vmem_t w, logic [SHIFT_W-1:0] sh);
    vwide_t v;
    v = vwide_t'(w);
    if (w < 0) v = v <<< sh;
    return v;
  endfunction

  // Voltage -> stored word, with saturation.
  function automatic vmem_t dfp_encode(vwide_t v, logic [SHIFT_W-1:0] sh);
    vwide_t t;
    localparam vwide_t VMAX = vwide_t'((1 << (VMEM_W - 1)) - 1);
    localparam vwide_t VMIN = -vwide_t'(1 << (VMEM_W - 1));
    if (v >= 0) begin
      t = (v > VMAX) ? VMAX : v;
    end else begin
      t = v >>> sh;
      if (t < VMIN) t = VMIN;
    end
    return vmem_t'(t);
  endfunction

endpackage
