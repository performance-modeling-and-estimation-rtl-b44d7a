// gemini_pkg: constants and types shared by the accelerator.
//
// The accelerator is an output-stationary neural-network engine whose size is set by two
// structural parameters, WPAR (output pixels of one row computed side by side) and MPAR
// (filters computed side by side). Feature-map pixels and weights are 8-bit signed, as in the
// evaluated configuration. The layer descriptor format, the accumulator width, the
// quantization arithmetic and the op-code values below are this design's own choices.
//
// A layer is described by HDR_WORDS consecutive words of the weights RAM; field i sits in the
// low 32 bits of word i (so NPE must be at least 4). Field F_CTRL packs the layer type, the
// ReLU flag, the vertical and horizontal "same"-padding flags and log2 of the stride.
package gemini_pkg;

  localparam int FMAP_BITS    = 8;   // fmapbits
  localparam int WEIGHT_BITS  = 8;   // weightbits
  localparam int ACC_BITS     = 32;  // PE accumulator width
  localparam int SCALE_BITS   = 16;  // unsigned quantization scaling factor
  localparam int SHIFT_BITS   = 6;   // right shift applied after scaling
  localparam int QUANT_STAGES = 5;   // quantization stage length in clock cycles
  localparam int DIM_BITS     = 16;  // width of every layer dimension and counter
  localparam int HDR_WORDS    = 16;  // words per layer descriptor
  localparam int PAD_OFFSET   = 16;  // keeps column arithmetic non-negative (pad < PAD_OFFSET*WPAR)

  typedef logic [DIM_BITS-1:0] dim_t;

  typedef enum logic [2:0] {
    L_END  = 3'd0,  // end of network
    L_CONV = 3'd1,  // convolution
    L_DW   = 3'd2,  // depthwise convolution
    L_POOL = 3'd3,  // max pooling
    L_FC   = 3'd4   // fully connected
  } layer_type_e;

  // How the ifmap and weights mixers route data to the PE array.
  typedef enum logic [1:0] {
    MIX_CONV = 2'd0,  // one input channel for every PE row, WPAR shifted columns
    MIX_DW   = 2'd1,  // PE row m gets channel m of the group (depthwise, pooling)
    MIX_FC   = 2'd2   // one input neuron broadcast to every PE
  } mix_mode_e;

  typedef enum logic {
    PE_MAC = 1'b0,
    PE_MAX = 1'b1
  } pe_op_e;

  // Descriptor field indices.
  localparam int F_CTRL     = 0;   // [2:0] type, [3] relu, [4] pad_v, [5] pad_h, [7:6] stride_log2
  localparam int F_C        = 1;   // input channels
  localparam int F_H        = 2;   // input height
  localparam int F_W        = 3;   // input width
  localparam int F_M        = 4;   // filters (conv), channels (dw/pool), output neurons (fc)
  localparam int F_R        = 5;   // filter height
  localparam int F_S        = 6;   // filter width
  localparam int F_IN_BASE  = 7;   // fmaps RAM word address of the input tensor
  localparam int F_OUT_BASE = 8;   // fmaps RAM word address of the output tensor
  localparam int F_NIN      = 9;   // input neurons (fc)
  localparam int F_SCALE    = 10;  // quantization scaling factor
  localparam int F_SHIFT    = 11;  // quantization right shift
  localparam int F_OH       = 12;  // output height
  localparam int F_OW       = 13;  // output width (fc: ceil(Nout/MPAR))
  localparam int F_NEXT     = 14;  // weights RAM address of the next descriptor
  localparam int F_WBASE    = 15;  // weights RAM address of this layer's weights

  typedef struct packed {
    layer_type_e            ltype;
    logic                   relu;
    logic                   pad_v;
    logic                   pad_h;
    logic [1:0]             slog;
    dim_t                   c, h, w, m, r, s;
    logic [31:0]            in_base, out_base;
    logic [31:0]            nin;
    logic [SCALE_BITS-1:0]  scale;
    logic [SHIFT_BITS-1:0]  shift;
    dim_t                   oh, ow;
    logic [31:0]            next, wbase;
  } layer_desc_t;

  // Position of a PE-array result, carried alongside the quantization pipeline.
  typedef struct packed {
    dim_t yo;   // computed row
    dim_t xo0;  // first computed column of the WPAR-wide group
    dim_t mg;   // filter group
  } st_tag_t;

endpackage
