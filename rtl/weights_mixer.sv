// weights_mixer: selects, from one NPE-weight word of the weights RAM, the weight each PE uses.
//
// Convolution and depthwise words hold WPAR consecutive filter taps ("slots") for the MPAR
// filters of a group, byte slot*MPAR + m being tap `slot` of filter m. One slot is used per
// cycle and broadcast along the PE row of its filter, so each filter's weight reaches all WPAR
// PEs computing that filter. Fully connected words hold one weight per output neuron, byte
// w*MPAR + m going to PE (w,m), and are consumed whole every cycle. Purely combinational.
// The word layout is this design's choice; the source gives only the selecting role.
module weights_mixer
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8,
  localparam int NPE = WPAR * MPAR,
  localparam int SW  = (WPAR > 1) ? $clog2(WPAR) : 1
) (
  input  mix_mode_e                                 mode,
  input  logic [SW-1:0]                             slot,
  input  logic [NPE-1:0][WEIGHT_BITS-1:0]           word,
  output logic [WPAR-1:0][MPAR-1:0][WEIGHT_BITS-1:0] pe_w
);

  always_comb begin
    for (int w = 0; w < WPAR; w++)
      for (int m = 0; m < MPAR; m++)
        if (mode == MIX_FC) pe_w[w][m] = word[w*MPAR + m];
        else                pe_w[w][m] = word[int'(slot)*MPAR + m];
  end

endmodule
