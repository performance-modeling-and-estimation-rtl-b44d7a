// ifmap_mixer: routes the pixels read from the WPAR fmaps RAM banks to the WPAR x MPAR PEs.
//
// Each bank word holds MPAR channels of one pixel position; positions are interleaved over the
// banks (position p lives in bank p mod WPAR). A WPAR-wide window of positions starting at an
// arbitrary column therefore comes out of the banks rotated: the window's first pixel is in
// bank `rot`. The mixer is a rotator (a shifter built from multiplexers, about
// NPE*ceil(log2 WPAR) of them, the complexity the source attributes to its mixers) followed by
// a channel select:
//   MIX_CONV : PE (w,m) <- bank (w+rot) mod WPAR, channel `lane` (same input channel for all filters)
//   MIX_DW   : PE (w,m) <- bank (w+rot) mod WPAR, channel m     (depthwise and pooling)
//   MIX_FC   : PE (w,m) <- bank rot, channel `lane`             (one input neuron broadcast)
// Columns whose `col_valid` bit is low (zero padding, or past the row's end) receive
// `pad_value` instead. Purely combinational.
module ifmap_mixer
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8,
  localparam int BW = (WPAR > 1) ? $clog2(WPAR) : 1,
  localparam int LW = (MPAR > 1) ? $clog2(MPAR) : 1
) (
  input  mix_mode_e                               mode,
  input  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] bank_data,
  input  logic [BW-1:0]                           rot,
  input  logic [LW-1:0]                           lane,
  input  logic [WPAR-1:0]                         col_valid,
  input  logic [FMAP_BITS-1:0]                    pad_value,
  output logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] pe_x
);

  always_comb begin
    for (int w = 0; w < WPAR; w++) begin
      int b;
      b = w + int'(rot);
      if (b >= WPAR) b = b - WPAR;
      if (mode == MIX_FC) b = int'(rot);
      for (int m = 0; m < MPAR; m++) begin
        if (!col_valid[w])          pe_x[w][m] = pad_value;
        else if (mode == MIX_DW)    pe_x[w][m] = bank_data[b][m];
        else                        pe_x[w][m] = bank_data[b][lane];
      end
    end
  end

endmodule
