// pe_array: the WPAR x MPAR grid of processing elements.
//
// PE (w, m) computes output pixel w of the current WPAR-wide row segment for filter m of the
// current MPAR-filter group (for fully connected layers: output neuron w*MPAR + m of the
// current group). Every PE gets its own fmap pixel and weight from the two mixers; control
// (en/first/last, operation, quantization settings) is common to the whole array, so all PEs
// finish their pixels in the same cycle, and the whole array's results leave the quantization
// stage together, five cycles after the last operand.
//
// Ports use packed arrays indexed [w][m]. q_valid is the AND of the (identical) per-PE flags.
module pe_array
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  en,
  input  logic                                  first,
  input  logic                                  last,
  input  pe_op_e                                op,
  input  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0]   x,
  input  logic [WPAR-1:0][MPAR-1:0][WEIGHT_BITS-1:0] w,
  input  logic [SCALE_BITS-1:0]                 scale,
  input  logic [SHIFT_BITS-1:0]                 shift,
  input  logic                                  relu,
  output logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0]   q,
  output logic                                  q_valid
);

  logic [WPAR-1:0][MPAR-1:0] qv;

  for (genvar i = 0; i < WPAR; i++) begin : g_col
    for (genvar j = 0; j < MPAR; j++) begin : g_row
      pe u_pe (
        .clk, .rst_n, .en, .first, .last, .op,
        .x(x[i][j]), .w(w[i][j]),
        .scale, .shift, .relu,
        .q(q[i][j]), .q_valid(qv[i][j])
      );
    end
  end

  assign q_valid = &qv;

endmodule
