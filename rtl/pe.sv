// pe: one processing element of the output-stationary array.
//
// Two pipelined stages, as the accelerator's PE is described. The output computation stage
// accumulates one product per cycle (or, for max pooling, keeps the running maximum) in a
// local accumulator while its output pixel stays in place. When the last operand of the pixel
// arrives (`last`), the finished sum moves into the quantization stage and the accumulator is
// free for the next pixel in the very next cycle. Quantization multiplies the sum by the
// layer's scaling factor and keeps 8 bits from the top of the result; it always takes
// QUANT_STAGES = 5 cycles.
//
// Timing: an operand presented with `en` in cycle t is accumulated at the end of cycle t.
// If it carries `last`, `q` holds the quantized pixel and `q_valid` is high in cycle t+5.
// `first` starts a new sum (the accumulator is loaded, not added to), so no clear cycle is
// needed between pixels. `scale`, `shift` and `relu` are not carried along the quantization
// pipeline: they are layer constants and must stay stable until the layer's last result has
// left the pipeline (the controller drains the array between layers).
//
// Own choices (not given by the source): 32-bit accumulator; quantization as
// sat8(round(acc*scale / 2^shift)) with an unsigned 16-bit scale; the five cycles are split
// into capture, multiply, rounding add, shift and saturate/ReLU; an optional ReLU.
module pe
  import gemini_pkg::*;
#(
  parameter int ACC_W = ACC_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,      // operand valid this cycle
  input  logic                  first,   // first operand of an output pixel
  input  logic                  last,    // last operand of an output pixel
  input  pe_op_e                op,      // MAC or MAX
  input  logic [FMAP_BITS-1:0]  x,       // fmap pixel (signed)
  input  logic [WEIGHT_BITS-1:0] w,      // weight (signed)
  input  logic [SCALE_BITS-1:0] scale,
  input  logic [SHIFT_BITS-1:0] shift,
  input  logic                  relu,
  output logic [FMAP_BITS-1:0]  q,       // quantized output pixel (signed)
  output logic                  q_valid
);

  localparam int PROD_W = ACC_W + SCALE_BITS + 1;

  logic signed [ACC_W-1:0] acc, operand, acc_next;

  always_comb begin
    if (op == PE_MAC) operand = ACC_W'($signed(x) * $signed(w));
    else              operand = ACC_W'($signed(x));
    if (first)                acc_next = operand;
    else if (op == PE_MAC)    acc_next = acc + operand;
    else                      acc_next = (operand > acc) ? operand : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end

  // Quantization pipeline: five registered steps.
  logic                    v1, v2, v3, v4, v5;
  logic signed [ACC_W-1:0]  s1;
  logic signed [PROD_W-1:0] s2, s3, s4;
  logic [FMAP_BITS-1:0]     s5;

  localparam logic signed [PROD_W-1:0] QMAX = PROD_W'(2**(FMAP_BITS-1) - 1);
  localparam logic signed [PROD_W-1:0] QMIN = -PROD_W'(2**(FMAP_BITS-1));

  logic signed [PROD_W-1:0] round_add;
  logic signed [PROD_W-1:0] clipped;
  always_comb begin
    round_add = (shift == '0) ? '0 : (PROD_W'(1) <<< (shift - 1'b1));
    if (s4 > QMAX)      clipped = QMAX;
    else if (s4 < QMIN) clipped = QMIN;
    else                clipped = s4;
    if (relu && clipped < 0) clipped = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5} <= '0;
      s1 <= '0; s2 <= '0; s3 <= '0; s4 <= '0; s5 <= '0;
    end else begin
      v1 <= en && last;
      v2 <= v1; v3 <= v2; v4 <= v3; v5 <= v4;
      if (en && last) s1 <= acc_next;
      s2 <= PROD_W'(s1) * $signed({1'b0, scale});
      s3 <= s2 + round_add;
      s4 <= s3 >>> shift;
      s5 <= clipped[FMAP_BITS-1:0];
    end
  end

  assign q       = s5;
  assign q_valid = v5;

endmodule
