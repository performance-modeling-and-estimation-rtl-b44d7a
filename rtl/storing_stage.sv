// storing_stage: writes the quantized PE-array results into the fmaps RAM, dropping the
// useless ones.
//
// The array always computes every column of the input width, whatever the stride and the
// horizontal padding, and with a stride > 1 also the rows in between; this stage discards
// the results that are not part of the output feature map:
//   - columns past `lastcol` (with no horizontal padding the last S-1 columns are incomplete),
//   - columns and rows that are not a multiple of the stride (2^slog).
// Kept result (w, .) of the group starting at column xo0 becomes output column
// ox = (xo0+w) >> slog of row oy = yo >> slog, stored in bank ox mod WPAR at word
//   out_base + (mg*oh + oy)*owa + ox div WPAR      (owa = words per output row).
// The kept results of one group are contiguous output columns, fewer than WPAR+1, so each
// bank receives at most one of them: a mixer picks, for each bank, the result aimed at it,
// and the whole group is written in one cycle. One bank word carries the MPAR filters of the
// group. Fully connected results use the same path with yo = 0, mg = 0 and slog = 0.
//
// Timing: one register stage; results presented with in_valid in cycle t are written by the
// RAM at the end of cycle t+1. The dropping role and the single write per group follow the
// source; the address formula is this design's layout.
module storing_stage
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8,
  parameter int AW   = 16
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] q,
  input  st_tag_t                                tag,
  input  dim_t                                   lastcol,
  input  logic [1:0]                             slog,
  input  dim_t                                   oh,
  input  dim_t                                   owa,
  input  logic [AW-1:0]                          out_base,
  output logic [WPAR-1:0]                        wr_en,
  output logic [WPAR-1:0][AW-1:0]                wr_addr,
  output logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] wr_data
);

  logic [WPAR-1:0]          keep;
  logic [WPAR-1:0][AW-1:0]  t_addr;
  int                       t_bank [WPAR];
  logic [DIM_BITS-1:0]      smask;

  always_comb begin
    smask = DIM_BITS'((1 << slog) - 1);
    for (int w = 0; w < WPAR; w++) begin
      logic [DIM_BITS:0] xo;
      logic [DIM_BITS-1:0] ox, oy;
      xo = {1'b0, tag.xo0} + (DIM_BITS+1)'(w);
      ox = DIM_BITS'(xo >> slog);
      oy = tag.yo >> slog;
      keep[w] = in_valid && (xo <= {1'b0, lastcol}) &&
                ((xo[DIM_BITS-1:0] & smask) == '0) && ((tag.yo & smask) == '0);
      t_bank[w] = int'(32'(ox) % WPAR);
      t_addr[w] = AW'(out_base + AW'((tag.mg * oh + oy) * owa) + AW'(ox / DIM_BITS'(WPAR)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en   <= '0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      for (int b = 0; b < WPAR; b++) begin
        wr_en[b] <= 1'b0;
        for (int w = WPAR-1; w >= 0; w--) begin
          if (keep[w] && t_bank[w] == b) begin
            wr_en[b]   <= 1'b1;
            wr_addr[b] <= t_addr[w];
            wr_data[b] <= q[w];
          end
        end
      end
    end
  end

endmodule
