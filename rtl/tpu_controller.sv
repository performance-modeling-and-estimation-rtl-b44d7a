// tpu_controller: runs a network layer by layer on the PE array.
//
// For each layer it reads the layer's descriptor from the weights RAM (HDR_WORDS words, one
// per cycle), then issues one PE-array step per clock cycle until the layer is done, waits
// for the last results to be stored, and follows the descriptor's link to the next layer.
// A descriptor of type L_END stops the run and raises `done`.
//
// Convolution, depthwise and pooling layers use the output-stationary loop nest
//   for each group of MPAR filters (mg)
//     for each computed row yo                (H rows with "same" padding, else H-R+1)
//       for each group of WPAR columns xo0    (all W input columns, whatever stride/padding)
//         for c in channels (conv only), r < R, s < S : one step
// so a layer takes ceil(M/MPAR) * rows * ceil(W/WPAR) * (S*R*C) steps, C = 1 for depthwise
// and pooling. In every step one fmap word per bank is read, the ifmap mixer hands PE (w,m)
// the input pixel (c, yo+r-pad_top, xo0+w+s-pad_left), and filter m's tap (c,r,s) is taken
// from slot k mod WPAR of weights word k div WPAR (k = (c*R+r)*S+s) of the group's weights.
// Fully connected layers process NPE output neurons per group and take Nin steps per group,
// one input neuron broadcast and one full weights word per step: ceil(Nout/NPE)*Nin steps.
//
// Fmap layout (this design's choice): pixel (c, y, x) of a tensor at word address `base` is
// lane c mod MPAR of bank x mod WPAR, word base + ((c div MPAR)*H + y)*ceil(W/WPAR) + x div WPAR.
// A fully connected output of N neurons is stored as a tensor of min(N,MPAR) channels,
// height 1 and width ceil(N/MPAR) (neuron n = channel n mod MPAR, column n div MPAR); a fully
// connected layer reads its input in word order: lane, then column, then row, then channel
// group, stopping after Nin neurons.
//
// Timing: addresses are issued in cycle t; the RAM data and all datapath controls
// (pe_*, mixer selects) appear together in cycle t+1; the matching storing-stage tag follows
// QUANT_STAGES cycles later, aligned with the PE array's quantized results. Per layer the
// overhead beyond the steps is HDR_WORDS+2 cycles of descriptor fetch/setup and
// QUANT_STAGES+4 cycles of draining, plus HDR_WORDS+2 cycles for the final L_END descriptor.
module tpu_controller
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8,
  parameter int FAW  = 13,   // fmaps RAM word address width
  parameter int WAW  = 15,   // weights RAM word address width
  localparam int NPE = WPAR * MPAR,
  localparam int BW  = (WPAR > 1) ? $clog2(WPAR) : 1,
  localparam int LW  = (MPAR > 1) ? $clog2(MPAR) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // weights RAM read port
  output logic                      w_re,
  output logic [WAW-1:0]            w_raddr,
  input  logic [31:0]               w_hdr,      // low 32 bits of the word read
  // fmaps RAM read port
  output logic                      fm_re,
  output logic [WPAR-1:0][FAW-1:0]  fm_raddr,
  // datapath controls, valid with the RAM data
  output mix_mode_e                 mix_mode,
  output logic [BW-1:0]             rot,
  output logic [LW-1:0]             lane,
  output logic [WPAR-1:0]           col_valid,
  output logic [FMAP_BITS-1:0]      pad_value,
  output logic [BW-1:0]             wslot,
  output logic                      pe_en,
  output logic                      pe_first,
  output logic                      pe_last,
  output pe_op_e                    pe_op,
  output logic [SCALE_BITS-1:0]     scale,
  output logic [SHIFT_BITS-1:0]     shift,
  output logic                      relu,
  // storing stage
  output logic                      st_valid,
  output st_tag_t                   st_tag,
  output dim_t                      lastcol,
  output logic [1:0]                slog,
  output dim_t                      oh,
  output dim_t                      owa,
  output logic [FAW-1:0]            out_base
);

  localparam int DRAIN_CYCLES = QUANT_STAGES + 4;

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_SETUP, S_RUN, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [31:0]    fld [HDR_WORDS];
  logic [WAW-1:0] hdr_base;
  logic [5:0]     hcnt;
  logic [4:0]     dcnt;

  layer_desc_t d;
  always_comb begin
    d.ltype    = layer_type_e'(fld[F_CTRL][2:0]);
    d.relu     = fld[F_CTRL][3];
    d.pad_v    = fld[F_CTRL][4];
    d.pad_h    = fld[F_CTRL][5];
    d.slog     = fld[F_CTRL][7:6];
    d.c        = dim_t'(fld[F_C]);
    d.h        = dim_t'(fld[F_H]);
    d.w        = dim_t'(fld[F_W]);
    d.m        = dim_t'(fld[F_M]);
    d.r        = dim_t'(fld[F_R]);
    d.s        = dim_t'(fld[F_S]);
    d.in_base  = fld[F_IN_BASE];
    d.out_base = fld[F_OUT_BASE];
    d.nin      = fld[F_NIN];
    d.scale    = SCALE_BITS'(fld[F_SCALE]);
    d.shift    = SHIFT_BITS'(fld[F_SHIFT]);
    d.oh       = dim_t'(fld[F_OH]);
    d.ow       = dim_t'(fld[F_OW]);
    d.next     = fld[F_NEXT];
    d.wbase    = fld[F_WBASE];
  end

  logic is_fc, is_conv;
  assign is_fc   = (d.ltype == L_FC);
  assign is_conv = (d.ltype == L_CONV);

  // Per-layer values fixed at setup.
  dim_t rows, pad_top, pad_left, wa, lanes_last, cg_last;

  // Loop counters (convolution-like layers).
  dim_t mg, mg_m, yo, xg_w, c, cg, r, s;
  logic [LW-1:0] lane_c;
  logic [BW-1:0] slot;
  logic [WAW-1:0] waddr, mg_wbase;
  // Loop counters (fully connected layers).
  logic [31:0] fi, gn;
  dim_t gw, fx, fxw, fy, fcg;
  logic [BW-1:0] fxb;
  logic [LW-1:0] flane;

  // ---------------------------------------------------------------- step decode
  logic                      s_last, r_last, c_last, k_last, x_last, y_last, m_last;
  logic                      i_last, fl_last, fx_last, fy_last, g_last, layer_last;
  logic [WPAR-1:0][FAW-1:0]  a_addr;
  logic [WPAR-1:0]           a_valid;
  logic [BW-1:0]             a_rot;
  logic [LW-1:0]             a_lane;
  logic                      a_first;
  st_tag_t                   a_tag;

  always_comb begin
    logic signed [DIM_BITS+1:0] yi;
    logic                       row_ok;
    logic [DIM_BITS+1:0]        xs_off, a0_off;
    logic [31:0]                rowbase;
    dim_t                       cg_eff;
    int                         b0;
    logic signed [DIM_BITS+2:0] cw, p;

    cw = '0; p = '0;
    yi = '0; row_ok = 1'b0; xs_off = '0; a0_off = '0; rowbase = '0; cg_eff = '0; b0 = 0;
    s_last  = (s == d.s - 1'b1);
    r_last  = (r == d.r - 1'b1);
    c_last  = !is_conv || (c == d.c - 1'b1);
    k_last  = s_last && r_last && c_last;
    x_last  = (32'(xg_w) + WPAR >= 32'(d.w));
    y_last  = (yo == rows - 1'b1);
    m_last  = (32'(mg_m) + MPAR >= 32'(d.m));

    i_last  = (fi == d.nin - 1);
    fl_last = (32'(flane) == ((fcg == cg_last) ? 32'(lanes_last) : MPAR) - 1);
    fx_last = (fx == d.w - 1'b1);
    fy_last = (fy == d.h - 1'b1);
    g_last  = (gn + NPE >= 32'(d.m));
    layer_last = is_fc ? (i_last && g_last) : (k_last && x_last && y_last && m_last);

    a_addr  = '0;
    a_valid = '0;
    if (is_fc) begin
      rowbase = d.in_base + (32'(fcg) * 32'(d.h) + 32'(fy)) * 32'(wa);
      for (int b = 0; b < WPAR; b++) a_addr[b] = FAW'(rowbase + 32'(fxw));
      a_valid = '1;
      a_rot   = fxb;
      a_lane  = flane;
      a_first = (fi == 0);
      a_tag   = '{yo: '0, xo0: gw, mg: '0};
    end else begin
      cg_eff  = is_conv ? cg : mg;
      yi      = $signed({2'b00, yo}) + $signed({2'b00, r}) - $signed({2'b00, pad_top});
      row_ok  = (yi >= 0) && (yi < $signed({2'b00, d.h}));
      xs_off  = (DIM_BITS+2)'(xg_w) + (DIM_BITS+2)'(s) + (DIM_BITS+2)'(PAD_OFFSET * WPAR)
                - (DIM_BITS+2)'(pad_left);
      a0_off  = xs_off / (DIM_BITS+2)'(WPAR);
      b0      = int'(32'(xs_off) % WPAR);
      rowbase = d.in_base;
      if (row_ok) rowbase = d.in_base + (32'(cg_eff) * 32'(d.h) + 32'(yi)) * 32'(wa);
      for (int b = 0; b < WPAR; b++) begin
        cw = (DIM_BITS+3)'(32'($signed({1'b0, a0_off})) - PAD_OFFSET + ((b < b0) ? 1 : 0));
        a_addr[b] = (cw >= 0) ? FAW'(rowbase + 32'(cw)) : FAW'(rowbase);
      end
      for (int w = 0; w < WPAR; w++) begin
        p = (DIM_BITS+3)'(32'($signed({1'b0, xs_off})) - PAD_OFFSET * WPAR + w);
        a_valid[w] = row_ok && (p >= 0) && (p < $signed({3'b000, d.w}));
      end
      a_rot   = BW'(b0);
      a_lane  = lane_c;
      a_first = (s == 0) && (r == 0) && (c == 0);
      a_tag   = '{yo: yo, xo0: xg_w, mg: mg};
    end
  end

  // ---------------------------------------------------------------- state machine
  logic run_step;
  assign run_step = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      hdr_base <= '0; hcnt <= '0; dcnt <= '0;
      for (int i = 0; i < HDR_WORDS; i++) fld[i] <= '0;
      rows <= '0; pad_top <= '0; pad_left <= '0; wa <= '0; lanes_last <= '0; cg_last <= '0;
      mg <= '0; mg_m <= '0; yo <= '0; xg_w <= '0; c <= '0; cg <= '0; r <= '0; s <= '0;
      lane_c <= '0; slot <= '0; waddr <= '0; mg_wbase <= '0;
      fi <= '0; gn <= '0; gw <= '0; fx <= '0; fxw <= '0; fxb <= '0; fy <= '0; fcg <= '0;
      flane <= '0;
      lastcol <= '0; slog <= '0; oh <= '0; owa <= '0; out_base <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state    <= S_HDR;
            hdr_base <= '0;
            hcnt     <= '0;
          end
        end
        S_HDR: begin
          hcnt <= hcnt + 1'b1;
          if (hcnt != 0) fld[hcnt-1] <= w_hdr;
          if (32'(hcnt) == HDR_WORDS) state <= S_SETUP;
        end
        S_SETUP: begin
          if (d.ltype == L_END) begin
            state <= S_DONE;
          end else begin
            state    <= S_RUN;
            rows     <= d.pad_v ? d.h : dim_t'(d.h - d.r + 1'b1);
            pad_top  <= d.pad_v ? ((d.r - 1'b1) >> 1) : '0;
            pad_left <= d.pad_h ? ((d.s - 1'b1) >> 1) : '0;
            wa       <= dim_t'((32'(d.w) + WPAR - 1) / WPAR);
            cg_last  <= dim_t'((32'(d.c) - 1) / MPAR);
            lanes_last <= dim_t'(32'(d.c) - ((32'(d.c) - 1) / MPAR) * MPAR);
            lastcol  <= is_fc ? dim_t'(d.ow - 1'b1) : (d.pad_h ? dim_t'(d.w - 1'b1)
                                                            : dim_t'(d.w - d.s));
            slog     <= is_fc ? 2'd0 : d.slog;
            oh       <= d.oh;
            owa      <= dim_t'((32'(d.ow) + WPAR - 1) / WPAR);
            out_base <= FAW'(d.out_base);
            mg <= '0; mg_m <= '0; yo <= '0; xg_w <= '0; c <= '0; cg <= '0; r <= '0; s <= '0;
            lane_c <= '0; slot <= '0;
            waddr <= WAW'(d.wbase); mg_wbase <= WAW'(d.wbase);
            fi <= '0; gn <= '0; gw <= '0; fx <= '0; fxw <= '0; fxb <= '0; fy <= '0;
            fcg <= '0; flane <= '0;
          end
        end
        S_RUN: begin
          if (is_fc) begin
            waddr <= waddr + 1'b1;
            if (i_last) begin
              fi <= '0; fx <= '0; fxw <= '0; fxb <= '0; fy <= '0; fcg <= '0; flane <= '0;
              gn <= gn + NPE;
              gw <= gw + dim_t'(WPAR);
            end else begin
              fi <= fi + 1;
              if (!fl_last) flane <= flane + 1'b1;
              else begin
                flane <= '0;
                if (!fx_last) begin
                  fx <= fx + 1'b1;
                  if (32'(fxb) == WPAR - 1) begin fxb <= '0; fxw <= fxw + 1'b1; end
                  else fxb <= fxb + 1'b1;
                end else begin
                  fx <= '0; fxb <= '0; fxw <= '0;
                  if (!fy_last) fy <= fy + 1'b1;
                  else begin fy <= '0; fcg <= fcg + 1'b1; end
                end
              end
            end
          end else begin
            // filter taps
            s <= s_last ? '0 : s + 1'b1;
            if (s_last) r <= r_last ? '0 : r + 1'b1;
            if (s_last && r_last) begin
              if (c_last) begin
                c <= '0; cg <= '0; lane_c <= '0;
              end else begin
                c <= c + 1'b1;
                if (32'(lane_c) == MPAR - 1) begin lane_c <= '0; cg <= cg + 1'b1; end
                else lane_c <= lane_c + 1'b1;
              end
            end
            // weights word / slot
            if (k_last) begin
              slot <= '0;
              if (x_last && y_last) begin
                waddr    <= waddr + 1'b1;
                mg_wbase <= waddr + 1'b1;
              end else begin
                waddr <= mg_wbase;
              end
            end else if (32'(slot) == WPAR - 1) begin
              slot  <= '0;
              waddr <= waddr + 1'b1;
            end else begin
              slot <= slot + 1'b1;
            end
            // output position
            if (k_last) begin
              xg_w <= x_last ? '0 : xg_w + dim_t'(WPAR);
              if (x_last) yo <= y_last ? '0 : yo + 1'b1;
              if (x_last && y_last) begin
                mg   <= mg + 1'b1;
                mg_m <= mg_m + dim_t'(MPAR);
              end
            end
          end
          if (layer_last) begin
            state <= S_DRAIN;
            dcnt  <= '0;
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (32'(dcnt) == DRAIN_CYCLES - 1) begin
            state    <= S_HDR;
            hcnt     <= '0;
            hdr_base <= WAW'(d.next);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  // RAM read requests (stage A).
  always_comb begin
    w_re     = 1'b0;
    w_raddr  = waddr;
    fm_re    = run_step;
    fm_raddr = a_addr;
    if (state == S_HDR && 32'(hcnt) < HDR_WORDS) begin
      w_re    = 1'b1;
      w_raddr = hdr_base + WAW'(hcnt);
    end else if (run_step && d.ltype != L_POOL) begin
      w_re = 1'b1;
    end
  end

  // Datapath controls (stage B), aligned with the RAM outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_en <= 1'b0; pe_first <= 1'b0; pe_last <= 1'b0;
      rot <= '0; lane <= '0; col_valid <= '0; wslot <= '0;
    end else begin
      pe_en     <= run_step;
      pe_first  <= a_first;
      pe_last   <= run_step && (is_fc ? i_last : k_last);
      rot       <= a_rot;
      lane      <= a_lane;
      col_valid <= a_valid;
      wslot     <= slot;
    end
  end

  st_tag_t tag_b;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_b <= '0;
    else        tag_b <= a_tag;
  end

  always_comb begin
    case (d.ltype)
      L_FC:          mix_mode = MIX_FC;
      L_DW, L_POOL:  mix_mode = MIX_DW;
      default:       mix_mode = MIX_CONV;
    endcase
    pe_op     = (d.ltype == L_POOL) ? PE_MAX : PE_MAC;
    pad_value = (d.ltype == L_POOL) ? FMAP_BITS'(1 << (FMAP_BITS-1)) : '0;
    scale     = d.scale;
    shift     = d.shift;
    relu      = d.relu;
  end

  // Tag delay line matching the quantization stage.
  logic    [QUANT_STAGES-1:0] tv;
  st_tag_t                    tq [QUANT_STAGES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tv <= '0;
      for (int i = 0; i < QUANT_STAGES; i++) tq[i] <= '0;
    end else begin
      tv[0] <= pe_en && pe_last;
      tq[0] <= tag_b;
      for (int i = 1; i < QUANT_STAGES; i++) begin
        tv[i] <= tv[i-1];
        tq[i] <= tq[i-1];
      end
    end
  end
  assign st_valid = tv[QUANT_STAGES-1];
  assign st_tag   = tq[QUANT_STAGES-1];

endmodule
