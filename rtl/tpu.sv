// tpu: the tensor processing unit, i.e. everything of the accelerator except its two SRAMs.
//
// Data flow per clock cycle (all stages overlap):
//   controller --addresses--> fmaps RAM banks, weights RAM
//   RAM words --ifmap mixer / weights mixer--> PE array (one MAC or max per PE)
//   PE array --5-cycle quantization--> storing stage --> fmaps RAM write ports
// The ifmap mixer, weights mixer, PE array and storing stage are the four blocks of the
// accelerator's block diagram; the controller that sequences them is this design's explicit
// rendering of the schedule the source describes (its TPU came from high-level synthesis).
// The fmaps RAM is read and written in the same cycle (reads of the layer's input, writes of
// its output), so it needs a read and a write port per bank.
//
// Timing: see tpu_controller. One PE-array step per clock cycle while a layer runs.
module tpu
  import gemini_pkg::*;
#(
  parameter int WPAR = 4,
  parameter int MPAR = 8,
  parameter int FAW  = 13,
  parameter int WAW  = 15,
  localparam int NPE = WPAR * MPAR
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  output logic                                   busy,
  output logic                                   done,
  // weights RAM
  output logic                                   w_re,
  output logic [WAW-1:0]                         w_raddr,
  input  logic [NPE*WEIGHT_BITS-1:0]             w_rdata,
  // fmaps RAM
  output logic                                   fm_re,
  output logic [WPAR-1:0][FAW-1:0]               fm_raddr,
  input  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] fm_rdata,
  output logic [WPAR-1:0]                        fm_we,
  output logic [WPAR-1:0][FAW-1:0]               fm_waddr,
  output logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] fm_wdata
);

  localparam int BW = (WPAR > 1) ? $clog2(WPAR) : 1;
  localparam int LW = (MPAR > 1) ? $clog2(MPAR) : 1;

  mix_mode_e             mix_mode;
  logic [BW-1:0]         rot, wslot;
  logic [LW-1:0]         lane;
  logic [WPAR-1:0]       col_valid;
  logic [FMAP_BITS-1:0]  pad_value;
  logic                  pe_en, pe_first, pe_last, relu;
  pe_op_e                pe_op;
  logic [SCALE_BITS-1:0] scale;
  logic [SHIFT_BITS-1:0] shift;
  logic                  st_valid;
  st_tag_t               st_tag;
  dim_t                  lastcol, oh, owa;
  logic [1:0]            slog;
  logic [FAW-1:0]        out_base;

  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0]   pe_x, pe_q;
  logic [WPAR-1:0][MPAR-1:0][WEIGHT_BITS-1:0] pe_w;
  logic                                       q_valid;

  tpu_controller #(.WPAR(WPAR), .MPAR(MPAR), .FAW(FAW), .WAW(WAW)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .w_re, .w_raddr, .w_hdr(w_rdata[31:0]),
    .fm_re, .fm_raddr,
    .mix_mode, .rot, .lane, .col_valid, .pad_value, .wslot,
    .pe_en, .pe_first, .pe_last, .pe_op, .scale, .shift, .relu,
    .st_valid, .st_tag, .lastcol, .slog, .oh, .owa, .out_base
  );

  ifmap_mixer #(.WPAR(WPAR), .MPAR(MPAR)) u_ifmap_mixer (
    .mode(mix_mode), .bank_data(fm_rdata), .rot, .lane, .col_valid, .pad_value, .pe_x
  );

  weights_mixer #(.WPAR(WPAR), .MPAR(MPAR)) u_weights_mixer (
    .mode(mix_mode), .slot(wslot), .word(w_rdata), .pe_w
  );

  pe_array #(.WPAR(WPAR), .MPAR(MPAR)) u_pe_array (
    .clk, .rst_n, .en(pe_en), .first(pe_first), .last(pe_last), .op(pe_op),
    .x(pe_x), .w(pe_w), .scale, .shift, .relu, .q(pe_q), .q_valid
  );

  storing_stage #(.WPAR(WPAR), .MPAR(MPAR), .AW(FAW)) u_storing_stage (
    .clk, .rst_n, .in_valid(st_valid), .q(pe_q), .tag(st_tag),
    .lastcol, .slog, .oh, .owa, .out_base,
    .wr_en(fm_we), .wr_addr(fm_waddr), .wr_data(fm_wdata)
  );

  // The controller's tag pipeline and the PEs' quantization pipeline must stay in step.
  a_tag_aligned: assert property (@(posedge clk) disable iff (!rst_n) st_valid == q_valid)
    else $error("storing-stage tag out of step with PE results");

endmodule
