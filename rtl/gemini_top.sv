// gemini_top: the configurable output-stationary neural-network accelerator.
//
// A TPU (controller, ifmap and weights mixers, WPAR x MPAR PE array, storing stage) between
// two on-chip SRAMs: the fmaps RAM (WPAR banks of MPAR bytes) and the weights RAM (one bank of
// NPE = WPAR*MPAR bytes). The whole network, its weights, its layer descriptors and all
// intermediate feature maps live on chip; layers run one after another, each reading its
// input tensor from the fmaps RAM and writing its output tensor back into it.
//
// Use: while the accelerator is idle, load the weights RAM (descriptors and weights, see
// gemini_pkg and tpu_controller for the formats) and the input feature map through the host
// ports, pulse `start`, wait for `done`, then read the results through the host fmaps port.
// The host ports are this design's own; the source leaves off-chip communication out.
// Host fmaps reads return data one cycle after the address (bank `host_fm_bank`).
// While `busy` is high the host ports are ignored.
//
// Defaults: WPAR = 4, MPAR = 8 (one of the labelled points of the source's latency/power
// Pareto front; the source sweeps both from 2 to 32), 8-bit pixels and weights, and
// 640 KiB + 640 KiB of SRAM (about the 1.3 MB used for the VGG-like example).
module gemini_top
  import gemini_pkg::*;
#(
  parameter int WPAR         = 4,
  parameter int MPAR         = 8,
  parameter int FMAP_BYTES   = 655360,
  parameter int WEIGHT_BYTES = 655360,
  localparam int NPE  = WPAR * MPAR,
  localparam int FAW  = $clog2(FMAP_BYTES / NPE),
  localparam int WAW  = $clog2(WEIGHT_BYTES / NPE),
  localparam int BW   = (WPAR > 1) ? $clog2(WPAR) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // host access to the fmaps RAM (idle only)
  input  logic                         host_fm_we,
  input  logic                         host_fm_re,
  input  logic [BW-1:0]                host_fm_bank,
  input  logic [FAW-1:0]               host_fm_addr,
  input  logic [MPAR*FMAP_BITS-1:0]    host_fm_wdata,
  output logic [MPAR*FMAP_BITS-1:0]    host_fm_rdata,
  // host access to the weights RAM (idle only)
  input  logic                         host_w_we,
  input  logic [WAW-1:0]               host_w_addr,
  input  logic [NPE*WEIGHT_BITS-1:0]   host_w_wdata
);

  logic                                       w_re, t_w_re;
  logic [WAW-1:0]                             w_raddr, t_w_raddr;
  logic [NPE*WEIGHT_BITS-1:0]                 w_rdata;
  logic                                       fm_re, t_fm_re;
  logic [WPAR-1:0][FAW-1:0]                   fm_raddr, t_fm_raddr;
  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0]   fm_rdata;
  logic [WPAR-1:0]                            fm_we, t_fm_we;
  logic [WPAR-1:0][FAW-1:0]                   fm_waddr, t_fm_waddr;
  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0]   fm_wdata, t_fm_wdata;
  logic [BW-1:0]                              host_bank_q;

  tpu #(.WPAR(WPAR), .MPAR(MPAR), .FAW(FAW), .WAW(WAW)) u_tpu (
    .clk, .rst_n, .start, .busy, .done,
    .w_re(t_w_re), .w_raddr(t_w_raddr), .w_rdata,
    .fm_re(t_fm_re), .fm_raddr(t_fm_raddr), .fm_rdata,
    .fm_we(t_fm_we), .fm_waddr(t_fm_waddr), .fm_wdata(t_fm_wdata)
  );

  // Host / TPU port sharing.
  always_comb begin
    w_re     = t_w_re;
    w_raddr  = t_w_raddr;
    fm_re    = t_fm_re;
    fm_raddr = t_fm_raddr;
    fm_we    = t_fm_we;
    fm_waddr = t_fm_waddr;
    fm_wdata = t_fm_wdata;
    if (!busy) begin
      fm_re = host_fm_re;
      for (int b = 0; b < WPAR; b++) begin
        fm_raddr[b] = host_fm_addr;
        fm_waddr[b] = host_fm_addr;
        fm_wdata[b] = host_fm_wdata;
        fm_we[b]    = host_fm_we && (int'(host_fm_bank) == b);
      end
    end
  end

  always_ff @(posedge clk) if (host_fm_re) host_bank_q <= host_fm_bank;
  assign host_fm_rdata = fm_rdata[host_bank_q];

  fmaps_ram #(.WPAR(WPAR), .MPAR(MPAR), .FMAP_BYTES(FMAP_BYTES)) u_fmaps_ram (
    .clk, .re(fm_re), .raddr(fm_raddr), .rdata(fm_rdata),
    .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata)
  );

  weights_ram #(.NPE(NPE), .WEIGHT_BYTES(WEIGHT_BYTES)) u_weights_ram (
    .clk, .re(w_re), .raddr(w_raddr), .rdata(w_rdata),
    .we(host_w_we && !busy), .waddr(host_w_addr), .wdata(host_w_wdata)
  );

endmodule
