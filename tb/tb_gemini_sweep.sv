// tb_gemini_sweep: single-layer networks on the accelerator at its default configuration
// (WPAR = 4, MPAR = 8, 640 KiB fmaps RAM, 640 KiB weights RAM).
//
// Each case is a network of one layer. The cases cover the parameters that matter for
// single-layer characterisation:
//   * convolutions: number of filters, filter size, 2D ifmap size (16 to 1024 pixels),
//     stride and padding;
//   * depthwise and pooling layers: ifmap size, stride and padding;
//   * fully connected layers: Nin from 25 to 500, and Nout from 1 to beyond one PE-array group.
// For every case, the descriptor, weights and random input are loaded through the host ports
// and the run is started. The output tensor is then compared with the reference model. The
// busy time is compared with the latency formula plus the fixed overhead: 27 cycles per layer
// and 18 cycles for the end descriptor.
`timescale 1ns/1ps
module tb_gemini_sweep;
  import gemini_pkg::*;
  import gemini_model_pkg::*;

  localparam int WPAR = 4, MPAR = 8, NPE = WPAR * MPAR;
  localparam int FDEPTH = 655360 / NPE, WDEPTH = 655360 / NPE;
  localparam int FAW = $clog2(FDEPTH), WAW = $clog2(WDEPTH);
  localparam int BW = $clog2(WPAR);
  // fixed controller overhead: descriptor fetch + setup + drain per layer, and the end descriptor
  localparam longint LAYER_OVH = longint'(HDR_WORDS) + 2 + longint'(QUANT_STAGES) + 4;
  localparam longint END_OVH   = longint'(HDR_WORDS) + 2;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic host_fm_we = 0, host_fm_re = 0, host_w_we = 0;
  logic [BW-1:0] host_fm_bank = '0;
  logic [FAW-1:0] host_fm_addr = '0;
  logic [MPAR*8-1:0] host_fm_wdata = '0, host_fm_rdata;
  logic [WAW-1:0] host_w_addr = '0;
  logic [NPE*8-1:0] host_w_wdata = '0;

  always #5 clk = ~clk;

  gemini_top dut (.*);

  int checks = 0, failures = 0, cases = 0;
  longint busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qshift(int kc);
    return 8 + $clog2(kc) / 2;
  endfunction

  task automatic check_tensor(gemini_net net, string name, tensor_t tt, bytes_t dd);
    int bad = 0;
    byte got;
    for (int c = 0; c < tt.c; c++)
      for (int y = 0; y < tt.h; y++)
        for (int x = 0; x < tt.w; x++) begin
          logic [MPAR*8-1:0] word;
          host_fm_re   <= 1'b1;
          host_fm_bank <= BW'(net.fm_bank(tt, x));
          host_fm_addr <= FAW'(net.fm_addr(tt, c, y, x));
          @(posedge clk);
          host_fm_re <= 1'b0;
          @(posedge clk);
          #1 word = host_fm_rdata;
          got = byte'(word[(c % MPAR)*8 +: 8]);
          checks++;
          if (got != dd[(c * tt.h + y) * tt.w + x]) begin
            failures++; bad++;
            if (bad < 4) $display("%s: mismatch c=%0d y=%0d x=%0d got %0d exp %0d", name, c, y, x,
                                  got, dd[(c * tt.h + y) * tt.w + x]);
          end
        end
  endtask

  // Load the images of a finished network, run it, and check time and output.
  task automatic run_net(gemini_net net, string name, tensor_t tin, tensor_t tout, bytes_t dout);
    longint exp_cycles = net.exp_steps + net.nlayers * LAYER_OVH + END_OVH;
    for (int a = 0; a < net.whead; a++) begin
      host_w_we   <= 1'b1;
      host_w_addr <= WAW'(a);
      for (int j = 0; j < NPE; j++) host_w_wdata[j*8 +: 8] <= net.wmem[a * NPE + j];
      @(posedge clk);
    end
    host_w_we <= 1'b0;
    for (int b = 0; b < WPAR; b++)
      for (int a = tin.base; a < tin.base + net.words(tin); a++) begin
        host_fm_we   <= 1'b1;
        host_fm_bank <= BW'(b);
        host_fm_addr <= FAW'(a);
        for (int l = 0; l < MPAR; l++) host_fm_wdata[l*8 +: 8] <= net.fmem[(b * FDEPTH + a) * MPAR + l];
        @(posedge clk);
      end
    host_fm_we <= 1'b0;
    @(posedge clk);
    busy_cycles = 0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    checks++;
    cases++;
    if (busy_cycles != exp_cycles) begin
      failures++;
      $display("%s: took %0d cycles, expected %0d", name, busy_cycles, exp_cycles);
    end
    check_tensor(net, name, tout, dout);
    $display("%-40s %0dx%0dx%0d -> %0dx%0dx%0d, %0d cycles (%0d steps)", name, tin.c, tin.h, tin.w,
             tout.c, tout.h, tout.w, busy_cycles, net.exp_steps);
  endtask

  // One convolution-like layer: type, input C x H x W, filters (conv only), R x S, padding,
  // log2 of the stride.
  task automatic conv_case(string name, layer_type_e lt, int c, int h, int w, int m, int r, int s,
                           bit padv, bit padh, int slog);
    gemini_net net = new(WPAR, MPAR, FDEPTH, WDEPTH);
    tensor_t ti, to;
    bytes_t di, dq;
    bit pool = (lt == L_POOL);
    ti = net.new_tensor(c, h, w);
    di = net.input_tensor(ti);
    to = net.add_conv(lt, ti, di, m, r, s, padv, padh, slog, !pool,
                      pool ? 1 : 128, pool ? 0 : qshift(r * s * ((lt == L_CONV) ? c : 1)), dq);
    net.finish();
    run_net(net, name, ti, to, dq);
  endtask

  task automatic fc_case(string name, int c, int h, int w, int nout);
    gemini_net net = new(WPAR, MPAR, FDEPTH, WDEPTH);
    tensor_t ti, to;
    bytes_t di, dq;
    ti = net.new_tensor(c, h, w);
    di = net.input_tensor(ti);
    to = net.add_fc(ti, di, nout, 0, 128, qshift(c * h * w), dq);
    net.finish();
    run_net(net, name, ti, to, dq);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // 2D ifmap size sweep, 16 to 1024 pixels
    conv_case("conv ifmap 4x4",            L_CONV, 3,  4,  4,  8, 3, 3, 1, 1, 0);
    conv_case("conv ifmap 6x6",            L_CONV, 3,  6,  6,  8, 3, 3, 1, 1, 0);
    conv_case("conv ifmap 9x9",            L_CONV, 3,  9,  9,  8, 3, 3, 1, 1, 0);
    conv_case("conv ifmap 16x16",          L_CONV, 3, 16, 16,  8, 3, 3, 1, 1, 0);
    conv_case("conv ifmap 32x32",          L_CONV, 3, 32, 32,  8, 3, 3, 1, 1, 0);
    // number of filters
    conv_case("conv 1 filter",             L_CONV, 4, 10, 10,  1, 3, 3, 1, 1, 0);
    conv_case("conv 5 filters",            L_CONV, 4, 10, 10,  5, 3, 3, 1, 1, 0);
    conv_case("conv 20 filters",           L_CONV, 4, 10, 10, 20, 3, 3, 1, 1, 0);
    conv_case("conv 32 filters, 12 ch",    L_CONV, 12, 8,  8, 32, 3, 3, 1, 1, 0);
    // filter sizes
    conv_case("conv 1x1",                  L_CONV, 8, 12, 12,  8, 1, 1, 0, 0, 0);
    conv_case("conv 5x5 same",             L_CONV, 2, 12, 12,  8, 5, 5, 1, 1, 0);
    conv_case("conv 7x7 valid",            L_CONV, 1, 14, 14,  4, 7, 7, 0, 0, 0);
    conv_case("conv 3x1",                  L_CONV, 3, 11,  9,  6, 3, 1, 1, 1, 0);
    // strides and padding
    conv_case("conv stride 2 same",        L_CONV, 3, 16, 16,  8, 3, 3, 1, 1, 1);
    conv_case("conv stride 2 valid",       L_CONV, 3, 15, 15,  8, 3, 3, 0, 0, 1);
    conv_case("conv stride 4 same",        L_CONV, 2, 17, 17,  8, 3, 3, 1, 1, 2);
    conv_case("conv valid rows, same cols", L_CONV, 3, 10, 10, 8, 3, 3, 0, 1, 0);
    conv_case("conv stride 8 same",        L_CONV, 2, 20, 19,  8, 3, 3, 1, 1, 3);
    conv_case("maxpool 3x3 stride 8 valid", L_POOL, 4, 19, 20, 0, 3, 3, 0, 0, 3);
    // depthwise and pooling
    conv_case("depthwise 3x3 same 6x6",    L_DW,   8,  6,  6,  0, 3, 3, 1, 1, 0);
    conv_case("depthwise 3x3 stride 2",    L_DW,  12, 16, 16,  0, 3, 3, 1, 1, 1);
    conv_case("depthwise 3x3 valid 32x32", L_DW,   4, 32, 32,  0, 3, 3, 0, 0, 0);
    conv_case("maxpool 2x2 stride 2",      L_POOL, 8, 16, 16,  0, 2, 2, 0, 0, 1);
    conv_case("maxpool 3x3 stride 2 same", L_POOL, 5, 15, 15,  0, 3, 3, 1, 1, 1);
    conv_case("maxpool 3x3 stride 1 same", L_POOL, 3,  4,  4,  0, 3, 3, 1, 1, 0);
    // fully connected, Nin from 25 to 500
    fc_case("fc Nin 25 Nout 1",     1,  5,  5,  1);
    fc_case("fc Nin 100 Nout 10",   4,  5,  5, 10);
    fc_case("fc Nin 250 Nout 32",  10,  5,  5, 32);
    fc_case("fc Nin 500 Nout 33",  20,  5,  5, 33);
    fc_case("fc Nin 500 Nout 64",   1,  1, 500, 64);
    $display("%0d single-layer networks run", cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
