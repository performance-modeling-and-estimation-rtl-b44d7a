// tb_gemini_vgg: full-size run of the VGG-like network on the accelerator at its default
// configuration (WPAR = 4, MPAR = 8, 640 KiB fmaps RAM, 640 KiB weights RAM).
//
// Network: 128x128x1 input; 3x3 convolutions with 4, 4 filters; 2x2 max pooling; 3x3
// convolutions with 8, 8 filters; 2x2 max pooling; 3x3 convolutions with 16, 16 filters;
// fully connected 16384->32, 32->32, 32->1. Convolutions use "same" padding and ReLU, pooling
// has stride 2. Weights and input are random; every layer's output is read back and compared
// with the reference model, and the run time with the latency formula plus the controller's
// fixed per-layer overhead.
`timescale 1ns/1ps
module tb_gemini_vgg;
  import gemini_pkg::*;
  import gemini_model_pkg::*;

  localparam int WPAR = 4, MPAR = 8, NPE = WPAR * MPAR;
  localparam int FDEPTH = 655360 / NPE, WDEPTH = 655360 / NPE;
  localparam int FAW = $clog2(FDEPTH), WAW = $clog2(WDEPTH);
  localparam int BW = $clog2(WPAR);
  // fixed controller overhead: descriptor fetch + setup + drain per layer, and the end descriptor
  localparam longint LAYER_OVH = longint'(HDR_WORDS) + 2 + longint'(QUANT_STAGES) + 4;
  localparam longint END_OVH   = longint'(HDR_WORDS) + 2;
  localparam int NL = 11;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic host_fm_we = 0, host_fm_re = 0, host_w_we = 0;
  logic [BW-1:0] host_fm_bank = '0;
  logic [FAW-1:0] host_fm_addr = '0;
  logic [MPAR*8-1:0] host_fm_wdata = '0, host_fm_rdata;
  logic [WAW-1:0] host_w_addr = '0;
  logic [NPE*8-1:0] host_w_wdata = '0;

  always #5 clk = ~clk;

  gemini_top dut (.*);

  int checks = 0, failures = 0;
  longint busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gemini_net net;
  tensor_t   t[NL+1];
  bytes_t    d[NL+1];

  function automatic int qshift(int kc);
    return 8 + $clog2(kc) / 2;
  endfunction

  task automatic check_tensor(int li, tensor_t tt, bytes_t dd);
    int bad = 0;
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
          checks++;
          if ($signed(word[(c % MPAR)*8 +: 8]) != dd[(c * tt.h + y) * tt.w + x]) begin
            failures++; bad++;
            if (bad < 5) $display("layer %0d mismatch c=%0d y=%0d x=%0d got %0d exp %0d", li, c, y, x,
                                  $signed(word[(c % MPAR)*8 +: 8]), dd[(c * tt.h + y) * tt.w + x]);
          end
        end
  endtask

  initial begin
    longint exp_cycles;
    net = new(WPAR, MPAR, FDEPTH, WDEPTH);
    t[0]  = net.new_tensor(1, 128, 128);
    d[0]  = net.input_tensor(t[0]);
    t[1]  = net.add_conv(L_CONV, t[0], d[0], 4, 3, 3, 1, 1, 0, 1, 128, qshift(9), d[1]);
    t[2]  = net.add_conv(L_CONV, t[1], d[1], 4, 3, 3, 1, 1, 0, 1, 128, qshift(36), d[2]);
    t[3]  = net.add_conv(L_POOL, t[2], d[2], 0, 2, 2, 0, 0, 1, 0, 1, 0, d[3]);
    t[4]  = net.add_conv(L_CONV, t[3], d[3], 8, 3, 3, 1, 1, 0, 1, 128, qshift(36), d[4]);
    t[5]  = net.add_conv(L_CONV, t[4], d[4], 8, 3, 3, 1, 1, 0, 1, 128, qshift(72), d[5]);
    t[6]  = net.add_conv(L_POOL, t[5], d[5], 0, 2, 2, 0, 0, 1, 0, 1, 0, d[6]);
    t[7]  = net.add_conv(L_CONV, t[6], d[6], 16, 3, 3, 1, 1, 0, 1, 128, qshift(72), d[7]);
    t[8]  = net.add_conv(L_CONV, t[7], d[7], 16, 3, 3, 1, 1, 0, 1, 128, qshift(144), d[8]);
    t[9]  = net.add_fc(t[8], d[8], 32, 1, 128, qshift(16384), d[9]);
    t[10] = net.add_fc(t[9], d[9], 32, 1, 128, qshift(32), d[10]);
    t[11] = net.add_fc(t[10], d[10], 1, 0, 128, qshift(32), d[11]);
    net.finish();
    exp_cycles = net.exp_steps + net.nlayers * LAYER_OVH + END_OVH;
    $display("weights RAM words used %0d of %0d, fmaps RAM words per bank used %0d of %0d",
             net.whead, WDEPTH, net.fhead, FDEPTH);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < net.whead; a++) begin
      host_w_we   <= 1'b1;
      host_w_addr <= WAW'(a);
      for (int j = 0; j < NPE; j++) host_w_wdata[j*8 +: 8] <= net.wmem[a * NPE + j];
      @(posedge clk);
    end
    host_w_we <= 1'b0;
    for (int b = 0; b < WPAR; b++)
      for (int a = 0; a < net.words(t[0]); a++) begin
        host_fm_we   <= 1'b1;
        host_fm_bank <= BW'(b);
        host_fm_addr <= FAW'(a);
        for (int l = 0; l < MPAR; l++) host_fm_wdata[l*8 +: 8] <= net.fmem[(b * FDEPTH + a) * MPAR + l];
        @(posedge clk);
      end
    host_fm_we <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    checks++;
    $display("VGG-like run took %0d cycles, expected %0d (%0d PE-array steps)",
             busy_cycles, exp_cycles, net.exp_steps);
    if (busy_cycles != exp_cycles) failures++;
    for (int i = 1; i <= NL; i++) begin
      automatic int nz = 0;
      foreach (d[i][j]) if (d[i][j] != 0) nz++;
      $display("layer %0d: %0dx%0dx%0d, %0d non-zero outputs", i, t[i].c, t[i].h, t[i].w, nz);
      check_tensor(i, t[i], d[i]);
    end
    $display("final output %0d, quantizer saturations %0d, ReLU clamps %0d",
             d[NL][0], net.n_sat, net.n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
