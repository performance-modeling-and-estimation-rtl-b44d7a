// tb_tpu: self-checking test of the TPU (controller, mixers, PE array, storing stage) with
// testbench models of the two SRAMs (WPAR = 2, MPAR = 3).
//
// Runs a four-layer network (padded 3x3 convolution with ReLU, 2x2 stride-2 max pooling,
// 1x3 depthwise convolution without padding, fully connected layer), then compares every
// output tensor in the modelled fmaps RAM with the reference model and the run time with the
// latency formula plus the fixed per-layer overhead.
`timescale 1ns/1ps
module tb_tpu;
  import gemini_pkg::*;
  import gemini_model_pkg::*;

  localparam int WPAR = 2, MPAR = 3, NPE = WPAR * MPAR;
  localparam int FAW = 9, WAW = 10, FDEPTH = 1 << FAW, WDEPTH = 1 << WAW;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic w_re, fm_re;
  logic [WAW-1:0] w_raddr;
  logic [NPE*8-1:0] w_rdata;
  logic [WPAR-1:0][FAW-1:0] fm_raddr, fm_waddr;
  logic [WPAR-1:0][MPAR-1:0][7:0] fm_rdata, fm_wdata;
  logic [WPAR-1:0] fm_we;

  always #5 clk = ~clk;

  tpu #(.WPAR(WPAR), .MPAR(MPAR), .FAW(FAW), .WAW(WAW)) dut (.*);

  // SRAM models
  logic [NPE*8-1:0]  wmem [WDEPTH];
  logic [MPAR*8-1:0] fmem [WPAR][FDEPTH];
  always @(posedge clk) begin
    if (w_re) w_rdata <= wmem[w_raddr];
    for (int b = 0; b < WPAR; b++) begin
      if (fm_re) fm_rdata[b] <= fmem[b][fm_raddr[b]];
      if (fm_we[b]) fmem[b][fm_waddr[b]] <= fm_wdata[b];
    end
  end

  int checks = 0, failures = 0;
  longint busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gemini_net net;
  tensor_t t[5];
  bytes_t  d[5];

  initial begin
    longint exp_cycles;
    net = new(WPAR, MPAR, FDEPTH, WDEPTH);
    t[0] = net.new_tensor(4, 6, 7);
    d[0] = net.input_tensor(t[0]);
    t[1] = net.add_conv(L_CONV, t[0], d[0], 5, 3, 3, 1, 1, 0, 1, 100, 8, d[1]);
    t[2] = net.add_conv(L_POOL, t[1], d[1], 0, 2, 2, 0, 0, 1, 0, 1, 0, d[2]);
    t[3] = net.add_conv(L_DW,   t[2], d[2], 0, 1, 3, 0, 0, 0, 0, 90, 5, d[3]);
    t[4] = net.add_fc(t[3], d[3], 4, 0, 60, 8, d[4]);
    net.finish();
    exp_cycles = net.exp_steps + net.nlayers * (HDR_WORDS + 2 + QUANT_STAGES + 4) + HDR_WORDS + 2;
    for (int a = 0; a < WDEPTH; a++)
      for (int j = 0; j < NPE; j++) wmem[a][j*8 +: 8] = net.wmem[a * NPE + j];
    for (int b = 0; b < WPAR; b++)
      for (int a = 0; a < FDEPTH; a++)
        for (int l = 0; l < MPAR; l++) fmem[b][a][l*8 +: 8] = net.fmem[(b * FDEPTH + a) * MPAR + l];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    checks++;
    $display("run %0d cycles, expected %0d", busy_cycles, exp_cycles);
    if (busy_cycles != exp_cycles) failures++;
    for (int i = 1; i <= 4; i++)
      for (int c = 0; c < t[i].c; c++)
        for (int y = 0; y < t[i].h; y++)
          for (int x = 0; x < t[i].w; x++) begin
            automatic byte got = byte'(fmem[net.fm_bank(t[i], x)][net.fm_addr(t[i], c, y, x)][(c % MPAR)*8 +: 8]);
            checks++;
            if (got != d[i][(c * t[i].h + y) * t[i].w + x]) begin
              failures++;
              if (failures < 10) $display("layer %0d c%0d y%0d x%0d got %0d exp %0d", i, c, y, x,
                                          got, d[i][(c * t[i].h + y) * t[i].w + x]);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
