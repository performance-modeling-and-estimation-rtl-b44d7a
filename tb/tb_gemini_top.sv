// tb_gemini_top: end-to-end test of the accelerator on a small six-layer network.
//
// A 3 x 2 PE array (WPAR = 3, MPAR = 2, so column groups do not divide the widths and filter
// groups are partial) runs: a "same"-padded 3x3 convolution with ReLU, a 5x3 convolution with
// no padding and stride 2, a 3x3 depthwise convolution with padding, a 2x2 stride-2 max
// pooling, and two fully connected layers (the first with more outputs than PEs). The network
// is built by gemini_model_pkg, loaded through the host ports, run, and every layer's output
// tensor is read back and compared with the reference model. The run time is checked against
// the latency formula plus the controller's fixed per-layer overhead, and the test counts how
// often each mechanism occurred: zero padding, results dropped for stride and for missing
// horizontal padding, rotated (unaligned) mixer reads, partial filter groups, each layer type,
// saturation and ReLU in the quantizer.
`timescale 1ns/1ps
module tb_gemini_top;
  import gemini_pkg::*;
  import gemini_model_pkg::*;

  localparam int WPAR = 3, MPAR = 2, NPE = WPAR * MPAR;
  localparam int FMAP_BYTES = NPE * 1024, WEIGHT_BYTES = NPE * 2048;
  localparam int FDEPTH = FMAP_BYTES / NPE, WDEPTH = WEIGHT_BYTES / NPE;
  localparam int FAW = $clog2(FDEPTH), WAW = $clog2(WDEPTH);
  localparam int BW = $clog2(WPAR);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic host_fm_we = 0, host_fm_re = 0, host_w_we = 0;
  logic [BW-1:0] host_fm_bank = '0;
  logic [FAW-1:0] host_fm_addr = '0;
  logic [MPAR*8-1:0] host_fm_wdata = '0, host_fm_rdata;
  logic [WAW-1:0] host_w_addr = '0;
  logic [NPE*8-1:0] host_w_wdata = '0;

  always #5 clk = ~clk;

  gemini_top #(.WPAR(WPAR), .MPAR(MPAR), .FMAP_BYTES(FMAP_BYTES), .WEIGHT_BYTES(WEIGHT_BYTES))
    dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint busy_cycles = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && busy) busy_cycles++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_pad = 0, n_drop_stride = 0, n_drop_valid = 0, n_rot = 0, n_partial_m = 0;
  int n_conv = 0, n_dw = 0, n_pool = 0, n_fc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_tpu.pe_en) begin
      if (dut.u_tpu.col_valid != '1) n_pad++;
      if (dut.u_tpu.rot != 0 && dut.u_tpu.mix_mode != MIX_FC) n_rot++;
      case (dut.u_tpu.u_ctrl.d.ltype)
        L_CONV: n_conv++;
        L_DW:   n_dw++;
        L_POOL: n_pool++;
        L_FC:   n_fc++;
        default: ;
      endcase
    end
    if (dut.u_tpu.st_valid) begin
      for (int w = 0; w < WPAR; w++) begin
        automatic int xo = int'(dut.u_tpu.st_tag.xo0) + w;
        automatic int step = 1 << dut.u_tpu.slog;
        if (xo > int'(dut.u_tpu.lastcol)) n_drop_valid++;
        else if (xo % step != 0 || int'(dut.u_tpu.st_tag.yo) % step != 0) n_drop_stride++;
      end
      if ((int'(dut.u_tpu.st_tag.mg) + 1) * MPAR > int'(dut.u_tpu.u_ctrl.d.m) &&
          dut.u_tpu.u_ctrl.d.ltype != L_FC) n_partial_m++;
    end
  end

  gemini_net net;
  tensor_t   t[7];
  bytes_t    d[7];

  task automatic check_tensor(string name, tensor_t tt, bytes_t dd);
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
            if (bad < 5) $display("%s mismatch c=%0d y=%0d x=%0d got %0d exp %0d", name, c, y, x,
                                  $signed(word[(c % MPAR)*8 +: 8]), dd[(c * tt.h + y) * tt.w + x]);
          end
        end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("mechanism %s never happened", name); end
  endtask

  initial begin
    longint exp_cycles;
    net = new(WPAR, MPAR, FDEPTH, WDEPTH);
    t[0] = net.new_tensor(3, 7, 10);
    d[0] = net.input_tensor(t[0]);
    t[1] = net.add_conv(L_CONV, t[0], d[0], 5, 3, 3, 1, 1, 0, 1, 300, 8, d[1]);
    t[2] = net.add_conv(L_CONV, t[1], d[1], 4, 5, 3, 0, 0, 1, 0, 700, 10, d[2]);
    t[3] = net.add_conv(L_DW,   t[2], d[2], 0, 3, 3, 1, 1, 0, 0, 200, 7, d[3]);
    t[4] = net.add_conv(L_POOL, t[3], d[3], 0, 2, 2, 0, 0, 1, 0, 1, 0, d[4]);
    t[5] = net.add_fc(t[4], d[4], 11, 1, 150, 8, d[5]);
    t[6] = net.add_fc(t[5], d[5], 3, 0, 120, 8, d[6]);
    net.finish();
    exp_cycles = net.exp_steps + net.nlayers * (HDR_WORDS + 2 + QUANT_STAGES + 4) + HDR_WORDS + 2;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // load weights RAM
    for (int a = 0; a < net.whead; a++) begin
      host_w_we   <= 1'b1;
      host_w_addr <= WAW'(a);
      for (int j = 0; j < NPE; j++) host_w_wdata[j*8 +: 8] <= net.wmem[a * NPE + j];
      @(posedge clk);
    end
    host_w_we <= 1'b0;
    // load fmaps RAM (whole used region)
    for (int b = 0; b < WPAR; b++)
      for (int a = 0; a < net.fhead; a++) begin
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
    $display("run took %0d cycles, expected %0d (%0d PE-array steps)", busy_cycles, exp_cycles, net.exp_steps);
    if (busy_cycles != exp_cycles) failures++;
    for (int i = 1; i <= 6; i++) check_tensor($sformatf("layer%0d", i), t[i], d[i]);
    mech("zero padding", n_pad);
    mech("dropped for stride", n_drop_stride);
    mech("dropped, no h-padding", n_drop_valid);
    mech("rotated mixer read", n_rot);
    mech("partial filter group", n_partial_m);
    mech("convolution steps", n_conv);
    mech("depthwise steps", n_dw);
    mech("max pooling steps", n_pool);
    mech("fully connected steps", n_fc);
    mech("quantizer saturation", net.n_sat);
    mech("ReLU clamp", net.n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
