// gemini_config_run: runs one small mixed network on one accelerator configuration.
//
// Testbench helper for tb_gemini_configs. It instantiates gemini_top with the given WPAR and
// MPAR, builds a six-layer network with gemini_model_pkg, and loads it through the host ports.
// The layers are a "same" 3x3 convolution with ReLU, a valid 5x3 convolution with stride 2,
// a 3x3 depthwise convolution, a 2x2 stride-2 max pooling, and two fully connected layers.
// It then runs the network, reads back every layer's output and compares it with the
// reference model. It also checks the busy time against the latency formula plus the fixed
// overhead. The run starts when `go` is high after reset. `finished` rises when the
// checks are done; `checks` and `failures` then hold the counts.
`timescale 1ns/1ps
module gemini_config_run
  import gemini_pkg::*;
  import gemini_model_pkg::*;
#(
  parameter int WPAR = 2,
  parameter int MPAR = 2
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int NPE = WPAR * MPAR;
  localparam int FMAP_BYTES = NPE * 1024, WEIGHT_BYTES = NPE * 2048;
  localparam int FDEPTH = FMAP_BYTES / NPE, WDEPTH = WEIGHT_BYTES / NPE;
  localparam int FAW = $clog2(FDEPTH), WAW = $clog2(WDEPTH);
  localparam int BW = (WPAR > 1) ? $clog2(WPAR) : 1;
  localparam longint LAYER_OVH = longint'(HDR_WORDS) + 2 + longint'(QUANT_STAGES) + 4;
  localparam longint END_OVH   = longint'(HDR_WORDS) + 2;

  logic rst_n = 0, start = 0, busy, done;
  logic host_fm_we = 0, host_fm_re = 0, host_w_we = 0;
  logic [BW-1:0] host_fm_bank = '0;
  logic [FAW-1:0] host_fm_addr = '0;
  logic [MPAR*8-1:0] host_fm_wdata = '0, host_fm_rdata;
  logic [WAW-1:0] host_w_addr = '0;
  logic [NPE*8-1:0] host_w_wdata = '0;

  gemini_top #(.WPAR(WPAR), .MPAR(MPAR), .FMAP_BYTES(FMAP_BYTES), .WEIGHT_BYTES(WEIGHT_BYTES))
    dut (.*);

  longint busy_cycles;
  initial busy_cycles = 0;
  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  gemini_net net;
  tensor_t   t[7];
  bytes_t    d[7];

  task automatic check_tensor(string name, tensor_t tt, bytes_t dd);
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
            if (bad < 4) $display("(%0d,%0d) %s mismatch c=%0d y=%0d x=%0d got %0d exp %0d",
                                  WPAR, MPAR, name, c, y, x, got, dd[(c * tt.h + y) * tt.w + x]);
          end
        end
  endtask

  initial begin
    longint exp_cycles;
    finished = 0;
    checks   = 0;
    failures = 0;
    net  = new(WPAR, MPAR, FDEPTH, WDEPTH);
    t[0] = net.new_tensor(3, 7, 10);
    d[0] = net.input_tensor(t[0]);
    t[1] = net.add_conv(L_CONV, t[0], d[0], 5, 3, 3, 1, 1, 0, 1, 300, 8, d[1]);
    t[2] = net.add_conv(L_CONV, t[1], d[1], 4, 5, 3, 0, 0, 1, 0, 700, 10, d[2]);
    t[3] = net.add_conv(L_DW,   t[2], d[2], 0, 3, 3, 1, 1, 0, 0, 200, 7, d[3]);
    t[4] = net.add_conv(L_POOL, t[3], d[3], 0, 2, 2, 0, 0, 1, 0, 1, 0, d[4]);
    t[5] = net.add_fc(t[4], d[4], 11, 1, 150, 8, d[5]);
    t[6] = net.add_fc(t[5], d[5], 3, 0, 120, 8, d[6]);
    net.finish();
    exp_cycles = net.exp_steps + net.nlayers * LAYER_OVH + END_OVH;

    while (!go) @(posedge clk);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < net.whead; a++) begin
      logic [NPE*8-1:0] wword;
      for (int j = 0; j < NPE; j++) wword[j*8 +: 8] = net.wmem[a * NPE + j];
      host_w_we    <= 1'b1;
      host_w_addr  <= WAW'(a);
      host_w_wdata <= wword;
      @(posedge clk);
    end
    host_w_we <= 1'b0;
    for (int b = 0; b < WPAR; b++)
      for (int a = 0; a < net.words(t[0]); a++) begin
        logic [MPAR*8-1:0] fword;
        host_fm_we   <= 1'b1;
        host_fm_bank <= BW'(b);
        host_fm_addr <= FAW'(a);
        for (int l = 0; l < MPAR; l++) fword[l*8 +: 8] = net.fmem[(b * FDEPTH + a) * MPAR + l];
        host_fm_wdata <= fword;
        @(posedge clk);
      end
    host_fm_we <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++;
      $display("(%0d,%0d) run took %0d cycles, expected %0d", WPAR, MPAR, busy_cycles, exp_cycles);
    end
    for (int i = 1; i <= 6; i++) check_tensor($sformatf("layer%0d", i), t[i], d[i]);
    $display("WPAR=%0d MPAR=%0d: %0d cycles (%0d PE-array steps), %0d checks, %0d failures",
             WPAR, MPAR, busy_cycles, net.exp_steps, checks, failures);
    finished = 1;
  end
endmodule
