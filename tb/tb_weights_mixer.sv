// tb_weights_mixer: self-checking test of the weights mixer (WPAR = 3, MPAR = 4).
//
// Builds weight words from a table of filter taps the way the weights RAM holds them
// (convolution: tap k of filter m at byte (k mod WPAR)*MPAR + m; fully connected: weight of
// neuron p at byte p) and checks that every PE of filter row m receives tap `slot` of filter
// m, or in fully connected mode that PE (w,m) receives the weight of neuron w*MPAR + m.
`timescale 1ns/1ps
module tb_weights_mixer;
  import gemini_pkg::*;

  localparam int WPAR = 3, MPAR = 4, NPE = WPAR * MPAR;

  mix_mode_e mode;
  logic [1:0] slot;
  logic [NPE-1:0][7:0] word;
  logic [WPAR-1:0][MPAR-1:0][7:0] pe_w;

  weights_mixer #(.WPAR(WPAR), .MPAR(MPAR)) dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte tap [MPAR][WPAR];   // tap[filter][k within word]
    byte neuron [NPE];
    for (int it = 0; it < 1000; it++) begin
      automatic bit fc = $urandom_range(0, 1);
      automatic int sl = $urandom_range(0, WPAR - 1);
      foreach (tap[m, k]) tap[m][k] = byte'($urandom);
      foreach (neuron[p]) neuron[p] = byte'($urandom);
      for (int p = 0; p < NPE; p++)
        word[p] = fc ? neuron[p] : tap[p % MPAR][p / MPAR];
      mode = fc ? MIX_FC : mix_mode_e'($urandom_range(0, 1));
      slot = 2'(sl);
      #1;
      for (int w = 0; w < WPAR; w++)
        for (int m = 0; m < MPAR; m++) begin
          automatic byte e = fc ? neuron[w * MPAR + m] : tap[m][sl];
          checks++;
          if ($signed(pe_w[w][m]) != e) begin
            failures++;
            if (failures < 10) $display("fc %0d PE(%0d,%0d) got %0d exp %0d", fc, w, m,
                                        $signed(pe_w[w][m]), e);
          end
        end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
