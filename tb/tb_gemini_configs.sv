// tb_gemini_configs: the same six-layer network on several (WPAR, MPAR) configurations.
//
// WPAR and MPAR size the whole accelerator. Each of the configurations below gets its own
// gemini_config_run instance, and all run side by side. The set covers both knobs from 2 to
// 32, and includes arrays that are narrower and wider than the 10-pixel input rows, and
// filter groups larger than the layers' filter counts. Every instance checks all layer
// outputs and its exact cycle count; the testbench adds up their results.
`timescale 1ns/1ps
module tb_gemini_configs;
  localparam int N = 8;

  logic clk = 0, go = 0;
  always #5 clk = ~clk;

  logic [N-1:0] fin;
  int chk[N], fail[N];

  gemini_config_run #(.WPAR(2),  .MPAR(2))  u_c0 (.clk, .go, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  gemini_config_run #(.WPAR(2),  .MPAR(5))  u_c1 (.clk, .go, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  gemini_config_run #(.WPAR(5),  .MPAR(3))  u_c2 (.clk, .go, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  gemini_config_run #(.WPAR(8),  .MPAR(4))  u_c3 (.clk, .go, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  gemini_config_run #(.WPAR(7),  .MPAR(6))  u_c4 (.clk, .go, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));
  gemini_config_run #(.WPAR(16), .MPAR(2))  u_c5 (.clk, .go, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]));
  gemini_config_run #(.WPAR(2),  .MPAR(32)) u_c6 (.clk, .go, .finished(fin[6]), .checks(chk[6]), .failures(fail[6]));
  gemini_config_run #(.WPAR(32), .MPAR(3))  u_c7 (.clk, .go, .finished(fin[7]), .checks(chk[7]), .failures(fail[7]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    go <= 1'b1;
    wait (&fin);
    for (int i = 0; i < N; i++) begin
      checks   += chk[i];
      failures += fail[i];
      checks++;
      if (chk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
