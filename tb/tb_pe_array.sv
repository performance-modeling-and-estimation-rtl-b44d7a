// tb_pe_array: self-checking test of the WPAR x MPAR PE array (3 x 2 here).
//
// Every PE gets its own random operand stream for a series of output pixels; the test checks
// that each PE (w,m) returns the quantized sum of its own products, all PEs together, five
// cycles after the last operand, and that the array's q_valid is raised exactly then.
`timescale 1ns/1ps
module tb_pe_array;
  import gemini_pkg::*;

  localparam int WPAR = 3, MPAR = 2;

  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0, relu = 0;
  pe_op_e op = PE_MAC;
  logic [WPAR-1:0][MPAR-1:0][7:0] x = '0, w = '0, q;
  logic [15:0] scale = 16'd3;
  logic [5:0] shift = 6'd4;
  logic q_valid;

  always #5 clk = ~clk;

  pe_array #(.WPAR(WPAR), .MPAR(MPAR)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte ref_quant(longint acc);
    longint v = (acc * 3 + 8) >>> 4;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return byte'(v);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int pix = 0; pix < 50; pix++) begin
      automatic int n = $urandom_range(1, 12);
      longint acc [WPAR][MPAR];
      byte expq [WPAR][MPAR];
      for (int i = 0; i < WPAR; i++) for (int j = 0; j < MPAR; j++) acc[i][j] = 0;
      for (int k = 0; k < n; k++) begin
        for (int i = 0; i < WPAR; i++)
          for (int j = 0; j < MPAR; j++) begin
            automatic byte xv = byte'($urandom), wv = byte'($urandom);
            x[i][j] <= xv; w[i][j] <= wv;
            acc[i][j] += longint'(xv) * wv;
          end
        en <= 1; first <= (k == 0); last <= (k == n - 1);
        @(posedge clk);
      end
      en <= 0; first <= 0; last <= 0;
      for (int i = 0; i < WPAR; i++) for (int j = 0; j < MPAR; j++) expq[i][j] = ref_quant(acc[i][j]);
      // results must appear in the 5th cycle after the last operand, not earlier
      repeat (4) begin
        @(posedge clk);
        checks++;
        if (q_valid) begin failures++; $display("q_valid early"); end
      end
      @(posedge clk);
      checks++;
      if (!q_valid) begin failures++; $display("q_valid missing"); end
      for (int i = 0; i < WPAR; i++)
        for (int j = 0; j < MPAR; j++) begin
          checks++;
          if ($signed(q[i][j]) != expq[i][j]) begin
            failures++;
            $display("PE(%0d,%0d) got %0d exp %0d", i, j, $signed(q[i][j]), expq[i][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
