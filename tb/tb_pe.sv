// tb_pe: self-checking test of one processing element.
//
// Streams back-to-back output pixels of random length (1..40 operands) through the PE, in MAC
// and MAX mode, with random quantization settings, and checks each quantized result against
// a reference computed in the testbench, exactly five cycles after the pixel's last operand.
// Also checks that `first` restarts the sum without an idle cycle and counts saturation and
// ReLU events.
`timescale 1ns/1ps
module tb_pe;
  import gemini_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en = 0, first = 0, last = 0, relu = 0;
  pe_op_e op = PE_MAC;
  logic [7:0] x = 0, w = 0;
  logic [15:0] scale = 0;
  logic [5:0] shift = 0;
  logic [7:0] q;
  logic q_valid;

  always #5 clk = ~clk;

  pe dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_relu = 0;
  longint cyc = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, keyed by the cycle they must appear in
  byte    exp_q   [longint];

  function automatic byte ref_quant(longint acc, int sc, int sh, bit rl);
    longint v = acc * sc;
    if (sh > 0) v = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (v > 127) begin v = 127; n_sat++; end
    if (v < -128) begin v = -128; n_sat++; end
    if (rl && v < 0) begin v = 0; n_relu++; end
    return byte'(v);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (exp_q.exists(cyc)) begin
        checks++;
        if (!q_valid || $signed(q) != exp_q[cyc]) begin
          failures++;
          $display("cycle %0d: got valid=%0b q=%0d, expected %0d", cyc, q_valid, $signed(q), exp_q[cyc]);
        end
      end else if (q_valid) begin
        failures++;
        $display("cycle %0d: unexpected q_valid", cyc);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // "layers": the quantization settings and the operation stay fixed within one, as in
    // the accelerator, and the pipeline drains between two of them
    for (int layer = 0; layer < 40; layer++) begin
     automatic pe_op_e o = ($urandom_range(0, 3) == 0) ? PE_MAX : PE_MAC;
     automatic int sc = (o == PE_MAX) ? 1 : $urandom_range(1, 400);
     automatic int sh = (o == PE_MAX) ? 0 : $urandom_range(0, 14);
     automatic bit rl = $urandom_range(0, 1);
     for (int pix = 0; pix < 10; pix++) begin
      automatic int n = $urandom_range(1, 40);
      automatic longint acc = (o == PE_MAX) ? -1000 : 0;
      for (int k = 0; k < n; k++) begin
        automatic byte xv = byte'($urandom);
        automatic byte wv = byte'($urandom);
        en <= 1; first <= (k == 0); last <= (k == n - 1); op <= o;
        x <= xv; w <= wv; scale <= 16'(sc); shift <= 6'(sh); relu <= rl;
        if (o == PE_MAX) acc = (xv > acc) ? xv : acc;
        else acc += longint'(xv) * longint'(wv);
        // cyc still holds the previous cycle number here: 1 + 5 quantization cycles
        if (k == n - 1) exp_q[cyc + 6] = ref_quant(acc, sc, sh, rl);
        @(posedge clk);
        // occasional idle cycle inside a pixel: the accumulator must hold
        if ($urandom_range(0, 9) == 0 && k != n - 1) begin
          en <= 0; x <= 8'h55; first <= 1; last <= 1;
          @(posedge clk);
        end
      end
     end
     en <= 0;
     repeat (6) @(posedge clk);
    end
    en <= 0; first <= 0; last <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_sat == 0 || n_relu == 0) begin
      failures++;
      $display("saturation (%0d) or ReLU (%0d) never exercised", n_sat, n_relu);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
