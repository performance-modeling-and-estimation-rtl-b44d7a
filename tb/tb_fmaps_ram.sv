// tb_fmaps_ram: self-checking test of the banked fmaps RAM (WPAR = 3, MPAR = 2, 3 KiB).
//
// Writes random words to random banks and addresses (banks independently, several in the
// same cycle), keeps a reference copy, and reads back with a different address per bank,
// checking that the data appear exactly one cycle after the address, that a read of a word
// written in the same cycle returns the old contents, and that banks do not alias.
`timescale 1ns/1ps
module tb_fmaps_ram;
  import gemini_pkg::*;

  localparam int WPAR = 3, MPAR = 2, FMAP_BYTES = 3072;
  localparam int DEPTH = FMAP_BYTES / (WPAR * MPAR), AW = $clog2(DEPTH);

  logic clk = 0, re = 0;
  logic [WPAR-1:0][AW-1:0] raddr = '0, waddr = '0;
  logic [WPAR-1:0][MPAR-1:0][7:0] rdata, wdata = '0;
  logic [WPAR-1:0] we = '0;

  always #5 clk = ~clk;

  fmaps_ram #(.WPAR(WPAR), .MPAR(MPAR), .FMAP_BYTES(FMAP_BYTES)) dut (.*);

  int checks = 0, failures = 0;
  logic [MPAR*8-1:0] model [WPAR][DEPTH];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything once
    for (int a = 0; a < DEPTH; a++) begin
      we <= '1;
      for (int b = 0; b < WPAR; b++) begin
        model[b][a] = (MPAR*8)'($urandom);
        waddr[b] <= AW'(a);
        wdata[b] <= model[b][a];
      end
      @(posedge clk);
    end
    we <= '0;
    for (int it = 0; it < 3000; it++) begin
      logic [WPAR-1:0][MPAR-1:0][7:0] exp_old;
      for (int b = 0; b < WPAR; b++) begin
        automatic int ra = $urandom_range(0, DEPTH - 1);
        raddr[b] <= AW'(ra);
        exp_old[b] = model[b][ra];
        we[b] <= $urandom_range(0, 1);
        // sometimes write the word being read
        waddr[b] <= ($urandom_range(0, 3) == 0) ? AW'(ra) : AW'($urandom_range(0, DEPTH - 1));
        wdata[b] <= (MPAR*8)'($urandom);
      end
      re <= 1'b1;
      @(posedge clk);
      for (int b = 0; b < WPAR; b++) if (we[b]) model[b][waddr[b]] = wdata[b];
      re <= 1'b0; we <= '0;
      #1;
      for (int b = 0; b < WPAR; b++) begin
        checks++;
        if (rdata[b] != exp_old[b]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d got %h exp %h", b, raddr[b], rdata[b], exp_old[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
