// tb_weights_ram: self-checking test of the weights RAM (NPE = 6, 1536 bytes).
//
// Loads random words through the write port, keeping a reference copy, then reads random
// addresses while writing others, checking that the data appear one cycle after the address
// and that a read of a word written in the same cycle returns the old contents.
`timescale 1ns/1ps
module tb_weights_ram;
  import gemini_pkg::*;

  localparam int NPE = 6, WEIGHT_BYTES = 1536;
  localparam int DEPTH = WEIGHT_BYTES / NPE, AW = $clog2(DEPTH);

  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [NPE*8-1:0] rdata, wdata = '0;

  always #5 clk = ~clk;

  weights_ram #(.NPE(NPE), .WEIGHT_BYTES(WEIGHT_BYTES)) dut (.*);

  int checks = 0, failures = 0;
  logic [NPE*8-1:0] model [DEPTH];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = {$urandom, $urandom};
      we <= 1; waddr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int it = 0; it < 3000; it++) begin
      automatic int ra = $urandom_range(0, DEPTH - 1);
      automatic logic [NPE*8-1:0] exp_old = model[ra];
      raddr <= AW'(ra); re <= 1;
      we <= $urandom_range(0, 1);
      waddr <= ($urandom_range(0, 3) == 0) ? AW'(ra) : AW'($urandom_range(0, DEPTH - 1));
      wdata <= {$urandom, $urandom};
      @(posedge clk);
      if (we) model[waddr] = wdata;
      re <= 0; we <= 0;
      #1;
      checks++;
      if (rdata != exp_old) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h exp %h", ra, rdata, exp_old);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
