// tb_storing_stage: self-checking test of the storing stage (WPAR = 4, MPAR = 2).
//
// For several layer shapes (stride 1, 2 and 4, with and without the trailing incomplete
// columns) the test feeds the stage with every computed group of a layer, each carrying
// random results, and applies the stage's writes to a model of the fmaps RAM banks. It then
// checks every output pixel (filter group, oy, ox) in the memory against the result the
// array computed for row oy*stride, column ox*stride, and that nothing was written outside
// the output tensor.
`timescale 1ns/1ps
module tb_storing_stage;
  import gemini_pkg::*;

  localparam int WPAR = 4, MPAR = 2, AW = 10, DEPTH = 1 << AW;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [WPAR-1:0][MPAR-1:0][7:0] q = '0;
  st_tag_t tag = '0;
  dim_t lastcol = '0, oh = '0, owa = '0;
  logic [1:0] slog = '0;
  logic [AW-1:0] out_base = '0;
  logic [WPAR-1:0] wr_en;
  logic [WPAR-1:0][AW-1:0] wr_addr;
  logic [WPAR-1:0][MPAR-1:0][7:0] wr_data;

  always #5 clk = ~clk;

  storing_stage #(.WPAR(WPAR), .MPAR(MPAR), .AW(AW)) dut (.*);

  int checks = 0, failures = 0, n_dropped = 0;
  logic [MPAR*8-1:0] mem [WPAR][DEPTH];
  logic              written [WPAR][DEPTH];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    for (int b = 0; b < WPAR; b++)
      if (wr_en[b]) begin
        mem[b][wr_addr[b]] <= wr_data[b];
        written[b][wr_addr[b]] <= 1'b1;
      end

  initial begin
    int shapes [6][4] = '{ '{10, 7, 0, 1}, '{10, 7, 1, 1}, '{11, 8, 1, 0},
                           '{9, 5, 2, 0}, '{13, 6, 0, 0}, '{16, 9, 2, 1} };  // W, rows, slog, hpad
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (shapes[i]) begin
      automatic int W = shapes[i][0], rows = shapes[i][1], sl = shapes[i][2];
      automatic int lc = shapes[i][3] ? W - 1 : W - 3;     // 3-wide filter without padding
      automatic int st = 1 << sl;
      automatic int OH = (rows - 1) / st + 1, OW = lc / st + 1;
      automatic int OWA = (OW + WPAR - 1) / WPAR;
      automatic int base = 17 * i;
      automatic int mgroups = 2;
      byte res [][][][];  // [mg][yo][xo][m]
      res = new[mgroups];
      foreach (written[b, a]) written[b][a] = 1'b0;
      lastcol <= dim_t'(lc); slog <= 2'(sl); oh <= dim_t'(OH); owa <= dim_t'(OWA);
      out_base <= AW'(base);
      for (int mg = 0; mg < mgroups; mg++) begin
        res[mg] = new[rows];
        for (int yo = 0; yo < rows; yo++) begin
          res[mg][yo] = new[W + WPAR];
          for (int xo0 = 0; xo0 < W; xo0 += WPAR) begin
            for (int w = 0; w < WPAR; w++) begin
              res[mg][yo][xo0 + w] = new[MPAR];
              for (int m = 0; m < MPAR; m++) begin
                res[mg][yo][xo0 + w][m] = byte'($urandom);
                q[w][m] <= res[mg][yo][xo0 + w][m];
              end
              if (xo0 + w > lc || (xo0 + w) % st != 0 || yo % st != 0) n_dropped++;
            end
            in_valid <= 1'b1;
            tag <= '{yo: dim_t'(yo), xo0: dim_t'(xo0), mg: dim_t'(mg)};
            @(posedge clk);
          end
        end
      end
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
      // check the output tensor
      for (int mg = 0; mg < mgroups; mg++)
        for (int oy = 0; oy < OH; oy++)
          for (int ox = 0; ox < OW; ox++) begin
            automatic int b = ox % WPAR;
            automatic int a = base + (mg * OH + oy) * OWA + ox / WPAR;
            for (int m = 0; m < MPAR; m++) begin
              checks++;
              if (!written[b][a] || $signed(mem[b][a][m*8 +: 8]) != res[mg][oy * st][ox * st][m]) begin
                failures++;
                if (failures < 10) $display("shape %0d mg %0d oy %0d ox %0d m %0d wrong", i, mg, oy, ox, m);
              end
            end
            written[b][a] = 1'b0;
          end
      // nothing else may have been written
      checks++;
      foreach (written[b, a]) if (written[b][a]) begin
        failures++;
        $display("shape %0d: stray write bank %0d addr %0d", i, b, a);
      end
    end
    checks++;
    if (n_dropped == 0) failures++;
    $display("results dropped: %0d", n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
