// tb_ifmap_mixer: self-checking test of the ifmap mixer (WPAR = 5, MPAR = 3).
//
// The test builds a row of 2*WPAR pixel positions (each with MPAR channels), places them in
// the banks the way the fmaps RAM holds them (position p in bank p mod WPAR), picks a window
// start `rot`, and reads for every bank the word of the one position that falls inside the
// window. It then checks that PE (w,m) gets position rot+w (channel `lane` for convolution,
// channel m for depthwise), that in fully connected mode every PE gets position rot, and that
// padded columns get the pad value.
`timescale 1ns/1ps
module tb_ifmap_mixer;
  import gemini_pkg::*;

  localparam int WPAR = 5, MPAR = 3;

  mix_mode_e mode;
  logic [WPAR-1:0][MPAR-1:0][7:0] bank_data, pe_x;
  logic [2:0] rot;
  logic [1:0] lane;
  logic [WPAR-1:0] col_valid;
  logic [7:0] pad_value;

  ifmap_mixer #(.WPAR(WPAR), .MPAR(MPAR)) dut (.*);

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
    byte row [2*WPAR][MPAR];
    for (int it = 0; it < 2000; it++) begin
      automatic int r = $urandom_range(0, WPAR - 1);
      automatic int ln = $urandom_range(0, MPAR - 1);
      foreach (row[p, c]) row[p][c] = byte'($urandom);
      for (int b = 0; b < WPAR; b++)
        for (int c = 0; c < MPAR; c++)
          bank_data[b][c] = (b >= r) ? row[b][c] : row[b + WPAR][c];
      mode      = mix_mode_e'($urandom_range(0, 2));
      rot       = 3'(r);
      lane      = 2'(ln);
      col_valid = WPAR'($urandom);
      pad_value = 8'($urandom);
      #1;
      for (int w = 0; w < WPAR; w++)
        for (int m = 0; m < MPAR; m++) begin
          byte e;
          if (!col_valid[w])       e = byte'(pad_value);
          else if (mode == MIX_FC) e = row[r][ln];
          else if (mode == MIX_DW) e = row[r + w][m];
          else                     e = row[r + w][ln];
          checks++;
          if ($signed(pe_x[w][m]) != e) begin
            failures++;
            if (failures < 10) $display("mode %0d rot %0d PE(%0d,%0d) got %0d exp %0d",
                                        mode, r, w, m, $signed(pe_x[w][m]), e);
          end
        end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
