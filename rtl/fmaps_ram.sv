// fmaps_ram: the feature-map SRAM, WPAR banks of MPAR x 8-bit words.
//
// Word `a` of bank `b` holds the MPAR channels (lanes) of one pixel position; the banks
// interleave the positions of a row so that WPAR neighbouring pixels can be read in one
// cycle. Each bank has one synchronous read port (data valid the cycle after the address)
// and one write port, so the PE array can be fed while the storing stage writes results.
// Capacity is fixed at FMAP_BYTES; only the aspect ratio (banks x width x depth) follows
// WPAR and MPAR, as for the evaluated configurations. The default, together with the
// weights RAM, gives the 1.3 MB of SRAM quoted for the VGG-like example.
// Written as a plain array (an SRAM macro in a real chip); no reset of the contents.
// Reads of an address past the end return bank word 0. Simultaneous read and write of the
// same word returns the old data.
module fmaps_ram
  import gemini_pkg::*;
#(
  parameter int WPAR       = 4,
  parameter int MPAR       = 8,
  parameter int FMAP_BYTES = 655360,
  localparam int DEPTH     = FMAP_BYTES / (WPAR * MPAR),
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic                                   clk,
  input  logic                                   re,
  input  logic [WPAR-1:0][AW-1:0]                raddr,
  output logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] rdata,
  input  logic [WPAR-1:0]                        we,
  input  logic [WPAR-1:0][AW-1:0]                waddr,
  input  logic [WPAR-1:0][MPAR-1:0][FMAP_BITS-1:0] wdata
);

  for (genvar b = 0; b < WPAR; b++) begin : g_bank
    logic [MPAR*FMAP_BITS-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (re) rdata[b] <= (int'(raddr[b]) < DEPTH) ? mem[raddr[b]] : mem[0];
      if (we[b] && int'(waddr[b]) < DEPTH) mem[waddr[b]] <= wdata[b];
    end
  end

endmodule
