// weights_ram: the weights SRAM, one bank of NPE x 8-bit words.
//
// Holds the network's weights and, ahead of each layer's weights, the layer's descriptor
// (HDR_WORDS words, field i in the low 32 bits of word i; see gemini_pkg). One synchronous
// read port (data the cycle after the address) for the accelerator and one write port for
// loading the network. Capacity fixed at WEIGHT_BYTES; the word width follows NPE.
// Written as a plain array; no reset of the contents. Reads past the end return word 0.
module weights_ram
  import gemini_pkg::*;
#(
  parameter int NPE          = 32,
  parameter int WEIGHT_BYTES = 655360,
  localparam int DEPTH       = WEIGHT_BYTES / NPE,
  localparam int AW          = $clog2(DEPTH)
) (
  input  logic                          clk,
  input  logic                          re,
  input  logic [AW-1:0]                 raddr,
  output logic [NPE*WEIGHT_BITS-1:0]    rdata,
  input  logic                          we,
  input  logic [AW-1:0]                 waddr,
  input  logic [NPE*WEIGHT_BITS-1:0]    wdata
);

  logic [NPE*WEIGHT_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : mem[0];
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

endmodule
