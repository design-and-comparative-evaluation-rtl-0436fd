// config_memory: configuration memory of the reconfiguration subsystem.
//
// Stores one partial bitstream per reconfigurable crypto module (AES left, AES right, HMAC
// left, HMAC right), REGION_WORDS 16-bit words each, region k starting at k*REGION_WORDS. The
// application processor loads it through the write port; the configuration engine reads it
// word by word. The document names this memory only; the word width follows the 16-bit data
// port of the Spartan-6 ICAP, and the region size is this design's assumption. One write port,
// one read port with a registered (one-cycle) read, as a block RAM; contents are not reset.
module config_memory #(
  parameter int unsigned NREGIONS     = 4,
  parameter int unsigned REGION_WORDS = 4096,
  localparam int unsigned DEPTH       = NREGIONS * REGION_WORDS,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);
  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
