// dcache: dual-ported data memory standing in for the data cache.
//
// The tunneling load needs a second data cache port: port A serves a
// tunneling load in the execute stage while port B serves the normal
// memory-access (MEM) stage, which may at the same moment hold an older
// load or store. The default capacity is the 16 KB of the evaluated data
// cache, organised here as one array of 32-bit words that always hits:
// the set-associative organisation, write-back policy and miss handling of
// that cache are not modelled, and the level behind it is ideal.
//
// Port A: read only, combinational. If port B writes the same word in the
// same cycle, port A returns the new data (the store is older than the
// tunneling load) and raises a_bypass. Port B: combinational read, write at
// the clock edge. Addresses are byte addresses of aligned words; the two
// low bits are ignored.
module dcache
  import tl_pkg::*;
#(
  parameter int SIZE_BYTES = 16384
) (
  input  logic  clk,
  // port A: tunneling load (EX stage)
  input  logic  a_en,
  input  word_t a_addr,
  output word_t a_rdata,
  output logic  a_bypass,
  // port B: normal load / store (MEM stage)
  input  logic  b_en,
  input  logic  b_we,
  input  word_t b_addr,
  input  word_t b_wdata,
  output word_t b_rdata
);

  localparam int WORDS = SIZE_BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  word_t mem [WORDS];

  logic [AW-1:0] a_idx, b_idx;

  always_comb begin
    a_idx    = a_addr[AW+1:2];
    b_idx    = b_addr[AW+1:2];
    a_bypass = a_en && b_en && b_we && (a_idx == b_idx);
    a_rdata  = a_bypass ? b_wdata : mem[a_idx];
    b_rdata  = mem[b_idx];
  end

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_idx] <= b_wdata;
  end

endmodule
