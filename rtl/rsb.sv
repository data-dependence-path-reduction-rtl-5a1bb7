// rsb: register specifier buffer.
//
// A fully associative table, looked up with the target program counter (TPC)
// one cycle before the instruction is fetched. Each entry holds a 32-bit
// instruction address tag, the 5-bit base and index register specifiers of a
// load, a valid bit and LRU information (entry layout and 64-entry size as in
// the design description). On a lookup miss the buffer supplies the stack
// pointer as base and the zero register as index, so a stack-relative load
// can still tunnel without an entry.
//
// Lookup is combinational: rsb_out follows lookup_addr in the same cycle and
// is meant to be registered by the pipeline at the end of the RSB stage. When
// lookup_touch is high and the lookup hits, the hit entry becomes most
// recently used at the next clock edge. A write (wr_en) of an address that is
// already present rewrites that entry; otherwise it fills an invalid entry,
// or, if all are valid, the least recently used one. A write takes priority
// over a lookup's LRU update in the same cycle; evict flags a write that
// replaces a valid entry.
//
// LRU is kept as one age counter per entry (a permutation of 0..ENTRIES-1,
// 0 = most recently used); the description names an LRU field without
// specifying it, so this encoding is this design's choice.
module rsb
  import tl_pkg::*;
#(
  parameter int ENTRIES = 64,
  parameter int TAG_W   = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup (RSB stage)
  input  logic [TAG_W-1:0] lookup_addr,
  input  logic             lookup_touch,
  output rsb_out_t         rsb_out,
  // insertion (ID stage)
  input  logic             wr_en,
  input  logic [TAG_W-1:0] wr_addr,
  input  reg_spec_t        wr_base,
  input  reg_spec_t        wr_index,
  output logic             evict      // this write replaces a valid entry
);

  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    reg_spec_t        base;
    reg_spec_t        index;
    logic             v;
  } entry_t;

  entry_t          ent [ENTRIES];
  logic [AW-1:0]   age [ENTRIES];

  // ---------------- lookup ----------------
  logic          lk_hit;
  logic [AW-1:0] lk_idx;

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].v && ent[i].tag == lookup_addr) begin
        lk_hit = 1'b1;
        lk_idx = AW'(i);
      end
    end
    rsb_out.hit   = lk_hit;
    rsb_out.base  = lk_hit ? ent[lk_idx].base  : SP_REG;
    rsb_out.index = lk_hit ? ent[lk_idx].index : ZERO_REG;
  end

  // ---------------- write target ----------------
  logic          wr_match, have_free;
  logic [AW-1:0] match_idx, free_idx, lru_idx, wr_idx;

  always_comb begin
    wr_match  = 1'b0;
    match_idx = '0;
    have_free = 1'b0;
    free_idx  = '0;
    lru_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].v && ent[i].tag == wr_addr) begin
        wr_match  = 1'b1;
        match_idx = AW'(i);
      end
      if (!ent[i].v) begin
        have_free = 1'b1;
        free_idx  = AW'(i);
      end
      if (age[i] == AW'(ENTRIES - 1)) lru_idx = AW'(i);
    end
    wr_idx = wr_match ? match_idx : (have_free ? free_idx : lru_idx);
    evict  = wr_en && !wr_match && !have_free;
  end

  // ---------------- update ----------------
  logic          touch;
  logic [AW-1:0] touch_idx;

  always_comb begin
    touch     = wr_en || (lookup_touch && lk_hit);
    touch_idx = wr_en ? wr_idx : lk_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        ent[i] <= '0;
        age[i] <= AW'(i);
      end
    end else begin
      if (wr_en) begin
        ent[wr_idx].tag   <= wr_addr;
        ent[wr_idx].base  <= wr_base;
        ent[wr_idx].index <= wr_index;
        ent[wr_idx].v     <= 1'b1;
      end
      if (touch) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (AW'(i) == touch_idx)         age[i] <= '0;
          else if (age[i] < age[touch_idx]) age[i] <= age[i] + 1'b1;
        end
      end
    end
  end

endmodule
