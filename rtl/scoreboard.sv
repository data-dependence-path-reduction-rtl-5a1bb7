// scoreboard: one bit per architectural register, set for the destination
// registers of the instructions that were in the decode (ID) stage in the
// previous cycle.
//
// A set bit means the register is being updated by the instruction
// immediately ahead of a load, so a base or index value read for that load
// one cycle earlier may be stale; the pipeline then squashes the tunneling
// address (an "address-generation miss"). The bits are rewritten each cycle
// from the set_en/set_reg inputs (one port per instruction that can sit in
// ID; the scalar pipeline uses one). While hold is high (the ID stage is
// stalled and nothing leaves it) the bits keep their value, so they always
// describe the instruction(s) that left ID last. They are read
// combinationally through two
// check ports, one for the base and one for the index specifier. Writes to
// register 0 are ignored because that register never changes. Register count
// and behaviour follow the design description; the port structure is this
// design's choice.
module scoreboard
  import tl_pkg::*;
#(
  parameter int N_REGS = NREGS,
  parameter int N_SET  = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  hold,
  input  logic [N_SET-1:0]      set_en,
  input  reg_spec_t [N_SET-1:0] set_reg,
  input  reg_spec_t             chk_base,
  input  reg_spec_t             chk_index,
  output logic                  base_busy,
  output logic                  index_busy,
  output logic [N_REGS-1:0]     bits
);

  logic [N_REGS-1:0] nxt;

  always_comb begin
    nxt = '0;
    for (int s = 0; s < N_SET; s++)
      if (set_en[s] && set_reg[s] != ZERO_REG && int'(set_reg[s]) < N_REGS)
        nxt[set_reg[s]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (!hold) bits <= nxt;
  end

  assign base_busy  = bits[chk_base];
  assign index_busy = bits[chk_index];

endmodule
