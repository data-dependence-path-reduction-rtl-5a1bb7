// agen_adder: the extra address calculating adder of the tunneling load.
//
// In the decode stage it adds the base value, read one cycle earlier with
// the RSB-supplied base specifier, to either the index value (register +
// register addressing) or the immediate offset decoded in this cycle
// (register + immediate addressing). The two-input adder with an
// index/immediate choice is the structure of the design description; it is
// purely combinational and 32 bits wide, like the registers.
module agen_adder
  import tl_pkg::*;
(
  input  word_t base_val,
  input  word_t index_val,
  input  word_t imm,
  input  logic  rr_mode,
  output word_t addr
);

  word_t offset;

  always_comb begin
    offset = rr_mode ? index_val : imm;
    addr   = base_val + offset;
  end

endmodule
