// tl_decoder: instruction decoder of the decode (ID) stage.
//
// Turns a 32-bit MIPS-style instruction into the decoded form dec_t (see
// tl_pkg for the instruction set). For loads it also gives the base and
// index specifiers the tunneling comparators check: the base is rs, and the
// index is rt for the register + register load LWX and the zero register
// for the register + immediate load LW. Unknown encodings decode as
// "illegal" and act as no-ops. Purely combinational. The instruction set is
// this design's choice of a small MIPS subset.
module tl_decoder
  import tl_pkg::*;
(
  input  logic      valid,
  input  word_t     instr,
  output dec_t      dec,
  output reg_spec_t ld_base,
  output reg_spec_t ld_index
);

  logic [5:0] opc, fn;
  reg_spec_t  rs, rt, rd;

  always_comb begin
    opc = instr[31:26];
    fn  = instr[5:0];
    rs  = instr[25:21];
    rt  = instr[20:16];
    rd  = instr[15:11];

    dec           = '0;
    dec.valid     = valid;
    dec.rs        = rs;
    dec.rt        = rt;
    dec.dst       = ZERO_REG;
    dec.alu_op    = ALU_ADD;
    dec.imm       = {{16{instr[15]}}, instr[15:0]};

    unique case (opc)
      OP_RTYPE: begin
        dec.use_rs = 1'b1;
        dec.use_rt = 1'b1;
        dec.dst    = rd;
        dec.we     = 1'b1;
        unique case (fn)
          F_ADDU: dec.alu_op = ALU_ADD;
          F_SUBU: dec.alu_op = ALU_SUB;
          F_AND:  dec.alu_op = ALU_AND;
          F_OR:   dec.alu_op = ALU_OR;
          F_XOR:  dec.alu_op = ALU_XOR;
          F_SLT:  dec.alu_op = ALU_SLT;
          F_LWX: begin
            dec.is_load = 1'b1;
            dec.rr_mode = 1'b1;
          end
          default: begin
            dec.illegal = 1'b1;
            dec.we      = 1'b0;
            dec.use_rs  = 1'b0;
            dec.use_rt  = 1'b0;
          end
        endcase
      end
      OP_ADDIU: begin
        dec.use_rs  = 1'b1;
        dec.use_imm = 1'b1;
        dec.dst     = rt;
        dec.we      = 1'b1;
      end
      OP_LW: begin
        dec.use_rs  = 1'b1;
        dec.use_imm = 1'b1;
        dec.dst     = rt;
        dec.we      = 1'b1;
        dec.is_load = 1'b1;
      end
      OP_SW: begin
        dec.use_rs   = 1'b1;
        dec.use_rt   = 1'b1;
        dec.use_imm  = 1'b1;
        dec.is_store = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        dec.use_rs    = 1'b1;
        dec.use_rt    = 1'b1;
        dec.is_branch = 1'b1;
        dec.br_ne     = (opc == OP_BNE);
      end
      default: dec.illegal = 1'b1;
    endcase

    if (dec.dst == ZERO_REG) dec.we = 1'b0;
    if (!valid) begin
      dec.we        = 1'b0;
      dec.is_load   = 1'b0;
      dec.is_store  = 1'b0;
      dec.is_branch = 1'b0;
    end

    ld_base  = rs;
    ld_index = dec.rr_mode ? rt : ZERO_REG;
  end

endmodule
