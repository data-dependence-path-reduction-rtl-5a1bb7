// tl_pkg: types and constants shared by the tunneling-load pipeline.
//
// The pipeline runs a small MIPS-like integer instruction set. The register
// file shape (32 x 32-bit), the 5-bit register specifiers and the 32-bit
// instruction address tag of a register specifier buffer (RSB) entry follow
// the design description. The instruction encodings are MIPS-style: the
// opcodes and function codes of ADDU, SUBU, AND, OR, XOR, SLT, ADDIU, LW, SW,
// BEQ and BNE are the MIPS ones. LWX, a register + register load
// (rd <- mem[rs + rt]), is this design's own encoding (R-type, funct 0x0A),
// added because the tunneling adder supports both addressing modes.
// Register 29 is taken as the stack pointer (MIPS convention), register 0 is
// hard-wired to zero.
package tl_pkg;

  localparam int XLEN   = 32;
  localparam int NREGS  = 32;
  localparam int SPEC_W = 5;

  typedef logic [SPEC_W-1:0] reg_spec_t;
  typedef logic [XLEN-1:0]   word_t;

  localparam reg_spec_t ZERO_REG = 5'd0;
  localparam reg_spec_t SP_REG   = 5'd29;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (instruction bits 5:0)
  localparam logic [5:0] F_LWX  = 6'h0A;
  localparam logic [5:0] F_ADDU = 6'h21;
  localparam logic [5:0] F_SUBU = 6'h23;
  localparam logic [5:0] F_AND  = 6'h24;
  localparam logic [5:0] F_OR   = 6'h25;
  localparam logic [5:0] F_XOR  = 6'h26;
  localparam logic [5:0] F_SLT  = 6'h2A;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT
  } alu_op_e;

  // Decoded instruction as it travels from ID onwards.
  typedef struct packed {
    logic      valid;     // a real instruction (not a bubble)
    logic      illegal;   // unknown encoding, executed as a no-op
    reg_spec_t rs;        // first source / base register
    reg_spec_t rt;        // second source / index register
    logic      use_rs;    // rs is read
    logic      use_rt;    // rt is read
    reg_spec_t dst;       // destination register (ZERO_REG when none)
    logic      we;        // writes dst
    logic      use_imm;   // second ALU operand is the immediate
    alu_op_e   alu_op;
    word_t     imm;       // sign-extended immediate
    logic      is_load;   // LW or LWX
    logic      rr_mode;   // register + register addressing (LWX)
    logic      is_store;  // SW
    logic      is_branch; // BEQ or BNE
    logic      br_ne;     // BNE
  } dec_t;

  // What the RSB hands to the pipeline for one TPC.
  typedef struct packed {
    logic      hit;       // the TPC was found in the RSB
    reg_spec_t base;      // base register specifier (SP_REG on a miss)
    reg_spec_t index;     // index register specifier (ZERO_REG on a miss)
  } rsb_out_t;

  // One-cycle event pulses, brought out of the core for counting.
  typedef struct packed {
    logic tl_success;     // a tunneling load read the data cache in EX
    logic agen_miss;      // squashed: base/index modified just before the load
    logic primary_miss;   // load whose address was not in the RSB
    logic bad_tpc;        // load whose RSB lookup was made with a wrong TPC
    logic spec_mismatch;  // squashed: RSB specifiers differ from the decoded ones
    logic rsb_insert;     // a load's specifiers were written into the RSB
    logic rsb_evict;      // that write replaced the least recently used entry
    logic load_use_stall; // ID held one cycle behind a non-tunneled load
    logic redirect;       // mispredicted successor: PC and TPC corrected
    logic normal_load;    // load served by the MEM-stage port
    logic store_bypass;   // tunneling read took data from a store in MEM
  } tl_events_t;

endpackage
