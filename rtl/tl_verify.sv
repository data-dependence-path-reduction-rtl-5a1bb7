// tl_verify: decides in the decode stage whether a tunneling load address
// may be used, so that the data cache is never read speculatively.
//
// Two 5-bit comparators check the base and index specifiers the RSB supplied
// against those decoded from the instruction (for register + immediate loads
// the decoded index is the zero register). A mismatch covers both the
// primary miss (no RSB entry, and the default stack-pointer/zero pair is
// wrong) and the bad-TPC miss (the RSB was read with a mispredicted TPC).
// The scoreboard bits of the two specifiers, plus a flag from the operand
// read telling that a value could not be obtained in time, detect the
// address-generation miss. Only a valid load with matching specifiers and
// no busy operand tunnels (tl_go); anything else discards the address.
//
// It also requests an RSB insertion when a load's address is not held in the
// RSB. The lookup that travelled with the instruction is trusted only when
// it was made with this instruction's own address (lookup_addr == pc).
// The miss categories follow the design description; the event priority
// (bad TPC before primary, mismatch before address-generation) is this
// design's choice. Purely combinational.
module tl_verify
  import tl_pkg::*;
(
  input  logic      valid,
  input  logic      is_load,
  input  logic      rr_mode,
  input  word_t     pc,
  input  word_t     lookup_addr,   // TPC the RSB was read with
  input  rsb_out_t  rsb,           // what the RSB supplied
  input  reg_spec_t dec_base,      // decoded base specifier (rs)
  input  reg_spec_t dec_index,     // decoded index specifier (rt of LWX)
  input  logic      base_busy,     // scoreboard bit of rsb.base
  input  logic      index_busy,    // scoreboard bit of rsb.index
  input  logic      opnd_late,     // a tunneling operand was not ready
  output logic      tl_go,
  output logic      spec_mismatch,
  output logic      agen_miss,
  output logic      primary_miss,
  output logic      bad_tpc,
  output logic      rsb_wr
);

  logic      ld;
  logic      same_addr;
  logic      base_eq, index_eq;
  reg_spec_t want_index;

  always_comb begin
    ld         = valid && is_load;
    same_addr  = (lookup_addr == pc);
    want_index = rr_mode ? dec_index : ZERO_REG;
    base_eq    = (rsb.base == dec_base);
    index_eq   = (rsb.index == want_index);

    spec_mismatch = ld && !(base_eq && index_eq);
    agen_miss     = ld && !spec_mismatch && (base_busy || index_busy || opnd_late);
    tl_go         = ld && !spec_mismatch && !agen_miss;
    bad_tpc       = ld && !same_addr;
    primary_miss  = ld && same_addr && !rsb.hit;
    rsb_wr        = ld && !(same_addr && rsb.hit);
  end

endmodule
